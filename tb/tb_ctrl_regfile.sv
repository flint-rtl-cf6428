// Testbench for ctrl_regfile: register writes and read-back, the one-cycle
// start pulse, reset values and the status bits.
module tb_ctrl_regfile;
  logic clk = 0, rst = 1, we = 0, re = 0;
  logic [2:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic start, do_load, done = 0, busy = 0;
  logic [31:0] num_params, num_ops, sys_period, op_count = 32'd77;
  logic [15:0] load_div;
  int checks = 0, failures = 0;

  ctrl_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(posedge clk) begin we <= 1; addr <= 3'(a); wdata <= d; end
    @(posedge clk) we <= 0;
    #1;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(posedge clk) begin re <= 1; addr <= 3'(a); end
    @(posedge clk) re <= 0;
    #1 d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    int starts;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(sys_period == 100 && load_div == 4 && num_ops == 0, "reset values");
    wr(2, 32'd763);  wr(3, 32'd100000); wr(4, 32'd90000); wr(5, 32'd9);
    check(num_params == 763 && num_ops == 100000 && sys_period == 90000 && load_div == 9,
          "outputs follow writes");
    rd(2, d); check(d == 763, "read NUM_PARAMS");
    rd(3, d); check(d == 100000, "read NUM_OPS");
    rd(4, d); check(d == 90000, "read SYS_PERIOD");
    rd(5, d); check(d == 9, "read LOAD_DIV");
    rd(6, d); check(d == 77, "read OP_COUNT");
    done <= 1; busy <= 0;
    rd(1, d); check(d == 1, "status done");
    done <= 0; busy <= 1;
    rd(1, d); check(d == 2, "status busy");
    // start pulse lasts one cycle, do_load is kept
    starts = 0;
    fork
      wr(0, 32'h3);
      repeat (6) begin @(posedge clk); #1; if (start) starts++; end
    join
    check(starts == 1, "start is a single-cycle pulse");
    check(do_load == 1, "do_load set");
    wr(0, 32'h1);
    check(do_load == 0, "do_load cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
