// Testbench for instr_seq_cell. Loads the three delay parameters (clock to Q
// rising, clock to Q falling, reset), then checks the sampled value and that Q
// changes exactly P + 9 reference cycles after the system clock pulse edge or
// the RN assertion, and that d changes without a pulse do nothing.
module tb_instr_seq_cell;
  localparam int DW = 16;
  logic clk = 0, rst = 1, sys = 0, clk_load_en = 0, load_en = 0;
  logic [DW-1:0] load_in = '0, load_out;
  logic d = 0, rn = 1, q;
  int checks = 0, failures = 0;
  int unsigned par [3] = '{23, 41, 12};

  instr_seq_cell #(.DELAY_W(DW)) dut (
    .clk_ref(clk), .rst, .sys_clk_ff(sys), .clk_load_en, .load_en, .load_in,
    .load_out, .d, .rn, .q);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_q(input logic exp, input int want, input string what);
    int n = 0;
    do begin @(posedge clk); n++; #1; end while (q != exp && n < 1000);
    check(q == exp, {what, ": level"});
    check(n == want, $sformatf("%s: delay %0d, expected %0d", what, n, want));
    repeat (10) @(posedge clk);
  endtask

  // One system clock pulse sampled at the next edge (edge 0).
  task automatic pulse(input logic dv);
    @(posedge clk) begin d <= dv; sys <= 1; end
    @(posedge clk) sys <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    load_en <= 1;
    for (int j = 0; j < 3; j++) begin
      @(posedge clk) begin load_in <= DW'(par[j]); clk_load_en <= 1; end
      @(posedge clk) clk_load_en <= 0;
    end
    load_en <= 0;
    @(posedge clk); #1;
    check(load_out == DW'(par[0]), "chain output");
    repeat (20) @(posedge clk);

    pulse(1);  wait_q(1, par[0] + 9, "rise");
    pulse(1);  begin
      bit moved = 0;
      repeat (80) begin @(posedge clk); #1; if (!q) moved = 1; end
      check(!moved, "same value: no transition");
    end
    @(posedge clk) d <= 0;   // no pulse: must be ignored
    repeat (80) @(posedge clk); #1;
    check(q == 1, "d change without pulse ignored");
    pulse(0);  wait_q(0, par[1] + 9, "fall");
    pulse(1);  wait_q(1, par[0] + 9, "rise again");
    @(posedge clk) rn <= 0;
    wait_q(0, par[2] + 9, "reset");
    @(posedge clk) rn <= 1;
    repeat (80) @(posedge clk); #1;
    check(q == 0, "stays cleared after RN release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
