// Testbench for uemu_mem: writes through both ports, reads back through the
// other port and checks contents and the one-cycle read latency.
module tb_uemu_mem;
  localparam int DW = 16, DEPTH = 64;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [DW-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  uemu_mem #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge clk) begin a_we <= 1; a_addr <= 6'(i); a_wdata <= DW'(i * 97 + 5); end
      model[i] = DW'(i * 97 + 5);
    end
    @(posedge clk) a_we <= 0;
    // read through port B: data one cycle after the address
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge clk) b_addr <= 6'(i);
      @(posedge clk); #1;
      check(b_rdata == model[i], $sformatf("B read %0d", i));
    end
    // port B writes, port A reads
    for (int i = 0; i < 16; i++) begin
      @(posedge clk) begin b_we <= 1; b_addr <= 6'(i * 3); b_wdata <= DW'($urandom); end
      #1 model[i * 3] = b_wdata;
    end
    @(posedge clk) b_we <= 0;
    for (int i = 0; i < 16; i++) begin
      @(posedge clk) a_addr <= 6'(i * 3);
      @(posedge clk); #1;
      check(a_rdata == model[i * 3], $sformatf("A read %0d", i * 3));
    end
    // latency: right after the address edge the old data is still shown
    @(posedge clk) a_addr <= 6'd1;
    @(posedge clk); #1;
    @(posedge clk) a_addr <= 6'd2;
    #1 check(a_rdata == model[1], "read data lags the address by one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
