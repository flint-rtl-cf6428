// Testbench for io_bus_decoder: write strobes per region, offset and data
// pass-through, and the read multiplexer with its one-cycle rvalid.
module tb_io_bus_decoder;
  import flint_pkg::*;
  logic clk = 0, rst = 1, bus_we = 0, bus_re = 0, bus_rvalid;
  logic [BUS_AW-1:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata, wdata;
  logic [BUS_OFW-1:0] offset;
  logic reg_we, reg_re, param_we, opa_we, opb_we;
  logic [31:0] reg_rdata = 32'h11, param_rdata = 32'h22, opa_rdata = 32'h33,
               opb_rdata = 32'h44, result_rdata = 32'h55;
  int checks = 0, failures = 0;

  io_bus_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] exp_rd [5] = '{32'h11, 32'h22, 32'h33, 32'h44, 32'h55};
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 5; r++) begin
      @(negedge clk) begin
        bus_we = 1; bus_addr = {3'(r), 18'h1234 + 18'(r)}; bus_wdata = 32'hA000 + r;
      end
      #1;
      check(reg_we == (r == 0) && param_we == (r == 1) && opa_we == (r == 2) &&
            opb_we == (r == 3), $sformatf("write strobe region %0d", r));
      check(offset == 18'h1234 + 18'(r) && wdata == 32'hA000 + r, "offset and data");
      @(negedge clk) bus_we = 0;
    end
    for (int r = 0; r < 5; r++) begin
      @(negedge clk) begin bus_re = 1; bus_addr = {3'(r), 18'h7}; end
      #1 check(reg_re == (r == 0), "register read strobe");
      @(negedge clk) bus_re = 0;
      check(bus_rvalid && bus_rdata == exp_rd[r], $sformatf("read region %0d", r));
      @(negedge clk);
      check(!bus_rvalid, "rvalid one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
