// End-to-end testbench for flint_top with the instrumented non-restoring
// array divider (NETLIST = NL_DIV) at WIDTH = W (16, the size profiled in the
// evaluation) and small memories. Divisors are never 0. Acting
// as the host on the I/O bus it writes a slow timing corner (operand
// registers 15, gates 20, quotient registers 20 quanta above the minimum),
// random operand pairs and the run settings, then
//   1. runs with parameter loading at a long system period: all quotients
//      exact, and the chain end shows the first word (chain length);
//   2. reruns without reloading at a short period: timing errors appear;
//   3. loads the fast corner (all 0) and reruns at the short period: exact.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_flint_top_div;
  import flint_pkg::*;
  localparam int W = 16, NOPS = 20;
  localparam int NR = 6 * W + 6;                   // gates per row
  localparam int NGW = W * (8 * (NR - 1) + 4);     // INV cells have 4 words
  localparam int NW = 3 * 3 * W + NGW;
  localparam int T_LONG = 30000, T_SHORT = 2200;

  logic clk = 0, rst = 1;
  logic bus_we = 0, bus_re = 0, bus_rvalid, done, cordic_done;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic [15:0] chain_out;
  logic [31:0] cx, cy, cz;

  int checks = 0, failures = 0;
  int n_load = 0, n_reuse = 0, n_exact = 0, n_err_run = 0, n_switch = 0;
  logic [W-1:0] opa [NOPS], opb [NOPS];

  flint_top #(.NETLIST(NL_DIV), .WIDTH(W), .PARAM_DEPTH(16384),
              .OP_DEPTH(1024)) dut (
    .clk_ref(clk), .rst, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata,
    .bus_rvalid, .done, .chain_out,
    .cordic_start(1'b0), .cordic_vectoring(1'b0), .cordic_hyperbolic(1'b0),
    .cordic_x_i(32'd0), .cordic_y_i(32'd0), .cordic_z_i(32'd0),
    .cordic_x_o(cx), .cordic_y_o(cy), .cordic_z_o(cz), .cordic_done);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bwr(input region_e r, input int off, input logic [31:0] d);
    @(posedge clk) begin
      bus_we <= 1; bus_addr <= {r, BUS_OFW'(off)}; bus_wdata <= d;
    end
    @(posedge clk) bus_we <= 0;
  endtask

  task automatic brd(input region_e r, input int off, output logic [31:0] d);
    @(posedge clk) begin bus_re <= 1; bus_addr <= {r, BUS_OFW'(off)}; end
    @(posedge clk) bus_re <= 0;
    #1 d = bus_rdata;
    check(bus_rvalid, "bus read valid");
  endtask

  // Parameter stream: quotient registers, gates, operand registers (cells from
  // the end of the chain backwards), each cell's words in index order.
  task automatic write_params(input int pin, pg, pout, marker);
    for (int k = 0; k < NW; k++) begin
      int v;
      if (k == 0)                        v = marker;
      else if (k < 3 * W)                v = pout;
      else if (k < 3 * W + NGW)          v = pg;
      else                               v = pin;
      bwr(PARAM_REGION, k, 32'(v));
    end
  endtask

  task automatic run(input bit load, input int period, output int errs);
    logic [31:0] d;
    int n = 0;
    bwr(REG_REGION, REG_SYS_PERIOD, 32'(period));
    bwr(REG_REGION, REG_CTRL, {30'd0, load, 1'b1});
    do begin
      brd(REG_REGION, REG_STATUS, d);
      n++;
    end while (d[0] != 1'b1 && n < 2000000);
    check(d[0] && done, "run finished with done flag");
    brd(REG_REGION, REG_OP_COUNT, d);
    check(d == NOPS, $sformatf("operation count %0d", d));
    errs = 0;
    for (int k = 0; k < NOPS; k++) begin
      brd(RESULT_REGION, k, d);
      if (d[W-1:0] != opa[k] / opb[k]) errs++;
    end
    if (load) n_load++; else n_reuse++;
    if (errs == 0) n_exact++; else n_err_run++;
    $display("run: load=%0b period=%0d errors=%0d of %0d", load, period, errs, NOPS);
  endtask

  initial begin
    int errs;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < NOPS; k++) begin
      opa[k] = W'($urandom); opb[k] = W'($urandom_range(1, 2**W - 1));
      bwr(OPA_REGION, k, 32'(opa[k]));
      bwr(OPB_REGION, k, 32'(opb[k]));
    end
    bwr(REG_REGION, REG_NUM_PARAMS, NW);
    bwr(REG_REGION, REG_NUM_OPS, NOPS);
    bwr(REG_REGION, REG_LOAD_DIV, 2);

    write_params(15, 20, 20, 21);
    run(1'b1, T_LONG, errs);
    check(errs == 0, "slow corner, long period: exact");
    check(chain_out == 16'd21, "chain end holds the first word: chain length");
    run(1'b0, T_SHORT, errs);
    check(errs > 0, "slow corner, short period: timing errors");
    write_params(0, 0, 0, 0);
    run(1'b1, T_SHORT, errs);
    check(errs == 0, "fast corner, same period: exact");
    n_switch++;

    check(n_load > 0, "mechanism: parameter load");
    check(n_reuse > 0, "mechanism: run reusing loaded parameters");
    check(n_exact > 0, "mechanism: error-free run");
    check(n_err_run > 0, "mechanism: run with timing errors");
    check(n_switch > 0, "mechanism: timing corner switch");
    $display("mechanisms: load %0d reuse %0d exact %0d errors %0d switch %0d",
             n_load, n_reuse, n_exact, n_err_run, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
