// End-to-end testbench for flint_top at its default parameters (16-bit
// instrumented ripple-carry adder, 16-bit parameter words, full-size
// memories). Acting as the host on the I/O bus it
//   1. writes a slow timing corner (operand registers 15, gates 40, result
//      registers 20 quanta above the 9-cycle minimum) into the parameter
//      memory and 40 random operand pairs into the operand memories, runs
//      with parameter loading at a long system period: all sums exact;
//   2. reruns without reloading at a period shorter than the emulated
//      critical path: timing errors must appear;
//   3. loads a fast corner (all parameters 0) and reruns at that period:
//      all sums exact again, showing a corner change without rebuilding;
//   4. checks the chain end shows the first word shifted in (chain length),
//      the status and operation count registers, a parameter read-back and
//      one CORDIC sine through the side-by-side unit.
// Each mechanism (parameter load, run reusing loaded parameters, exact run,
// run with timing errors, corner switch, CORDIC operation) is counted; one
// that never happened counts as a failure.
module tb_flint_top;
  import flint_pkg::*;
  localparam int W = 16, NG = 5 * W - 3, NOPS = 40;
  localparam int NW = 3 * (3 * W + 1) + 8 * NG;

  logic clk = 0, rst = 1;
  logic bus_we = 0, bus_re = 0, bus_rvalid, done, cordic_done;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic [15:0] chain_out;
  logic cordic_start = 0;
  logic [31:0] cx, cy, cz;

  int checks = 0, failures = 0;
  int n_load = 0, n_reuse = 0, n_exact = 0, n_err_run = 0, n_switch = 0, n_cordic = 0;
  logic [W-1:0] opa [NOPS], opb [NOPS];

  flint_top dut (
    .clk_ref(clk), .rst, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata,
    .bus_rvalid, .done, .chain_out,
    .cordic_start, .cordic_vectoring(1'b0), .cordic_hyperbolic(1'b0),
    .cordic_x_i(32'(longint'(0.6072529350088813 * (2.0 ** 29)))),
    .cordic_y_i(32'd0),
    .cordic_z_i(32'(longint'(0.5235987755982988 * (2.0 ** 29)))),
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

  // Parameter stream: cells from the end of the chain backwards (result
  // registers, gates, operand registers), each cell's words in index order.
  task automatic write_params(input int pin, pg, pout, marker);
    for (int k = 0; k < NW; k++) begin
      int v;
      if (k == 0)                          v = marker;
      else if (k < 3 * (W + 1))            v = pout;
      else if (k < 3 * (W + 1) + 8 * NG)   v = pg;
      else                                 v = pin;
      bwr(PARAM_REGION, k, 32'(v));
    end
  endtask

  // Start a run, wait for done, return the number of wrong sums.
  task automatic run(input bit load, input int period, output int errs);
    logic [31:0] d;
    int n = 0;
    bwr(REG_REGION, REG_SYS_PERIOD, 32'(period));
    bwr(REG_REGION, REG_CTRL, {30'd0, load, 1'b1});
    do begin
      brd(REG_REGION, REG_STATUS, d);
      n++;
    end while (d[0] != 1'b1 && n < 100000);
    check(d[0] && done, "run finished with done flag");
    brd(REG_REGION, REG_OP_COUNT, d);
    check(d == NOPS, $sformatf("operation count %0d", d));
    errs = 0;
    for (int k = 0; k < NOPS; k++) begin
      brd(RESULT_REGION, k, d);
      if (d[W:0] != {1'b0, opa[k]} + {1'b0, opb[k]}) errs++;
    end
    if (load) n_load++; else n_reuse++;
    if (errs == 0) n_exact++; else n_err_run++;
    $display("run: load=%0b period=%0d errors=%0d of %0d", load, period, errs, NOPS);
  endtask

  initial begin
    int errs;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < NOPS; k++) begin
      opa[k] = W'($urandom); opb[k] = W'($urandom);
      bwr(OPA_REGION, k, 32'(opa[k]));
      bwr(OPB_REGION, k, 32'(opb[k]));
    end
    bwr(REG_REGION, REG_NUM_PARAMS, NW);
    bwr(REG_REGION, REG_NUM_OPS, NOPS);
    bwr(REG_REGION, REG_LOAD_DIV, 3);

    // 1. slow corner, long period
    write_params(15, 40, 20, 21);
    brd(PARAM_REGION, NW - 1, d);
    check(d == 15, "parameter memory read-back");
    run(1'b1, 3000, errs);
    check(errs == 0, "slow corner, long period: exact");
    check(chain_out == 16'd21, "chain end holds the first word: chain length");
    // 2. same parameters, period below the critical path
    run(1'b0, 320, errs);
    check(errs > 0, "slow corner, short period: timing errors");
    // 3. fast corner at the same period
    write_params(0, 0, 0, 0);
    run(1'b1, 320, errs);
    check(errs == 0, "fast corner, same period: exact");
    n_switch++;

    // CORDIC: sin(30 deg)
    @(posedge clk) cordic_start <= 1;
    @(posedge clk) cordic_start <= 0;
    wait (cordic_done);
    #1 check($signed(cy) > $signed(32'(longint'(0.4999 * 2.0 ** 29))) &&
             $signed(cy) < $signed(32'(longint'(0.5001 * 2.0 ** 29))), "CORDIC sin(30 deg)");
    n_cordic++;

    check(n_load > 0, "mechanism: parameter load");
    check(n_reuse > 0, "mechanism: run reusing loaded parameters");
    check(n_exact > 0, "mechanism: error-free run");
    check(n_err_run > 0, "mechanism: run with timing errors");
    check(n_switch > 0, "mechanism: timing corner switch");
    check(n_cordic > 0, "mechanism: CORDIC operation");
    $display("mechanisms: load %0d reuse %0d exact %0d errors %0d switch %0d cordic %0d",
             n_load, n_reuse, n_exact, n_err_run, n_switch, n_cordic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
