// Testbench for div_netlist at WIDTH = 4 (divisor never 0). The test
//   * loads the configuration chain (3 words per flip-flop, 8 per gate) and
//     checks its length with a marker word that must reach the chain output
//     exactly with the last shift;
//   * runs random divisions at a long system period, where every
//     quotient must be exact, and checks the latency: operand k enters at
//     system pulse k, its quotient is captured at pulse k+1;
//   * runs them at a period well below the emulated critical path, where
//     timing errors must appear;
//   * reloads all-zero parameters (the fast corner) and checks that the same
//     short period is then error free: a new timing corner by reloading only.
module tb_div_netlist;
  localparam int W = 4, DW = 16;
  localparam int NR = 6 * W + 6;                   // gates per row
  localparam int NFF = 3 * W;
  localparam int NGW = W * (8 * (NR - 1) + 4);     // INV cells have 4 words
  localparam int NW = 3 * NFF + NGW;
  localparam int PIN = 15, PG = 20, POUT = 20;
  localparam int TS = 500;   // short period: below the slow corner, above the fast one

  logic clk = 0, rst = 1, sys = 0, clk_load_en = 0, load_en = 0;
  logic [DW-1:0] load_in = '0, load_out;
  logic [W-1:0] op_a = '0, op_b = '0;
  logic [W-1:0] res;
  int checks = 0, failures = 0;

  div_netlist #(.WIDTH(W), .DELAY_W(DW)) u_dut (
    .clk_ref(clk), .rst, .sys_clk_ff(sys), .rn(1'b1), .clk_load_en, .load_en,
    .load_in, .load_out, .op_a, .op_b, .result(res));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Word k of the stream: cells from the end of the chain backwards.
  function automatic int word(input int k, input bit slow);
    int nout = 3 * W, ngw = NGW;
    if (!slow)          return (k == 0) ? 1 : 0;
    if (k == 0)         return POUT + 1;        // marker
    if (k < nout)       return POUT;
    if (k < nout + ngw) return PG;
    return PIN;
  endfunction

  task automatic load(input bit slow);
    for (int k = 0; k < NW; k++) begin
      if (k == NW - 1)
        check(load_out != DW'(slow ? POUT + 1 : 1), "chain not yet full");
      @(posedge clk) begin
        load_in <= DW'(word(k, slow));
        clk_load_en <= 1;
        load_en <= 1;
      end
      @(posedge clk) clk_load_en <= 0;
    end
    load_en <= 0;
    @(posedge clk);
    #1 check(load_out == DW'(slow ? POUT + 1 : 1), "chain length 3*FF + 8*gates");
  endtask

  task automatic pulse_after(input int T);
    repeat (T - 1) @(posedge clk);
    sys <= 1;
    @(posedge clk) sys <= 0;
  endtask

  // Random divisions at system period T; returns the number of wrong ones.
  task automatic run(input int T, input int n, output int errs);
    logic [W-1:0] exp_q [$];
    op_a <= '0; op_b <= '0;
    repeat (3) pulse_after(2000);
    errs = 0;
    for (int k = 0; k < n + 2; k++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom_range(1, 2**W - 1));
      op_a <= a; op_b <= b;
      exp_q.push_back(a / b);
      pulse_after(T);
      if (k >= 2) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        if (res != e) errs++;
      end
    end
  endtask

  initial begin
    int errs;
    repeat (3) @(posedge clk);
    rst <= 0;
    load(1'b1);
    run(3000, 30, errs);
    check(errs == 0, $sformatf("long period: %0d wrong quotients", errs));
    run(TS, 40, errs);
    check(errs > 0, "short period: timing errors emulated");
    $display("timing errors at short period: %0d of 40", errs);
    load(1'b0);
    run(TS, 40, errs);
    check(errs == 0, $sformatf("fast corner, short period: %0d wrong", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
