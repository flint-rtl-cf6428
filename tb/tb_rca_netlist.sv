// Testbench for rca_netlist at WIDTH = 4. Two netlists share the operands and
// the quantized system clock: u_full with every gate instrumented and u_part
// with no gate instrumented (only its flip-flops), as a partial
// instrumentation would leave gates of short paths. The test
//   * loads both configuration chains and checks their lengths (3 words per
//     flip-flop, 8 per instrumented gate) at the chain outputs;
//   * times the path a_reg[0] -> XOR -> sum[0]: with a system period one
//     cycle below Pin + Pg + 19 the output register still captures the old
//     sum (a timing error), with exactly that period the new one; for u_part
//     the gate adds no delay and the limit is Pin + 10;
//   * runs random additions at a long period (all exact) and at a short
//     period (errors must appear: the emulated critical path is violated).
module tb_rca_netlist;
  localparam int W = 4, DW = 16;
  localparam int NG = 5 * W - 3;
  localparam int NFF = 3 * W + 1;
  localparam int PIN = 15, PG = 10, POUT = 20;
  localparam int NW_FULL = 3 * NFF + 8 * NG;
  localparam int NW_PART = 3 * NFF;

  logic clk = 0, rst = 1, sys = 0, clk_load_en = 0, le_full = 0, le_part = 0;
  logic [DW-1:0] load_in = '0, out_full, out_part;
  logic [W-1:0] op_a = '0, op_b = '0;
  logic [W:0] res_full, res_part;
  int checks = 0, failures = 0;

  rca_netlist #(.WIDTH(W), .DELAY_W(DW)) u_full (
    .clk_ref(clk), .rst, .sys_clk_ff(sys), .rn(1'b1), .clk_load_en,
    .load_en(le_full), .load_in, .load_out(out_full), .op_a, .op_b,
    .result(res_full));
  rca_netlist #(.WIDTH(W), .DELAY_W(DW), .GATE_INSTR('0)) u_part (
    .clk_ref(clk), .rst, .sys_clk_ff(sys), .rn(1'b1), .clk_load_en,
    .load_en(le_part), .load_in, .load_out(out_part), .op_a, .op_b,
    .result(res_part));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Word k of the stream for a chain of NW words: cells from the end of the
  // chain backwards (output registers, gates, operand registers).
  function automatic int word(input int k, input bit full);
    int nout = 3 * (W + 1), ngw = full ? 8 * NG : 0;
    if (k == 0)          return POUT + 1;      // marker: last cell, param 0
    if (k < nout)        return POUT;
    if (k < nout + ngw)  return PG;
    return PIN;
  endfunction

  task automatic load(input bit full);
    int nw = full ? NW_FULL : NW_PART;
    for (int k = 0; k < nw; k++) begin
      if (k == nw - 1)
        check((full ? out_full : out_part) != DW'(POUT + 1), "chain not yet full");
      @(posedge clk) begin
        load_in <= DW'(word(k, full));
        clk_load_en <= 1;
        if (full) le_full <= 1; else le_part <= 1;
      end
      @(posedge clk) clk_load_en <= 0;
    end
    le_full <= 0; le_part <= 0;
    @(posedge clk);
  endtask

  // Next system clock pulse is sampled T reference edges after the last one.
  task automatic pulse_after(input int T);
    repeat (T - 1) @(posedge clk);
    sys <= 1;
    @(posedge clk) sys <= 0;
  endtask

  task automatic settle_zero();
    op_a <= '0; op_b <= '0;
    repeat (3) pulse_after(600);
  endtask

  initial begin
    int errs;
    logic [W:0] exp_q [$];
    repeat (3) @(posedge clk);
    rst <= 0;
    load(1'b1);
    #1 check(out_full == DW'(POUT + 1), "full chain length 3*FF + 8*gates");
    load(1'b0);
    #1 check(out_part == DW'(POUT + 1), "partial chain length 3*FF");

    // Path timing of sum bit 0.
    settle_zero();
    op_a <= 4'd1;
    pulse_after(600);                       // operand enters at this pulse
    pulse_after(PIN + PG + 18);             // one cycle too early for u_full
    repeat (POUT + 12) @(posedge clk); #1;
    check(res_full == 0, "u_full: too-short period captures the old sum");
    check(res_part == 1, "u_part: gate not instrumented, sum in time");
    settle_zero();
    op_a <= 4'd1;
    pulse_after(600);
    pulse_after(PIN + PG + 19);             // just enough
    repeat (POUT + 12) @(posedge clk); #1;
    check(res_full == 1, "u_full: period Pin+Pg+19 captures the new sum");
    settle_zero();
    op_a <= 4'd1;
    pulse_after(600);
    pulse_after(PIN + 9);
    repeat (POUT + 12) @(posedge clk); #1;
    check(res_part == 0, "u_part: period Pin+9 too short");
    settle_zero();
    op_a <= 4'd1;
    pulse_after(600);
    pulse_after(PIN + 10);
    repeat (POUT + 12) @(posedge clk); #1;
    check(res_part == 1, "u_part: period Pin+10 enough");

    // Long period: every result exact. Operand k enters at pulse k, its sum
    // is captured at pulse k+1 and read right at pulse k+2 (the output
    // register's new value shows only later).
    settle_zero();
    for (int k = 0; k < 32; k++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom);
      op_a <= a; op_b <= b;
      exp_q.push_back({1'b0, a} + {1'b0, b});
      pulse_after(600);
      if (k >= 2) begin
        logic [W:0] e;
        e = exp_q.pop_front();
        check(res_full == e && res_part == e,
              $sformatf("long period: %0d / %0d, expected %0d", res_full, res_part, e));
      end
    end
    exp_q.delete();

    // Short period: the carry chain cannot finish, errors must appear in
    // u_full (whose gates are slow) while u_part stays exact.
    settle_zero();
    errs = 0;
    for (int k = 0; k < 64; k++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom);
      op_a <= a; op_b <= b;
      exp_q.push_back({1'b0, a} + {1'b0, b});
      pulse_after(PIN + PG + 40);
      if (k >= 2) begin
        logic [W:0] e;
        e = exp_q.pop_front();
        if (res_full != e) errs++;
        check(res_part == e, "short period: partial netlist exact");
      end
    end
    check(errs > 0, "short period: timing errors emulated");
    $display("timing errors at short period: %0d of 62", errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
