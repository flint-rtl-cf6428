// Testbench for control_fsm. Load and system clock pulses come from simple
// counters in the testbench. Checks: the chain shifts exactly num_params
// times, each time with the parameter address equal to the shift number and
// stable for at least one cycle before (memory latency); no shift without
// do_load; in the run, operand addresses per system pulse, result writes at
// pulses 2 .. num_ops+1 with addresses 0 .. num_ops-1, the done flag, busy
// and the operation count.
module tb_control_fsm;
  logic clk = 0, rst = 1, start = 0, do_load = 0;
  logic [31:0] num_params = 0, num_ops = 0, op_count;
  logic clk_load_en, load_en, run, sys_clk_ff, result_we, done, busy;
  logic [9:0] param_addr, prev_param_addr;
  logic [16:0] op_addr, result_addr;
  int checks = 0, failures = 0;
  int ldc = 0, sysc = 0;

  control_fsm #(.PAW(10), .OAW(17)) dut (.*);

  always #5 clk = ~clk;

  // load pulse every 3 cycles, system pulse every 8 cycles of run
  always_ff @(posedge clk) begin
    ldc <= (ldc == 2) ? 0 : ldc + 1;
    prev_param_addr <= param_addr;
    if (!run) sysc <= 0;
    else      sysc <= (sysc == 7) ? 0 : sysc + 1;
  end
  assign clk_load_en = (ldc == 2);
  assign sys_clk_ff  = run && (sysc == 7);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic go(input bit ld, input int np, input int no);
    int shifts = 0, pulses = 0, writes = 0, n = 0;
    bit addr_ok = 1, op_ok = 1, wr_ok = 1;
    @(posedge clk) begin do_load <= ld; num_params <= np; num_ops <= no; start <= 1; end
    @(posedge clk) start <= 0;
    #1;
    while (!done && n < 100000) begin
      if (load_en && clk_load_en) begin
        if (param_addr != 10'(shifts) || prev_param_addr != param_addr) addr_ok = 0;
        shifts++;
      end
      if (sys_clk_ff) begin
        logic [16:0] want_op;
        want_op = (pulses < no) ? 17'(pulses) : 17'(no - 1);
        if (op_addr != want_op) op_ok = 0;
        if (result_we != (pulses >= 2)) wr_ok = 0;
        if (result_we) begin
          if (result_addr != 17'(pulses - 2)) wr_ok = 0;
          writes++;
        end
        pulses++;
      end else if (result_we) wr_ok = 0;
      if (!busy) addr_ok = 0;
      @(posedge clk); #1; n++;
    end
    check(done, "done flag set");
    check(shifts == (ld ? np : 0), $sformatf("shifts %0d for %0d params", shifts, np));
    check(addr_ok, "parameter address per shift");
    check(op_ok, "operand address per pulse");
    check(wr_ok && writes == no, $sformatf("result writes %0d of %0d", writes, no));
    check(pulses == ((no == 0) ? 0 : no + 2),
          $sformatf("system pulses %0d for %0d operations", pulses, no));
    check(op_count == 32'(no), "operation count");
    repeat (5) @(posedge clk); #1;
    check(done && !busy && !run, "stays done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(!done && !busy, "idle after reset");
    go(1'b1, 37, 9);
    go(1'b0, 37, 5);
    go(1'b1, 1, 1);
    go(1'b1, 200, 0);
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
