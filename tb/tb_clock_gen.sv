// Testbench for clock_gen: checks the spacing of the quantized system clock
// pulses (first pulse sys_period cycles after run rises, then every
// sys_period cycles, none while run is low) and of the load clock pulses.
module tb_clock_gen;
  logic clk = 0, rst = 1, run = 0, sys, ld;
  logic [31:0] period = 7;
  logic [15:0] div = 3;
  int checks = 0, failures = 0;

  clock_gen dut (.clk_ref(clk), .rst, .run, .sys_period(period), .load_div(div),
                 .sys_clk_ff(sys), .clk_load_en(ld));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Count cycles from now until the next sys pulse.
  task automatic gap_sys(input int want, input string what);
    int n = 0;
    do begin @(posedge clk); n++; #1; end while (!sys && n < 1000);
    check(n == want, $sformatf("%s: %0d cycles, expected %0d", what, n, want));
  endtask

  initial begin
    int nl, last, gaps_ok;
    repeat (3) @(posedge clk);
    rst <= 0;
    // no pulses while run is low
    begin
      int ns = 0;
      repeat (50) begin @(posedge clk); #1; if (sys) ns++; end
      check(ns == 0, "no system clock while idle");
    end
    // load clock: every 3 cycles
    last = -1; gaps_ok = 1; nl = 0;
    for (int c = 0; c < 60; c++) begin
      @(posedge clk); #1;
      if (ld) begin
        if (last >= 0 && c - last != 3) gaps_ok = 0;
        last = c; nl++;
      end
    end
    check(gaps_ok == 1 && nl == 20, $sformatf("load clock every 3 cycles (%0d pulses)", nl));
    @(posedge clk) run <= 1;
    gap_sys(7, "first pulse");
    for (int k = 0; k < 5; k++) gap_sys(7, "period 7");
    @(posedge clk) begin period <= 13; run <= 0; end
    @(posedge clk) run <= 1;
    gap_sys(13, "first pulse, period 13");
    gap_sys(13, "period 13");
    period <= 1;
    repeat (3) @(posedge clk);
    gap_sys(1, "period 1");
    gap_sys(1, "period 1 again");
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
