// Testbench for instr_comb_cell (2-input AND). Loads eight distinct delay
// parameters through the configuration chain, then applies input transitions
// and checks, for each, the output level and that the output changes exactly
// P + 9 reference cycles after the input, with P the parameter the SDF-style
// index (input, input edge, output edge) selects. Also checks the chain output
// and that an input change that leaves the AND output alone causes no change.
// Two timing rules of the counter are checked as well: a running count is not
// restarted by a later input change that keeps the pending output value (the
// output still moves P + 9 cycles after the first change), and an input pulse
// shorter than the delay never reaches the output.
module tb_instr_comb_cell;
  localparam int DW = 16;
  logic clk = 0, rst = 1, clk_load_en = 0, load_en = 0;
  logic [DW-1:0] load_in = '0, load_out;
  logic [1:0] a = '0;
  logic q;
  int checks = 0, failures = 0;
  int unsigned par [8];

  instr_comb_cell #(.N_IN(2), .TRUTH(4'b1000), .DELAY_W(DW)) dut (
    .clk_ref(clk), .rst, .clk_load_en, .load_en, .load_in, .load_out, .a, .q);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply a new input vector and measure the delay to the expected output.
  task automatic step(input logic [1:0] v, input int pidx);
    int n;
    logic exp;
    exp = &v;
    @(posedge clk) a <= v;
    n = 0;
    do begin
      @(posedge clk); n++; #1;
    end while (q != exp && n < 1000);
    check(q == exp, $sformatf("q=%0b for a=%b", q, v));
    check(n == int'(par[pidx]) + 9,
          $sformatf("a=%b: delay %0d, expected %0d (param %0d)", v, n, par[pidx] + 9, pidx));
    repeat (20) @(posedge clk);
  endtask

  initial begin
    for (int j = 0; j < 8; j++) par[j] = 5 + 7 * j;
    repeat (3) @(posedge clk);
    rst <= 0;
    // Shift the parameters in, index 0 first, one word per load pulse.
    load_en <= 1;
    for (int j = 0; j < 8; j++) begin
      @(posedge clk) begin load_in <= DW'(par[j]); clk_load_en <= 1; end
      @(posedge clk) clk_load_en <= 0;
      @(posedge clk);
    end
    load_en <= 0;
    @(posedge clk); #1;
    check(load_out == DW'(par[0]), "chain output shows the first word");
    repeat (20) @(posedge clk);

    // A rises, output stays 0: no change for a long time.
    @(posedge clk) a <= 2'b01;
    begin
      bit moved = 0;
      repeat (100) begin @(posedge clk); #1; if (q) moved = 1; end
      check(!moved, "no output transition when AND stays 0");
    end
    step(2'b11, 4);   // B rises, output rises
    step(2'b01, 7);   // B falls, output falls
    step(2'b11, 4);   // B rises
    step(2'b10, 3);   // A falls, output falls
    step(2'b11, 0);   // A rises, output rises
    step(2'b00, 3);   // both fall: A has priority
    step(2'b11, 0);   // both rise: A has priority
    step(2'b01, 7);   // B falls
    step(2'b11, 4);   // B rises
    // B falls (param 7), A falls 10 cycles later: count not restarted.
    begin
      int n = 0;
      @(posedge clk) a <= 2'b01;
      do begin
        @(posedge clk); n++; #1;
        if (n == 10) a <= 2'b00;
      end while (q != 1'b0 && n < 1000);
      check(n == int'(par[7]) + 9,
            $sformatf("no restart: delay %0d, expected %0d", n, par[7] + 9));
    end
    repeat (20) @(posedge clk);
    // 5-cycle pulse on both inputs, far shorter than the delay: swallowed.
    begin
      bit moved = 0;
      @(posedge clk) a <= 2'b11;
      repeat (5) @(posedge clk);
      a <= 2'b00;
      repeat (150) begin @(posedge clk); #1; if (q) moved = 1; end
      check(!moved, "short input pulse does not reach the output");
    end
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
