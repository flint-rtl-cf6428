// Testbench for cordic_unit at the default 32-bit format. An exact instance
// (ripple-carry adders) is checked against real-number references for the
// three case-study functions: sine (rotation, circular) for 1..90 degrees,
// square root (vectoring, hyperbolic) for 0.05..0.74 and exponential
// (rotation, hyperbolic) for -pi/4..pi/4 in steps of 0.01. A second instance
// with ETA8-1 adders for X, Y and Z runs the same sine arguments: its results
// must stay close but differ from the exact ones at least once. The latency
// from start to done must be ITER cycles.
module tb_cordic_unit;
  localparam int W = 32, FRAC = 29, ITER = 32;
  logic clk = 0, rst = 1, start = 0, vec = 0, hyp = 0;
  logic [W-1:0] xi, yi, zi, xo, yo, zo, xa, ya, za;
  logic done, done_a;
  int checks = 0, failures = 0;
  real kc, kh;

  cordic_unit #(.W(W), .FRAC(FRAC), .ITER(ITER)) u_exact (
    .clk, .rst, .start, .vectoring(vec), .hyperbolic(hyp), .x_i(xi), .y_i(yi),
    .z_i(zi), .x_o(xo), .y_o(yo), .z_o(zo), .done);
  cordic_unit #(.W(W), .FRAC(FRAC), .ITER(ITER), .XY_BLK(8), .XY_EXT(1),
                .Z_BLK(8), .Z_EXT(1)) u_eta (
    .clk, .rst, .start, .vectoring(vec), .hyperbolic(hyp), .x_i(xi), .y_i(yi),
    .z_i(zi), .x_o(xa), .y_o(ya), .z_o(za), .done(done_a));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] fx(input real v);
    return W'(longint'($floor(v * (2.0 ** FRAC) + 0.5)));
  endfunction
  function automatic real rl(input logic [W-1:0] v);
    return real'(longint'($signed(v))) / (2.0 ** FRAC);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit v, h, input real x, y, z);
    int n = 0;
    @(posedge clk) begin
      vec <= v; hyp <= h; xi <= fx(x); yi <= fx(y); zi <= fx(z); start <= 1;
    end
    @(posedge clk) start <= 0;
    n = 0;
    #1;
    while (!done && n < 200) begin @(posedge clk); n++; #1; end
    check(n == ITER, $sformatf("latency %0d cycles, expected %0d", n, ITER));
  endtask

  initial begin
    real e, maxe_sin, maxe_sqrt, maxe_exp, maxe_eta;
    int diff_eta;
    int sh, rep;
    // gains of the iteration schedules
    kc = 1.0;
    for (int i = 0; i < ITER; i++) kc = kc * $sqrt(1.0 + 2.0 ** (-2 * i));
    kh = 1.0; sh = 1; rep = 0;
    for (int k = 0; k < ITER; k++) begin
      kh = kh * $sqrt(1.0 - 2.0 ** (-2 * sh));
      if (!rep && (sh == 4 || sh == 13 || sh == 40)) rep = 1;
      else begin rep = 0; sh++; end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    maxe_sin = 0; maxe_eta = 0; diff_eta = 0;
    for (int d = 1; d <= 90; d++) begin
      real th;
      th = d * 3.14159265358979 / 180.0;
      run(0, 0, 1.0 / kc, 0.0, th);
      e = fabs(rl(yo) - $sin(th));
      if (e > maxe_sin) maxe_sin = e;
      check(e < 1e-6, $sformatf("sin(%0d deg) = %f", d, rl(yo)));
      check(fabs(rl(xo) - $cos(th)) < 1e-6, $sformatf("cos(%0d deg)", d));
      e = fabs(rl(ya) - $sin(th));
      if (e > maxe_eta) maxe_eta = e;
      if (ya != yo) diff_eta++;
      check(e < 1e-2, $sformatf("ETA8-1 sin(%0d deg) = %f", d, rl(ya)));
    end
    check(diff_eta > 0, "approximate adders change some results");
    maxe_sqrt = 0;
    for (int k = 5; k <= 74; k++) begin
      real v;
      v = k / 100.0;
      run(1, 1, v + 0.25, v - 0.25, 0.0);
      e = fabs(rl(xo) / kh - $sqrt(v));
      if (e > maxe_sqrt) maxe_sqrt = e;
      check(e < 1e-5, $sformatf("sqrt(%f) = %f", v, rl(xo) / kh));
    end
    maxe_exp = 0;
    for (int k = -78; k <= 78; k++) begin
      real z;
      z = k / 100.0;
      run(0, 1, 1.0 / kh, 0.0, z);
      e = fabs(rl(xo) + rl(yo) - $exp(z));
      if (e > maxe_exp) maxe_exp = e;
      check(e < 1e-5, $sformatf("exp(%f) = %f", z, rl(xo) + rl(yo)));
    end
    $display("max errors: sin %e sqrt %e exp %e, ETA8-1 sin %e (%0d differ)",
             maxe_sin, maxe_sqrt, maxe_exp, maxe_eta, diff_eta);
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
