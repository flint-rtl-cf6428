// Testbench for eta2m_adder. Five instances (ETA8-1, ETA8-0, ETA4-1, ETA4-2
// and the exact block size 0) are compared on random and hand-picked operands
// with a reference written here with integer arithmetic: the carry into the
// sum generator of block k is the carry out of the plain sum of the bits of
// blocks lo..k-1, where lo is the start of the carry generator chain feeding
// it. Also checks that approximation errors do occur for ETA and never for
// block size 0.
module tb_eta2m_adder;
  localparam int W = 32;
  localparam int NCFG = 5;
  localparam int BLKS [NCFG] = '{8, 8, 4, 4, 0};
  localparam int EXTS [NCFG] = '{1, 0, 1, 2, 0};
  logic [W-1:0] a, b;
  logic cin;
  logic [W-1:0] s [NCFG];
  logic cout [NCFG];
  int checks = 0, failures = 0;
  int approx_err [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_dut
    eta2m_adder #(.W(W), .BLK(BLKS[c]), .EXT(EXTS[c])) u (
      .a, .b, .cin, .s(s[c]), .cout(cout[c]));
  end

  function automatic logic [W:0] ref_add(input logic [W-1:0] x, y,
                                         input logic ci, input int blk, ext);
    int bs = (blk == 0) ? W : blk;
    int nb = W / bs;
    logic [W:0] r = '0;
    for (int k = 0; k < nb; k++) begin
      logic c;
      logic [63:0] part;
      if (k == 0) c = ci;
      else begin
        // carry generator k-1 and the chain below it
        int g = k - 1, lo;
        int k0 = (nb - 1 - ext > 1) ? nb - 1 - ext : 1;
        lo = (g >= k0) ? k0 - 1 : g;
        begin
          logic [63:0] xs, ys, sum;
          int nbits = (g - lo + 1) * bs;
          xs = 64'(x >> (lo * bs)) & ((64'd1 << nbits) - 1);
          ys = 64'(y >> (lo * bs)) & ((64'd1 << nbits) - 1);
          sum = xs + ys + ((lo == 0) ? 64'(ci) : 64'd0);
          c = sum[nbits];
        end
      end
      part = 64'((x >> (k * bs)) & ((64'd1 << bs) - 1)) +
             64'((y >> (k * bs)) & ((64'd1 << bs) - 1)) + 64'(c);
      for (int j = 0; j < bs; j++) r[k * bs + j] = part[j];
      if (k == nb - 1) r[W] = part[bs];
    end
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] x, y, input logic ci);
    a = x; b = y; cin = ci;
    #1;
    for (int c = 0; c < NCFG; c++) begin
      logic [W:0] e;
      e = ref_add(x, y, ci, BLKS[c], EXTS[c]);
      checks++;
      if ({cout[c], s[c]} != e) begin
        failures++;
        $display("FAIL: cfg %0d %h + %h + %0d = %h, expected %h", c, x, y, ci,
                 {cout[c], s[c]}, e);
      end
      if ({cout[c], s[c]} != {1'b0, x} + {1'b0, y} + (W + 1)'(ci)) approx_err[c]++;
    end
  endtask

  initial begin
    for (int c = 0; c < NCFG; c++) approx_err[c] = 0;
    apply(32'h0000_FFFF, 32'h0000_0001, 1'b0);   // carry across two blocks
    apply(32'h00FF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'h1234_5678, ~32'h1234_5678, 1'b1);  // x - x
    for (int i = 0; i < 2000; i++)
      apply($urandom, $urandom, 1'($urandom));
    checks++;
    if (approx_err[4] != 0) begin failures++; $display("FAIL: exact adder erred"); end
    checks++;
    if (approx_err[1] == 0 || approx_err[3] == 0) begin
      failures++; $display("FAIL: no approximation error seen");
    end
    $display("approximation errors per config: %0d %0d %0d %0d %0d", approx_err[0],
             approx_err[1], approx_err[2], approx_err[3], approx_err[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
