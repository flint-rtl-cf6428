// cordic_rom: rotation angle table of the CORDIC unit.
//
// Entry i holds atan(2^-i) (circular mode) or atanh(2^-i) (hyperbolic mode,
// entry 0 unused and 0), as signed fixed point with FRAC fraction bits,
// rounded to nearest. The table is computed at elaboration from these
// formulas. Read is combinational.
module cordic_rom #(
  parameter int unsigned W     = 32,
  parameter int unsigned FRAC  = 29,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          hyperbolic,
  input  logic [AW-1:0] idx,
  output logic [W-1:0]  angle
);

  typedef logic [DEPTH-1:0][W-1:0] tab_t;

  function automatic tab_t gen_tab(input bit hyp);
    tab_t t;
    for (int i = 0; i < DEPTH; i++) begin
      real x, v;
      x = 2.0 ** (-i);
      if (hyp) v = (i == 0) ? 0.0 : $atanh(x);
      else     v = $atan(x);
      t[i] = W'(longint'(v * (2.0 ** FRAC) + 0.5));
    end
    return t;
  endfunction

  localparam tab_t ATAN_TAB  = gen_tab(1'b0);
  localparam tab_t ATANH_TAB = gen_tab(1'b1);

  assign angle = hyperbolic ? ATANH_TAB[idx] : ATAN_TAB[idx];

endmodule
