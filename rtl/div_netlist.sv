// div_netlist: timing-instrumented gate-level non-restoring array divider,
// the third evaluation circuit that can be placed in the emulation framework.
// It divides the WIDTH-bit dividend op_a by the WIDTH-bit divisor op_b and
// registers the WIDTH-bit quotient (op_b = 0 gives the array's own result).
//
// Algorithm: a (WIDTH+1)-bit two's complement partial remainder R starts at 0.
// Row r (r = 0..WIDTH-1) takes dividend bit i = WIDTH-1-r:
//   S   = {R[WIDTH-1:0], a[i]}                  (shift in the next bit)
//   R   = S - b if the previous R was >= 0 (always in row 0), else S + b
//   q[i] = NOT R[WIDTH]                         (1 when R >= 0)
// The add/subtract is a ripple-carry adder over WIDTH+1 bits. Its second
// operand is t_j = XNOR(b_j, sgn) with sgn the previous sign (t = ~b for a
// subtraction, b for an addition); the top bit of t and the carry in both
// equal the previous quotient bit, 1 in row 0. So each row is
//   WIDTH XNOR2 cells, WIDTH+1 full adders of five 2-input cells
//   (x = XOR2(s, t), sum = XOR2(x, c), g = AND2(s, t), p = AND2(x, c),
//   c' = OR2(g, p)) and one INV producing the quotient bit,
// and the sign decision of each row ripples into the next, so the critical
// path crosses all rows along their full carry chains.
//
// Gate index in row r: base = r*(6*WIDTH+6); XNOR j at base+j, full adder
// bit j at base+WIDTH+5*j+{x, sum, g, p, c'}, INV at base+6*WIDTH+5. Two-input
// cells have 8 delay parameters, the INV 4, flip-flops 3. Configuration chain
// order (load_in side first): a_reg[0..W-1], b_reg[0..W-1], gates by index,
// quotient registers q_reg[0..W-1]; the stream lists cells from the end of
// the chain backwards.
//
// The document evaluates a non-restoring array divider synthesised to a
// standard-cell netlist without giving its structure; this cell array is
// this design's own.
module div_netlist #(
  parameter int unsigned  WIDTH   = 16,
  parameter int unsigned  DELAY_W = flint_pkg::DELAY_W_DEF
) (
  input  logic               clk_ref,
  input  logic               rst,
  input  logic               sys_clk_ff,
  input  logic               rn,
  input  logic               clk_load_en,
  input  logic               load_en,
  input  logic [DELAY_W-1:0] load_in,
  output logic [DELAY_W-1:0] load_out,
  input  logic [WIDTH-1:0]   op_a,
  input  logic [WIDTH-1:0]   op_b,
  output logic [WIDTH-1:0]   result
);

  localparam int unsigned NR    = 6 * WIDTH + 6;   // gates per row
  localparam int unsigned NG    = WIDTH * NR;
  localparam int unsigned NCELL = 3 * WIDTH + NG;

  logic [NCELL:0][DELAY_W-1:0] chain;
  logic [WIDTH-1:0] a_q, b_q;
  logic [NG-1:0]      gq;      // gate outputs by gate index
  logic [NG-1:0][1:0] gin;     // gate inputs by gate index (INV uses bit 0)
  logic [WIDTH-1:0]   quo;     // combinational quotient

  assign chain[0] = load_in;
  assign load_out = chain[NCELL];

  for (genvar i = 0; i < WIDTH; i++) begin : g_in
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_a (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[i]), .load_out(chain[i+1]), .d(op_a[i]), .rn, .q(a_q[i]));
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_b (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[WIDTH+i]), .load_out(chain[WIDTH+i+1]), .d(op_b[i]), .rn,
      .q(b_q[i]));
  end

  // rem[r]: partial remainder after row r; qb[r]: quotient bit of row r.
  logic [WIDTH-1:0][WIDTH:0] rem;
  logic [WIDTH-1:0]          qb;

  for (genvar r = 0; r < WIDTH; r++) begin : g_row
    localparam int unsigned B = r * NR;
    logic [WIDTH:0] s, t;
    logic [WIDTH+1:0] carry;
    logic sgn, qin;
    if (r == 0) begin : g_first
      assign s   = {{WIDTH{1'b0}}, a_q[WIDTH-1]};
      assign sgn = 1'b0;
      assign qin = 1'b1;
    end else begin : g_next
      assign s   = {rem[r-1][WIDTH-1:0], a_q[WIDTH-1-r]};
      assign sgn = rem[r-1][WIDTH];
      assign qin = qb[r-1];
    end
    for (genvar j = 0; j < WIDTH; j++) begin : g_t
      assign gin[B+j] = {sgn, b_q[j]};
      assign t[j]     = gq[B+j];
    end
    assign t[WIDTH]  = qin;
    assign carry[0]  = qin;
    for (genvar j = 0; j <= WIDTH; j++) begin : g_fa
      localparam int unsigned K = B + WIDTH + 5 * j;
      assign gin[K]       = {t[j], s[j]};          // x = s ^ t
      assign gin[K+1]     = {carry[j], gq[K]};     // sum = x ^ c
      assign gin[K+2]     = {t[j], s[j]};          // g = s & t
      assign gin[K+3]     = {carry[j], gq[K]};     // p = x & c
      assign gin[K+4]     = {gq[K+3], gq[K+2]};    // c' = g | p
      assign carry[j+1]   = gq[K+4];
      assign rem[r][j]    = gq[K+1];
    end
    assign gin[B+NR-1] = {1'b0, rem[r][WIDTH]};    // quotient bit = NOT sign
    assign qb[r]       = gq[B+NR-1];
    assign quo[WIDTH-1-r] = qb[r];
  end

  for (genvar g = 0; g < NG; g++) begin : g_gate
    localparam int unsigned RG = g % NR;
    localparam int unsigned FP = (RG >= WIDTH) ? (RG - WIDTH) % 5 : 0;
    if (RG == NR - 1) begin : g_inv
      instr_comb_cell #(.N_IN(1), .TRUTH(2'b01), .DELAY_W(DELAY_W)) u_g (
        .clk_ref, .rst, .clk_load_en, .load_en,
        .load_in(chain[2*WIDTH+g]), .load_out(chain[2*WIDTH+g+1]),
        .a(gin[g][0]), .q(gq[g]));
    end else begin : g_2in
      localparam logic [3:0] TT = (RG < WIDTH)          ? 4'b1001 :   // XNOR2
                                  (FP == 0 || FP == 1)  ? 4'b0110 :   // XOR2
                                  (FP == 2 || FP == 3)  ? 4'b1000 :   // AND2
                                                          4'b1110;    // OR2
      instr_comb_cell #(.N_IN(2), .TRUTH(TT), .DELAY_W(DELAY_W)) u_g (
        .clk_ref, .rst, .clk_load_en, .load_en,
        .load_in(chain[2*WIDTH+g]), .load_out(chain[2*WIDTH+g+1]),
        .a(gin[g]), .q(gq[g]));
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_out
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_q (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[2*WIDTH+NG+i]), .load_out(chain[2*WIDTH+NG+i+1]),
      .d(quo[i]), .rn, .q(result[i]));
  end

endmodule
