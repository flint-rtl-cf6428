// mul_netlist: timing-instrumented gate-level ripple-carry array multiplier,
// the second evaluation circuit that can be placed in the emulation framework.
//
// Structure (register to register): operand registers a_reg/b_reg, an array
// of WIDTH x WIDTH partial-product AND2 cells, WIDTH-1 rows of ripple-carry
// adders and result registers for the 2*WIDTH product bits.
//   row 0:  acc0 = {0, pp[0]}                         pp[r][j] = a[j] & b[r]
//   row r:  acc_r = (acc_{r-1} >> 1) + pp[r]          (WIDTH+1 bits)
//   product bit r = acc_r[0] for r < WIDTH-1, bits 2W-1..W-1 = acc_{W-1}.
// Each adder row is built like rca_netlist: bit 0 a half adder (XOR2, AND2),
// every other bit a full adder of five 2-input cells
//   x = XOR2(u, v)  s = XOR2(x, c)  g = AND2(u, v)  p = AND2(x, c)  c' = OR2(g, p)
// so the carry ripples along each row and the partial sums ripple down the
// rows: the critical path runs diagonally through the array.
//
// Gate index: AND cell of pp[r][j] is r*WIDTH + j. Adder row r (1..W-1)
// starts at NPP + (r-1)*NR with NR = 5*WIDTH-3; inside a row the numbering is
// that of rca_netlist (0 XOR, 1 AND for bit 0; 2+5*(i-1)+{x,s,g,p,c'} for bit
// i). Every gate is instrumented (8 parameters), every flip-flop has 3.
//
// Configuration chain order (load_in side first): a_reg[0..W-1],
// b_reg[0..W-1], gates 0..NG-1, product registers p_reg[0..2W-1]. As for the
// adder, the stream lists cells from the end of the chain backwards.
//
// The document evaluates a ripple-carry array multiplier synthesised to a
// standard-cell netlist without giving its structure; this row-by-row array
// of 2-input cells is this design's own.
module mul_netlist #(
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
  output logic [2*WIDTH-1:0] result
);

  localparam int unsigned NPP   = WIDTH * WIDTH;
  localparam int unsigned NR    = 5 * WIDTH - 3;
  localparam int unsigned NG    = NPP + (WIDTH - 1) * NR;
  localparam int unsigned NCELL = 2 * WIDTH + NG + 2 * WIDTH;

  logic [NCELL:0][DELAY_W-1:0] chain;
  logic [WIDTH-1:0] a_q, b_q;
  logic [NG-1:0]      gq;      // gate outputs by gate index
  logic [NG-1:0][1:0] gin;     // gate inputs by gate index
  logic [2*WIDTH-1:0] prod;    // combinational product

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

  // Partial products.
  for (genvar r = 0; r < WIDTH; r++) begin : g_pp_r
    for (genvar j = 0; j < WIDTH; j++) begin : g_pp_c
      assign gin[r*WIDTH+j] = {b_q[r], a_q[j]};
    end
  end

  // acc[r][k]: bit k of the row-r accumulator (WIDTH+1 bits).
  logic [WIDTH-1:0][WIDTH:0] acc;
  for (genvar j = 0; j < WIDTH; j++) begin : g_acc0
    assign acc[0][j] = gq[j];
  end
  assign acc[0][WIDTH] = 1'b0;

  for (genvar r = 1; r < WIDTH; r++) begin : g_row
    localparam int unsigned B = NPP + (r - 1) * NR;
    logic [WIDTH-1:0] u, v;
    logic [WIDTH:0]   carry;     // carry[i]: carry into bit i of this row
    assign u = acc[r-1][WIDTH:1];
    for (genvar j = 0; j < WIDTH; j++) begin : g_v
      assign v[j] = gq[r*WIDTH+j];
    end
    assign gin[B]   = {v[0], u[0]};              // sum bit 0
    assign gin[B+1] = {v[0], u[0]};              // carry of bit 0
    assign carry[0] = 1'b0;
    assign carry[1] = gq[B+1];
    assign acc[r][0] = gq[B];
    for (genvar i = 1; i < WIDTH; i++) begin : g_fa
      localparam int unsigned K = B + 2 + 5 * (i - 1);
      assign gin[K]     = {v[i], u[i]};          // x = u ^ v
      assign gin[K+1]   = {carry[i], gq[K]};     // s = x ^ c
      assign gin[K+2]   = {v[i], u[i]};          // g = u & v
      assign gin[K+3]   = {carry[i], gq[K]};     // p = x & c
      assign gin[K+4]   = {gq[K+3], gq[K+2]};    // c' = g | p
      assign carry[i+1] = gq[K+4];
      assign acc[r][i]  = gq[K+1];
    end
    assign acc[r][WIDTH] = carry[WIDTH];
  end

  for (genvar g = 0; g < NG; g++) begin : g_gate
    localparam int unsigned RG  = (g < NPP) ? 0 : (g - NPP) % NR;
    localparam int unsigned POS = (g < NPP) ? 2 :
                                  (RG < 2) ? ((RG == 0) ? 0 : 2) : (RG - 2) % 5;
    localparam logic [3:0] TT = (POS == 0 || POS == 1) ? 4'b0110 :   // XOR2
                                (POS == 2 || POS == 3) ? 4'b1000 :   // AND2
                                                         4'b1110;    // OR2
    instr_comb_cell #(.N_IN(2), .TRUTH(TT), .DELAY_W(DELAY_W)) u_g (
      .clk_ref, .rst, .clk_load_en, .load_en,
      .load_in(chain[2*WIDTH+g]), .load_out(chain[2*WIDTH+g+1]),
      .a(gin[g]), .q(gq[g]));
  end

  for (genvar r = 0; r < WIDTH - 1; r++) begin : g_plo
    assign prod[r] = acc[r][0];
  end
  assign prod[2*WIDTH-1:WIDTH-1] = acc[WIDTH-1];

  for (genvar i = 0; i < 2 * WIDTH; i++) begin : g_out
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_p (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[2*WIDTH+NG+i]), .load_out(chain[2*WIDTH+NG+i+1]),
      .d(prod[i]), .rn, .q(result[i]));
  end

endmodule
