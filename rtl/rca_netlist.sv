// rca_netlist: timing-instrumented gate-level ripple-carry adder, the
// evaluation circuit placed in the emulation framework.
//
// Structure (register to register): operand registers a_reg/b_reg, a chain of
// full adders built from 2-input cells, and result registers for the WIDTH sum
// bits and the carry out. Bit 0 is a half adder (XOR2, AND2); every other bit
// is a full adder of five cells:
//   x = XOR2(a, b)   s = XOR2(x, c)   g = AND2(a, b)   p = AND2(x, c)
//   c_next = OR2(g, p)
// All flip-flops are instrumented sequential cells (3 parameters each). A gate
// is instrumented (8 parameters) when its bit in GATE_INSTR is 1; otherwise it
// stays a zero-delay gate, which is how a partial instrumentation produced by a
// critical path selection is expressed. Gate index g for bit 0 is 0 (XOR) and
// 1 (AND); for bit i > 0 it is 2 + 5*(i-1) + {0:x, 1:s, 2:g, 3:p, 4:c_next}.
//
// Configuration chain order (load_in side first): a_reg[0..WIDTH-1],
// b_reg[0..WIDTH-1], gates 0..NG-1 that are instrumented, result registers
// s_reg[0..WIDTH] (bit WIDTH is the carry out). The word shifted in first
// ends in the last cell, so the parameter stream lists cells from the end of
// the chain backwards, each cell's parameters in index order.
//
// The gate choice and the chain order are this design's own; the document
// evaluates a ripple-carry adder synthesised to a standard-cell netlist and
// forms the chain in netlist order.
module rca_netlist #(
  parameter int unsigned              WIDTH      = 16,
  parameter int unsigned              DELAY_W    = flint_pkg::DELAY_W_DEF,
  localparam int unsigned             NG         = 5 * WIDTH - 3,
  parameter logic [5*WIDTH-4:0]       GATE_INSTR = '1
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
  output logic [WIDTH:0]     result
);

  localparam int unsigned NCELL = 2 * WIDTH + NG + WIDTH + 1;

  logic [NCELL:0][DELAY_W-1:0] chain;
  logic [WIDTH-1:0] a_q, b_q;
  logic [NG-1:0]    gq;     // gate outputs by gate index
  logic [WIDTH:0]   sum;    // combinational sum and carry out

  assign chain[0]  = load_in;
  assign load_out  = chain[NCELL];

  for (genvar i = 0; i < WIDTH; i++) begin : g_in
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_a (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[i]), .load_out(chain[i+1]), .d(op_a[i]), .rn, .q(a_q[i]));
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_b (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[WIDTH+i]), .load_out(chain[WIDTH+i+1]), .d(op_b[i]), .rn,
      .q(b_q[i]));
  end

  // Gate inputs by gate index.
  logic [NG-1:0][1:0] gin;
  logic [WIDTH:0]     carry;   // carry[i]: carry into bit i

  assign gin[0]   = {b_q[0], a_q[0]};
  assign gin[1]   = {b_q[0], a_q[0]};
  assign carry[1] = gq[1];
  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    localparam int unsigned K = 2 + 5 * (i - 1);
    assign gin[K]     = {b_q[i], a_q[i]};       // x = a ^ b
    assign gin[K+1]   = {carry[i], gq[K]};      // s = x ^ c
    assign gin[K+2]   = {b_q[i], a_q[i]};       // g = a & b
    assign gin[K+3]   = {carry[i], gq[K]};      // p = x & c
    assign gin[K+4]   = {gq[K+3], gq[K+2]};     // c_next = g | p
    assign carry[i+1] = gq[K+4];
  end
  assign carry[0] = 1'b0;

  for (genvar g = 0; g < NG; g++) begin : g_gate
    // Gate type from the position inside the (half/full) adder.
    localparam int unsigned POS = (g < 2) ? ((g == 0) ? 0 : 2) : (g - 2) % 5;
    localparam logic [3:0] TT = (POS == 0 || POS == 1) ? 4'b0110 :   // XOR2
                                (POS == 2 || POS == 3) ? 4'b1000 :   // AND2
                                                         4'b1110;    // OR2
    instr_comb_cell #(.N_IN(2), .TRUTH(TT), .DELAY_W(DELAY_W),
                      .INSTRUMENTED(GATE_INSTR[g])) u_g (
      .clk_ref, .rst, .clk_load_en, .load_en,
      .load_in(chain[2*WIDTH+g]), .load_out(chain[2*WIDTH+g+1]),
      .a(gin[g]), .q(gq[g]));
  end

  assign sum[0] = gq[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_sum
    assign sum[i] = gq[2 + 5*(i-1) + 1];
  end
  assign sum[WIDTH] = carry[WIDTH];

  for (genvar i = 0; i <= WIDTH; i++) begin : g_out
    instr_seq_cell #(.DELAY_W(DELAY_W)) u_s (
      .clk_ref, .rst, .sys_clk_ff, .clk_load_en, .load_en,
      .load_in(chain[2*WIDTH+NG+i]), .load_out(chain[2*WIDTH+NG+i+1]),
      .d(sum[i]), .rn, .q(result[i]));
  end

endmodule
