// instr_seq_cell: an edge-triggered D flip-flop with active-low reset RN and
// runtime-configurable clock-to-output delay emulation.
//
// The original flip-flop samples d on each pulse of sys_clk_ff, the quantized
// system clock of the emulated circuit (a one-cycle enable on clk_ref whose
// period is the ASIC clock period in time quanta). RN clears it at any
// reference cycle, i.e. asynchronously to the system clock. Its output q_int
// is delayed by flint_delay_core with three parameters:
//   0  clock to Q, Q rises      1  clock to Q, Q falls
//   2  asynchronous reset (RN low)
// Only the current q_int and RN need to be looked at, since a transition can
// only follow a system clock pulse or RN. Setup and hold violations are not
// modelled: a flip-flop simply samples whatever d is at the pulse.
//
// Interface: as instr_comb_cell, plus sys_clk_ff, d, rn. Timing: q follows
// q_int P + 9 reference cycles after the pulse (or RN edge) that changed it.
module instr_seq_cell #(
  parameter int unsigned DELAY_W = flint_pkg::DELAY_W_DEF
) (
  input  logic               clk_ref,
  input  logic               rst,
  input  logic               sys_clk_ff,
  input  logic               clk_load_en,
  input  logic               load_en,
  input  logic [DELAY_W-1:0] load_in,
  output logic [DELAY_W-1:0] load_out,
  input  logic               d,
  input  logic               rn,
  output logic               q
);

  logic       q_ff, q_int, q_r, rn_r;
  logic [1:0] addr;

  // Original flip-flop of the cell library. RN clears the output at once
  // (gating) and the stored bit at the next reference edge.
  always_ff @(posedge clk_ref) begin
    if (rst || !rn)      q_ff <= 1'b0;
    else if (sys_clk_ff) q_ff <= d;
  end
  assign q_int = q_ff & rn;

  always_ff @(posedge clk_ref) begin
    if (rst) rn_r <= 1'b1;
    else     rn_r <= rn;
  end

  // Simplified address generator.
  always_comb begin
    if (!rn_r)    addr = 2'd2;
    else if (q_r) addr = 2'd0;
    else          addr = 2'd1;
  end

  flint_delay_core #(.NPAR(3), .DELAY_W(DELAY_W)) u_core (
    .clk_ref, .rst, .clk_load_en, .load_en, .load_in, .load_out,
    .q_int, .q_r, .addr, .q
  );

endmodule
