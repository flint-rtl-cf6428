// flint_delay_core: the delay part shared by every instrumented standard cell.
//
// It takes the zero-delay output q_int of the original cell and reproduces it
// on q after a programmable number of reference clock cycles. The pieces:
//   * q_int is registered (q_r) and passed through a 4-stage and then a
//     2-stage shift register (q_dly4, q_dly6);
//   * when q_dly4 differs from the present output q, the parameter word picked
//     by the cell's address generator (addr, computed by the cell from its
//     current and delayed inputs) is captured into the preset register;
//   * when q_dly6 differs from q, the decrementer counts down from the preset;
//     when it wraps below zero its most significant bit becomes 1, which stops
//     counting and enables the output register to take q_int (delayed by two
//     registers). The counter then reloads the preset and waits.
//   * the parameter words sit in an NPAR-stage shift register that forms one
//     link of the configuration chain (load_in -> load_out). It shifts one word
//     per clk_load_en pulse while load_en is high.
// A transition of q_int that is registered at edge 1 shows on q after edge
// P + MIN_LATENCY (9) for a parameter P. A counter that is already running is
// not restarted by later transitions; q then takes the latest q_int value.
//
// The document's figures draw the 4/2-stage split, the capture "latch", the
// wrap-around MSB and the output enable; choices of this design are: the
// capture latch is an enabled register, clk_load is a clock enable on clk_ref,
// and rst clears all emulation state.
//
// Parameter word j of the cell is stored at par[NPAR-1-j]: the word shifted in
// first ends up deepest.
module flint_delay_core #(
  parameter int unsigned NPAR    = 8,
  parameter int unsigned DELAY_W = flint_pkg::DELAY_W_DEF,
  localparam int unsigned AW     = (NPAR > 1) ? $clog2(NPAR) : 1
) (
  input  logic               clk_ref,
  input  logic               rst,
  input  logic               clk_load_en,
  input  logic               load_en,
  input  logic [DELAY_W-1:0] load_in,
  output logic [DELAY_W-1:0] load_out,
  input  logic               q_int,
  output logic               q_r,     // registered q_int, for the address generator
  input  logic [AW-1:0]      addr,    // parameter index chosen by the cell
  output logic               q
);

  logic [NPAR-1:0][DELAY_W-1:0] par;
  logic [3:0]         srg4;
  logic [1:0]         srg2;
  logic               q_r2;
  logic [DELAY_W-1:0] preset;
  logic [DELAY_W:0]   cnt;
  logic               latch_en, trigger, count;
  logic [DELAY_W-1:0] sel_par;

  // Configuration chain link.
  always_ff @(posedge clk_ref) begin
    if (rst)                         par <= '0;
    else if (clk_load_en && load_en) par <= {par[NPAR-2:0], load_in};
  end
  assign load_out = par[NPAR-1];

  always_comb sel_par = par[NPAR-1-int'(addr)];

  assign latch_en = srg4[3] ^ q;
  assign trigger  = srg2[1] ^ q;
  assign count    = cnt[DELAY_W] ? 1'b0 : trigger;

  always_ff @(posedge clk_ref) begin
    if (rst) begin
      q_r    <= 1'b0;
      q_r2   <= 1'b0;
      srg4   <= '0;
      srg2   <= '0;
      preset <= '0;
      cnt    <= '0;
      q      <= 1'b0;
    end else begin
      q_r  <= q_int;
      q_r2 <= q_r;
      srg4 <= {srg4[2:0], q_r};
      srg2 <= {srg2[0], srg4[3]};
      if (latch_en) preset <= sel_par;
      cnt <= count ? cnt - 1'b1 : {1'b0, preset};
      if (cnt[DELAY_W]) q <= q_r2;
    end
  end

endmodule
