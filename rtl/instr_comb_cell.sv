// instr_comb_cell: a combinational standard cell with runtime-configurable
// propagation delay emulation.
//
// The original gate is given by its truth table TRUTH (bit k is the output for
// input vector k; the default 4'b1000 is a 2-input AND). Its zero-delay output
// q_int feeds flint_delay_core, which delays it by a programmed number of
// reference clock cycles. The cell holds 4*N_IN delay parameters, in the order
// of an SDF IOPATH list: for input i,
//   4i+0  input rises, output rises      4i+1  input rises, output falls
//   4i+2  input falls, output rises      4i+3  input falls, output falls
// The address generator compares each registered input with its copy delayed
// by a 7-stage shift register; the lowest-numbered input that changed selects
// the group (fixed priority when several change together), its new level
// gives the input edge, and the registered q_int gives the output edge.
// If no input changed in the window, parameter 0 is used.
//
// With INSTRUMENTED = 0 the cell is the plain gate and passes the configuration
// chain straight through; this is how partial instrumentation leaves gates on
// uncritical paths untouched.
//
// Interface: clk_ref reference clock (one time quantum per cycle), rst
// synchronous reset of the emulation state, clk_load_en/load_en/load_in/
// load_out configuration chain, a gate inputs, q instrumented output.
// Timing: q follows an input change P + 9 reference cycles after the edge at
// which the input changed, where P is the selected parameter.
module instr_comb_cell #(
  parameter int unsigned        N_IN         = 2,
  parameter logic [2**N_IN-1:0] TRUTH        = 4'b1000,
  parameter int unsigned        DELAY_W      = flint_pkg::DELAY_W_DEF,
  parameter bit                 INSTRUMENTED = 1'b1
) (
  input  logic               clk_ref,
  input  logic               rst,
  input  logic               clk_load_en,
  input  logic               load_en,
  input  logic [DELAY_W-1:0] load_in,
  output logic [DELAY_W-1:0] load_out,
  input  logic [N_IN-1:0]    a,
  output logic               q
);

  localparam int unsigned NPAR = 4 * N_IN;
  localparam int unsigned AW   = $clog2(NPAR);

  logic q_int;
  assign q_int = TRUTH[a];

  if (!INSTRUMENTED) begin : g_plain
    assign q        = q_int;
    assign load_out = load_in;
  end else begin : g_instr
    logic [N_IN-1:0]         in_r;
    logic [6:0][N_IN-1:0]    in_srg;   // 7-stage history of the inputs
    logic [N_IN-1:0]         in_prev;
    logic                    q_r;
    logic [AW-1:0]           addr;

    always_ff @(posedge clk_ref) begin
      if (rst) begin
        in_r   <= '0;
        in_srg <= '0;
      end else begin
        in_r   <= a;
        in_srg <= {in_srg[5:0], in_r};
      end
    end
    assign in_prev = in_srg[6];

    // Look-up address generator with fixed priority (input 0 highest).
    always_comb begin
      addr = '0;
      for (int i = N_IN - 1; i >= 0; i--) begin
        if (in_r[i] != in_prev[i])
          addr = AW'(4 * i + (in_r[i] ? 0 : 2) + (q_r ? 0 : 1));
      end
    end

    flint_delay_core #(.NPAR(NPAR), .DELAY_W(DELAY_W)) u_core (
      .clk_ref, .rst, .clk_load_en, .load_en, .load_in, .load_out,
      .q_int, .q_r, .addr, .q
    );
  end

endmodule
