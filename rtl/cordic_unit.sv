// cordic_unit: iterative fixed-point CORDIC with configurable precise or
// approximate add/subtract units, the case-study circuit of the framework.
//
// Three registers X, Y, Z are preset from x_i, y_i, z_i on start and then
// updated once per clock by three add/subtract units:
//   X <- X -/+ (Y >>> i)       (circular; hyperbolic uses the opposite sign)
//   Y <- Y +/- (X >>> i)
//   Z <- Z -/+ ROM[i]
// The direction d is the sign of Z in rotation mode and the opposite of the
// sign of Y in vectoring mode. Subtraction inverts the second operand and sets
// the adder's carry in. ROM is cordic_rom (atan or atanh of 2^-i).
// Circular mode runs i = 0 .. ITER-1; hyperbolic mode starts at i = 1 and
// repeats i = 4, 13 and 40 once for convergence, ITER steps in total.
// Typical uses: sine and cosine (rotation, circular, x_i = 1/K, y_i = 0),
// square root (vectoring, hyperbolic, x_i = v + 1/4, y_i = v - 1/4, sqrt(v) =
// X / Kh), exponential (rotation,
// hyperbolic, x_i = 1/Kh, y_i = 0, e^z = X + Y; Kh is the gain of the
// hyperbolic schedule).
// The adders are eta2m_adder instances: XY_BLK/XY_EXT configure the X and Y
// adders, Z_BLK/Z_EXT the Z adder; a block size of 0 is an exact ripple-carry
// adder. Numbers are two's complement with FRAC fraction bits.
//
// Timing: start (one cycle, while idle or done) loads the registers; ITER
// clock cycles later done rises and x_o, y_o, z_o hold the result until the
// next start. x_o/y_o/z_o are the register contents (after the last step).
// The document shows the datapath (registers, input multiplexers, shifters,
// three add/subtract units, rotation ROM); the number format, iteration
// schedule and control are this design's choices.
module cordic_unit #(
  parameter int unsigned W      = 32,
  parameter int unsigned FRAC   = W - 3,
  parameter int unsigned ITER   = 32,
  parameter int unsigned XY_BLK = 0,
  parameter int unsigned XY_EXT = 0,
  parameter int unsigned Z_BLK  = 0,
  parameter int unsigned Z_EXT  = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         vectoring,
  input  logic         hyperbolic,
  input  logic [W-1:0] x_i,
  input  logic [W-1:0] y_i,
  input  logic [W-1:0] z_i,
  output logic [W-1:0] x_o,
  output logic [W-1:0] y_o,
  output logic [W-1:0] z_o,
  output logic         done
);

  localparam int unsigned SW = 6;   // shift index width (ROM depth 64)

  logic signed [W-1:0] x_r, y_r, z_r, x_sh, y_sh;
  logic [W-1:0]  x_nx, y_nx, z_nx, rom_angle;
  logic [SW-1:0] sh;               // current shift index i
  logic          repeated;         // current index already repeated once
  logic [$clog2(ITER+1)-1:0] step;
  logic          busy, vec_r, hyp_r;
  logic          d_pos;            // direction d = +1
  logic          x_sub, y_sub, z_sub;

  assign x_sh = x_r >>> sh;
  assign y_sh = y_r >>> sh;

  assign d_pos = vec_r ? y_r[W-1] : !z_r[W-1];
  // circular: X - d*Y', Y + d*X', Z - d*a ; hyperbolic: X + d*Y'
  assign x_sub = hyp_r ? !d_pos : d_pos;
  assign y_sub = !d_pos;
  assign z_sub = d_pos;

  cordic_rom #(.W(W), .FRAC(FRAC), .DEPTH(64)) u_rom (
    .hyperbolic(hyp_r), .idx(sh), .angle(rom_angle));

  eta2m_adder #(.W(W), .BLK(XY_BLK), .EXT(XY_EXT)) u_add_x (
    .a(x_r), .b(x_sub ? ~y_sh : y_sh), .cin(x_sub), .s(x_nx), .cout());
  eta2m_adder #(.W(W), .BLK(XY_BLK), .EXT(XY_EXT)) u_add_y (
    .a(y_r), .b(y_sub ? ~x_sh : x_sh), .cin(y_sub), .s(y_nx), .cout());
  eta2m_adder #(.W(W), .BLK(Z_BLK), .EXT(Z_EXT)) u_add_z (
    .a(z_r), .b(z_sub ? ~rom_angle : rom_angle), .cin(z_sub), .s(z_nx),
    .cout());

  always_ff @(posedge clk) begin
    if (rst) begin
      x_r <= '0; y_r <= '0; z_r <= '0;
      sh <= '0; repeated <= 1'b0; step <= '0;
      busy <= 1'b0; done <= 1'b0; vec_r <= 1'b0; hyp_r <= 1'b0;
    end else if (start && !busy) begin
      x_r      <= x_i;
      y_r      <= y_i;
      z_r      <= z_i;
      vec_r    <= vectoring;
      hyp_r    <= hyperbolic;
      sh       <= hyperbolic ? SW'(1) : SW'(0);
      repeated <= 1'b0;
      step     <= '0;
      busy     <= 1'b1;
      done     <= 1'b0;
    end else if (busy) begin
      x_r  <= x_nx;
      y_r  <= y_nx;
      z_r  <= z_nx;
      step <= step + 1'b1;
      if (hyp_r && !repeated && (sh == 4 || sh == 13 || sh == 40)) begin
        repeated <= 1'b1;
      end else begin
        repeated <= 1'b0;
        if (sh != SW'(63)) sh <= sh + 1'b1;
      end
      if (step == $bits(step)'(ITER - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign x_o = x_r;
  assign y_o = y_r;
  assign z_o = z_r;

endmodule
