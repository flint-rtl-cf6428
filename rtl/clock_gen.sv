// clock_gen: derives the emulation clocks from the reference clock clk_ref.
//
// clk_ref itself is the quantization clock: one cycle is one time quantum.
// Two further clocks are produced as single-cycle enables on clk_ref:
//   sys_clk_ff   the quantized system clock of the emulated circuit. While
//                run is high it pulses once every sys_period reference cycles,
//                the first pulse sys_period cycles after run rises. sys_period
//                is the ASIC clock period divided by the time quantum.
//   clk_load_en  the slow parameter configuration clock: one pulse every
//                load_div reference cycles, free running.
// Generating enables rather than separate clock nets is this design's choice;
// the document only says that the generator produces the three clocks.
// sys_period and load_div below 1 are treated as 1.
module clock_gen #(
  parameter int unsigned PERIOD_W = 32,
  parameter int unsigned DIV_W    = 16
) (
  input  logic                clk_ref,
  input  logic                rst,
  input  logic                run,
  input  logic [PERIOD_W-1:0] sys_period,
  input  logic [DIV_W-1:0]    load_div,
  output logic                sys_clk_ff,
  output logic                clk_load_en
);

  logic [PERIOD_W-1:0] sys_cnt;
  logic [DIV_W-1:0]    load_cnt;

  always_ff @(posedge clk_ref) begin
    if (rst || !run) begin
      sys_cnt    <= '0;
      sys_clk_ff <= 1'b0;
    end else if (sys_cnt + 1'b1 >= sys_period) begin
      sys_cnt    <= '0;
      sys_clk_ff <= 1'b1;
    end else begin
      sys_cnt    <= sys_cnt + 1'b1;
      sys_clk_ff <= 1'b0;
    end
  end

  always_ff @(posedge clk_ref) begin
    if (rst) begin
      load_cnt    <= '0;
      clk_load_en <= 1'b0;
    end else if (load_cnt + 1'b1 >= load_div) begin
      load_cnt    <= '0;
      clk_load_en <= 1'b1;
    end else begin
      load_cnt    <= load_cnt + 1'b1;
      clk_load_en <= 1'b0;
    end
  end

endmodule
