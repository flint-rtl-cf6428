// flint_top: runtime-configurable timing emulation framework with an
// instrumented arithmetic netlist: a ripple-carry adder by default, a
// ripple-carry array multiplier with NETLIST = NL_MUL or a non-restoring array
// divider with NETLIST = NL_DIV.
//
// A host (over an interface attached to the bus ports) writes delay parameter
// words into the timing parameter memory, operand pairs into the two operand
// memories and the run settings into the control register file, then writes
// CTRL.start. The control FSM shifts the parameters through the configuration
// chain of the instrumented cells (at the slow rate set by LOAD_DIV), applies
// one operand pair per quantized system clock period (SYS_PERIOD reference
// cycles) and stores each result, timing errors included, in the result
// memory. STATUS.done (also on the done port) tells the host to read the
// results back. A new timing corner needs only new parameter words, not a new
// FPGA configuration; a run with CTRL bit1 clear reuses the loaded parameters.
//
// Ports: clk_ref is the reference (quantization) clock, rst a synchronous
// reset. The bus is described in io_bus_decoder. The CORDIC case-study unit
// stands beside the framework with its own ports (cordic_*), as a functional
// design whose adders can be precise or approximate.
//
// GATE_INSTR (partial instrumentation mask) applies to the adder; the
// multiplier and the divider are always fully instrumented. The result
// memory is RW bits wide: WIDTH+1 for the adder, 2*WIDTH for the multiplier,
// WIDTH for the divider.
//
// Default sizes: a 16-bit adder, 16-bit parameter words, a 65536-word
// parameter memory (enough for the chain of an 896-bit adder netlist) and
// 2^17-entry operand and result memories (enough for the
// 10^5-operation sets used in the evaluation). Memory sizes and word widths
// are this design's choices.
module flint_top
  import flint_pkg::*;
#(
  parameter netlist_e            NETLIST     = NL_ADD,
  parameter int unsigned        WIDTH       = 16,
  parameter int unsigned        DELAY_W     = DELAY_W_DEF,
  parameter int unsigned        PARAM_DEPTH = 65536,
  parameter int unsigned        OP_DEPTH    = 131072,
  parameter logic [5*WIDTH-4:0] GATE_INSTR  = '1,
  parameter int unsigned        CORDIC_W    = 32,
  parameter int unsigned        CORDIC_IT   = 32,
  parameter int unsigned        XY_BLK      = 0,
  parameter int unsigned        XY_EXT      = 0,
  parameter int unsigned        Z_BLK       = 0,
  parameter int unsigned        Z_EXT       = 0
) (
  input  logic                clk_ref,
  input  logic                rst,
  // I/O bus towards the host interface
  input  logic                bus_we,
  input  logic                bus_re,
  input  logic [BUS_AW-1:0]   bus_addr,
  input  logic [BUS_DW-1:0]   bus_wdata,
  output logic [BUS_DW-1:0]   bus_rdata,
  output logic                bus_rvalid,
  output logic                done,
  output logic [DELAY_W-1:0]  chain_out,   // end of the configuration chain
  // CORDIC case-study unit
  input  logic                cordic_start,
  input  logic                cordic_vectoring,
  input  logic                cordic_hyperbolic,
  input  logic [CORDIC_W-1:0] cordic_x_i,
  input  logic [CORDIC_W-1:0] cordic_y_i,
  input  logic [CORDIC_W-1:0] cordic_z_i,
  output logic [CORDIC_W-1:0] cordic_x_o,
  output logic [CORDIC_W-1:0] cordic_y_o,
  output logic [CORDIC_W-1:0] cordic_z_o,
  output logic                cordic_done
);

  localparam int unsigned PAW = $clog2(PARAM_DEPTH);
  localparam int unsigned OAW = $clog2(OP_DEPTH);
  localparam int unsigned RW  = (NETLIST == NL_MUL) ? 2 * WIDTH :
                                (NETLIST == NL_DIV) ? WIDTH : WIDTH + 1;

  // bus
  logic [BUS_OFW-1:0] offset;
  logic [BUS_DW-1:0]  wdata, reg_rdata;
  logic               reg_we, reg_re, param_we, opa_we, opb_we;
  logic [DELAY_W-1:0] param_bus_rdata, param_rdata;
  logic [WIDTH-1:0]   opa_bus_rdata, opb_bus_rdata, op_a, op_b;
  logic [RW-1:0]      res_bus_rdata, result, res_unused;

  // control
  logic        start, do_load, busy, run, sys_clk_ff, clk_load_en, load_en;
  logic [31:0] num_params, num_ops, sys_period, op_count;
  logic [15:0] load_div;
  logic [PAW-1:0] param_addr;
  logic [OAW-1:0] op_addr, result_addr;
  logic           result_we;

  io_bus_decoder u_bus (
    .clk(clk_ref), .rst, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata,
    .bus_rvalid, .offset, .wdata, .reg_we, .reg_re, .param_we, .opa_we, .opb_we,
    .reg_rdata,
    .param_rdata (BUS_DW'(param_bus_rdata)),
    .opa_rdata   (BUS_DW'(opa_bus_rdata)),
    .opb_rdata   (BUS_DW'(opb_bus_rdata)),
    .result_rdata(BUS_DW'(res_bus_rdata)));

  ctrl_regfile u_regs (
    .clk(clk_ref), .rst, .we(reg_we), .re(reg_re), .addr(offset[2:0]),
    .wdata, .rdata(reg_rdata), .start, .do_load, .num_params, .num_ops,
    .sys_period, .load_div, .done, .busy, .op_count);

  uemu_mem #(.DW(DELAY_W), .DEPTH(PARAM_DEPTH)) u_param_mem (
    .clk(clk_ref),
    .a_we(param_we), .a_addr(offset[PAW-1:0]), .a_wdata(wdata[DELAY_W-1:0]),
    .a_rdata(param_bus_rdata),
    .b_we(1'b0), .b_addr(param_addr), .b_wdata('0), .b_rdata(param_rdata));

  uemu_mem #(.DW(WIDTH), .DEPTH(OP_DEPTH)) u_opa_mem (
    .clk(clk_ref),
    .a_we(opa_we), .a_addr(offset[OAW-1:0]), .a_wdata(wdata[WIDTH-1:0]),
    .a_rdata(opa_bus_rdata),
    .b_we(1'b0), .b_addr(op_addr), .b_wdata('0), .b_rdata(op_a));

  uemu_mem #(.DW(WIDTH), .DEPTH(OP_DEPTH)) u_opb_mem (
    .clk(clk_ref),
    .a_we(opb_we), .a_addr(offset[OAW-1:0]), .a_wdata(wdata[WIDTH-1:0]),
    .a_rdata(opb_bus_rdata),
    .b_we(1'b0), .b_addr(op_addr), .b_wdata('0), .b_rdata(op_b));

  uemu_mem #(.DW(RW), .DEPTH(OP_DEPTH)) u_result_mem (
    .clk(clk_ref),
    .a_we(1'b0), .a_addr(offset[OAW-1:0]), .a_wdata('0),
    .a_rdata(res_bus_rdata),
    .b_we(result_we), .b_addr(result_addr), .b_wdata(result),
    .b_rdata(res_unused));

  clock_gen u_clk (
    .clk_ref, .rst, .run, .sys_period, .load_div, .sys_clk_ff, .clk_load_en);

  control_fsm #(.PAW(PAW), .OAW(OAW)) u_fsm (
    .clk(clk_ref), .rst, .start, .do_load, .num_params, .num_ops,
    .clk_load_en, .load_en, .param_addr, .run, .sys_clk_ff, .op_addr,
    .result_we, .result_addr, .done, .busy, .op_count);

  // Instrumented ASIC netlist under analysis. Its flip-flops are held in
  // reset only by the framework reset; the end of the configuration chain is
  // brought out so that the chain length can be checked.
  if (NETLIST == NL_MUL) begin : g_mul
    mul_netlist #(.WIDTH(WIDTH), .DELAY_W(DELAY_W)) u_dut (
      .clk_ref, .rst, .sys_clk_ff, .rn(!rst), .clk_load_en, .load_en,
      .load_in(param_rdata), .load_out(chain_out), .op_a, .op_b, .result);
  end else if (NETLIST == NL_DIV) begin : g_div
    div_netlist #(.WIDTH(WIDTH), .DELAY_W(DELAY_W)) u_dut (
      .clk_ref, .rst, .sys_clk_ff, .rn(!rst), .clk_load_en, .load_en,
      .load_in(param_rdata), .load_out(chain_out), .op_a, .op_b, .result);
  end else begin : g_add
    rca_netlist #(.WIDTH(WIDTH), .DELAY_W(DELAY_W), .GATE_INSTR(GATE_INSTR)) u_dut (
      .clk_ref, .rst, .sys_clk_ff, .rn(!rst), .clk_load_en, .load_en,
      .load_in(param_rdata), .load_out(chain_out), .op_a, .op_b, .result);
  end

  cordic_unit #(.W(CORDIC_W), .ITER(CORDIC_IT), .XY_BLK(XY_BLK),
                .XY_EXT(XY_EXT), .Z_BLK(Z_BLK), .Z_EXT(Z_EXT)) u_cordic (
    .clk(clk_ref), .rst, .start(cordic_start), .vectoring(cordic_vectoring),
    .hyperbolic(cordic_hyperbolic), .x_i(cordic_x_i), .y_i(cordic_y_i),
    .z_i(cordic_z_i), .x_o(cordic_x_o), .y_o(cordic_y_o), .z_o(cordic_z_o),
    .done(cordic_done));

endmodule
