// ctrl_regfile: control register file of the emulation framework.
//
// Registers (word offsets, see flint_pkg::reg_addr_e):
//   CTRL        write: bit0 start a run (one-cycle pulse), bit1 shift the
//               timing parameters into the chain before the operations
//   STATUS      read: bit0 done flag (results ready), bit1 busy
//   NUM_PARAMS  parameter words to shift into the configuration chain
//   NUM_OPS     operations to apply
//   SYS_PERIOD  quantized system clock period in reference cycles
//   LOAD_DIV    reference cycles per configuration chain shift
//   OP_COUNT    read: results stored in the last run
// Bus writes take effect at the clock edge; reads return data one cycle after
// re (registered, like the memories). Reset values: NUM_PARAMS 0, NUM_OPS 0,
// SYS_PERIOD 100, LOAD_DIV 4. The register set is this design's own; the
// document names the block and the done flag.
module ctrl_regfile #(
  parameter int unsigned DW = flint_pkg::BUS_DW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic          re,
  input  logic [2:0]    addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  // to / from the control FSM and clock generator
  output logic          start,
  output logic          do_load,
  output logic [31:0]   num_params,
  output logic [31:0]   num_ops,
  output logic [31:0]   sys_period,
  output logic [15:0]   load_div,
  input  logic          done,
  input  logic          busy,
  input  logic [31:0]   op_count
);
  import flint_pkg::*;

  always_ff @(posedge clk) begin
    if (rst) begin
      start      <= 1'b0;
      do_load    <= 1'b0;
      num_params <= '0;
      num_ops    <= '0;
      sys_period <= 32'd100;
      load_div   <= 16'd4;
      rdata      <= '0;
    end else begin
      start <= 1'b0;
      if (we) begin
        case (reg_addr_e'(addr))
          REG_CTRL: begin
            start   <= wdata[0];
            do_load <= wdata[1];
          end
          REG_NUM_PARAMS: num_params <= wdata[31:0];
          REG_NUM_OPS:    num_ops    <= wdata[31:0];
          REG_SYS_PERIOD: sys_period <= wdata[31:0];
          REG_LOAD_DIV:   load_div   <= wdata[15:0];
          default: ;
        endcase
      end
      if (re) begin
        case (reg_addr_e'(addr))
          REG_CTRL:       rdata <= DW'({do_load, 1'b0});
          REG_STATUS:     rdata <= DW'({busy, done});
          REG_NUM_PARAMS: rdata <= DW'(num_params);
          REG_NUM_OPS:    rdata <= DW'(num_ops);
          REG_SYS_PERIOD: rdata <= DW'(sys_period);
          REG_LOAD_DIV:   rdata <= DW'(load_div);
          REG_OP_COUNT:   rdata <= DW'(op_count);
          default:        rdata <= '0;
        endcase
      end
    end
  end

endmodule
