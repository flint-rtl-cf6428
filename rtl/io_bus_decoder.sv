// io_bus_decoder: the framework's I/O bus between the host interface and the
// register file and memories.
//
// A bus access is one cycle: we or re with a word address. Address bits
// [20:18] pick the region (flint_pkg::region_e), bits [17:0] the word inside
// it. Writes go to the selected region; a read returns its data on rdata with
// rvalid one cycle later (all slaves read synchronously). The result memory is
// read-only from the bus; writes to it are ignored. The bus protocol and the
// map are this design's choice; the document only draws a shared I/O bus.
module io_bus_decoder
  import flint_pkg::*;
#(
  parameter int unsigned DW = BUS_DW
) (
  input  logic               clk,
  input  logic               rst,
  // host side
  input  logic               bus_we,
  input  logic               bus_re,
  input  logic [BUS_AW-1:0]  bus_addr,
  input  logic [DW-1:0]      bus_wdata,
  output logic [DW-1:0]      bus_rdata,
  output logic               bus_rvalid,
  // slave side
  output logic [BUS_OFW-1:0] offset,
  output logic [DW-1:0]      wdata,
  output logic               reg_we,
  output logic               reg_re,
  output logic               param_we,
  output logic               opa_we,
  output logic               opb_we,
  input  logic [DW-1:0]      reg_rdata,
  input  logic [DW-1:0]      param_rdata,
  input  logic [DW-1:0]      opa_rdata,
  input  logic [DW-1:0]      opb_rdata,
  input  logic [DW-1:0]      result_rdata
);

  region_e region, rd_region;

  assign region   = region_e'(bus_addr[BUS_AW-1:BUS_OFW]);
  assign offset   = bus_addr[BUS_OFW-1:0];
  assign wdata    = bus_wdata;
  assign reg_we   = bus_we && region == REG_REGION;
  assign reg_re   = bus_re && region == REG_REGION;
  assign param_we = bus_we && region == PARAM_REGION;
  assign opa_we   = bus_we && region == OPA_REGION;
  assign opb_we   = bus_we && region == OPB_REGION;

  always_ff @(posedge clk) begin
    if (rst) begin
      bus_rvalid <= 1'b0;
      rd_region  <= REG_REGION;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) rd_region <= region;
    end
  end

  always_comb begin
    unique case (rd_region)
      REG_REGION:    bus_rdata = reg_rdata;
      PARAM_REGION:  bus_rdata = param_rdata;
      OPA_REGION:    bus_rdata = opa_rdata;
      OPB_REGION:    bus_rdata = opb_rdata;
      RESULT_REGION: bus_rdata = result_rdata;
      default:       bus_rdata = '0;
    endcase
  end

  a_one_op: assert property (@(posedge clk) disable iff (rst)
                             !(bus_we && bus_re));

endmodule
