// uemu_mem: single-clock dual-port memory of the emulation framework, used as
// timing parameter memory, operand memories and result memory.
//
// Port A faces the I/O bus, port B the control FSM. Both ports can write and
// read; reads are synchronous with one cycle of latency (rdata is valid in the
// cycle after the address was presented), as in an FPGA block RAM. If both
// ports write one address in the same cycle, port B wins. The document names
// the memories only; their organisation is this design's choice.
module uemu_mem #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
