// eta2m_adder: modified error-tolerant adder type 2 (ETA2-M), named ETAa-b
// for a block size a = BLK and b = EXT extension blocks.
//
// The W-bit operands are cut into W/BLK blocks. Each block has a sum
// generator (a ripple-carry adder producing the block's sum bits) and a carry
// generator (a ripple-carry chain producing only the block's carry out). The
// sum generator of block k takes its carry in from the carry generator of
// block k-1, so a carry never ripples across more than one block boundary and
// the critical path shrinks; results are wrong only when a carry would have
// had to travel further (frequent errors of small magnitude).
// For the most significant sum bits the carry generators of blocks
// NB-1-EXT .. NB-2 are chained to each other, the lowest one of that chain
// starting from 0, which gives the top blocks a longer, more exact carry.
// All other carry generators start from 0, except that of block 0, which takes
// cin (so that a subtraction's +1 is kept; this is this design's choice).
// BLK = 0 or BLK >= W gives an exact ripple-carry adder (RCA).
// Purely combinational. W must be a multiple of BLK.
module eta2m_adder #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 8,
  parameter int unsigned EXT = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned BS = (BLK == 0 || BLK >= W) ? W : BLK;
  localparam int unsigned NB = W / BS;

  logic [NB-1:0] cg_cin, cg_cout, sg_cin, sg_cout;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [BS-1:0] ab, bb, sb;
    assign ab = a[k*BS +: BS];
    assign bb = b[k*BS +: BS];

    // carry generator input
    if (k == 0) begin : g_c0
      assign cg_cin[k] = cin;
    end else if (k + 1 + EXT >= NB && k + 1 < NB) begin : g_chain
      assign cg_cin[k] = cg_cout[k-1];
    end else begin : g_c_zero
      assign cg_cin[k] = 1'b0;
    end

    // sum generator input
    if (k == 0) begin : g_s0
      assign sg_cin[k] = cin;
    end else begin : g_sk
      assign sg_cin[k] = cg_cout[k-1];
    end

    // carry generator: carry chain of the block
    always_comb begin
      logic c;
      c = cg_cin[k];
      for (int j = 0; j < BS; j++) c = (ab[j] & bb[j]) | (c & (ab[j] ^ bb[j]));
      cg_cout[k] = c;
    end

    // sum generator: ripple-carry adder of the block
    always_comb begin
      logic c;
      c = sg_cin[k];
      for (int j = 0; j < BS; j++) begin
        sb[j] = ab[j] ^ bb[j] ^ c;
        c     = (ab[j] & bb[j]) | (c & (ab[j] ^ bb[j]));
      end
      sg_cout[k] = c;
    end
    assign s[k*BS +: BS] = sb;
  end

  assign cout = sg_cout[NB-1];

endmodule
