// Elimination datapath: the pivot-row cache and W GF(2) lanes.
//
// The cache holds the pivot row of the current elimination step, NB words
// of W bits. Every cycle the datapath applies `op` to the block `rdata`
// that the matrix store returned for column block `blk` of some row:
//   DP_LOAD  cache[blk] = rdata                      (pivot row comes in)
//   DP_FWD   cache[blk] ^= rdata & mask, with mask = pivot bit of the cache
//            XOR pivot bit of the row; so a row below the pivot is added
//            into the pivot row when their pivot bits differ, which leaves
//            the pivot bit 1 as soon as any row below has it set
//   DP_BWD   wdata = rdata ^ (cache[blk] & mask), with mask = pivot bit of
//            the row; so the pivot column is cleared in that row
//   DP_PIV   wdata = cache[blk]                       (pivot row goes back)
// These are the two loops of the Classic McEliece reference key generation
// (forward elimination, backward substitution), taken a block at a time.
// The mask of a row is taken from its first block (`first`), the one that
// holds the pivot column at bit `bit_sel`, and held in mask_q for the rest
// of that row's blocks, which must follow back to back. wdata is
// combinational, in the cycle of rdata. pivot_bit is the pivot bit of the
// cache, bit `bit_sel` of block `pblk`; the controller tests it after the
// forward pass. Caching the pivot row on chip follows the HLS original; the
// block order and the mask register are this design's own.
module elim_datapath
  import gauss_pkg::*;
#(
  parameter int unsigned W  = 1024,
  parameter int unsigned NB = 8,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dp_op_t        op,
  input  logic          first,
  input  logic [BW-1:0] blk,
  input  logic [SW-1:0] bit_sel,
  input  logic [BW-1:0] pblk,
  input  logic [W-1:0]  rdata,
  output logic [W-1:0]  wdata,
  output logic          pivot_bit
);

  logic [W-1:0] cache [NB];
  logic         mask, mask_q;
  logic [W-1:0] cblk;

  assign cblk = cache[blk];

  always_comb begin
    unique case (op)
      DP_FWD:  mask = first ? (cblk[bit_sel] ^ rdata[bit_sel]) : mask_q;
      DP_BWD:  mask = first ? rdata[bit_sel] : mask_q;
      default: mask = 1'b0;
    endcase
  end

  always_comb begin
    if (op == DP_PIV) wdata = cblk;
    else              wdata = rdata ^ (cblk & {W{mask}});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) mask_q <= 1'b0;
    else if (op == DP_FWD || op == DP_BWD) mask_q <= mask;
  end

  always_ff @(posedge clk) begin
    case (op)
      DP_LOAD: cache[blk] <= rdata;
      DP_FWD:  if (mask) cache[blk] <= cblk ^ rdata;
      default: ;
    endcase
  end

  logic [W-1:0] pword;
  assign pword     = cache[pblk];
  assign pivot_bit = pword[bit_sel];

endmodule
