// Elimination controller: the loop nest of the systematic-form reduction.
//
// For each pivot row r = 0..MT-1 (pivot column r, held at bit r%W of
// column block pb = r/W) it runs, one W-bit block per cycle:
//   LOAD   row r, blocks pb..NB-1, into the pivot-row cache
//   FWD    rows r+1..MT-1: forward elimination into the cached pivot row
//   CHECK  pivot bit still 0: the matrix has no systematic form, stop
//   BWD    rows 0..MT-1: backward substitution, each row written back; at
//          row r the cached pivot row itself is written back
// Blocks left of pb are zero in every row taking part (they already hold
// the identity part), so they are skipped. The matrix store answers a read
// one cycle later, so the controller runs a two-stage pipeline: stage 0
// issues the read (rd_en, rd_addr), stage 1 hands the returned block to the
// datapath (dp_*) and writes the result back (wr_en, wr_addr). One drain
// cycle follows FWD (so CHECK sees the last update) and one follows BWD (so
// the next LOAD never reads a word in the cycle it is written).
// Cycles for a matrix that reduces: sum over r of (2*MT - r)*(NB - r/W) + 4;
// the count is on `cycles` when done pulses. start is taken in idle; done
// pulses for one cycle at the end, and fail (held until the next start) says
// whether it failed. The two passes, their order and the early stop on
// failure follow the published HLS design; the block schedule, the pipeline
// and the handshake are this design's own.
module gauss_ctrl
  import gauss_pkg::*;
#(
  parameter int unsigned MT = 1664,
  parameter int unsigned NB = 8,
  parameter int unsigned W  = 1024,
  localparam int unsigned AW = (MT * NB > 1) ? $clog2(MT * NB) : 1,
  localparam int unsigned KW = $clog2(MT + 1),
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          fail,
  output logic [31:0]   cycles,
  // matrix store, stage 0 (read) and stage 1 (write)
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  // datapath, stage 1
  output dp_op_t        dp_op,
  output logic          dp_first,
  output logic [BW-1:0] dp_blk,
  output logic [SW-1:0] dp_bit,
  output logic [BW-1:0] dp_pblk,
  input  logic          pivot_bit
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FWD, S_DRAIN, S_CHECK, S_BWD, S_NEXT
  } state_t;

  state_t        state, after_drain;
  logic [KW-1:0] row, k;
  logic [BW-1:0] pb, b;
  logic [SW-1:0] bitp;

  // stage 0
  logic          issue, last_blk;
  dp_op_t        op0;

  assign last_blk = (b == BW'(NB - 1));

  always_comb begin
    issue = 1'b0;
    op0   = DP_IDLE;
    unique case (state)
      S_LOAD: begin issue = 1'b1; op0 = DP_LOAD; end
      S_FWD:  begin issue = 1'b1; op0 = DP_FWD;  end
      S_BWD:  begin issue = 1'b1; op0 = (k == row) ? DP_PIV : DP_BWD; end
      default: ;
    endcase
  end

  assign rd_en   = issue && (op0 != DP_PIV);
  assign rd_addr = AW'(k) * AW'(NB) + AW'(b);
  assign busy    = (state != S_IDLE);

  // stage 1
  logic [AW-1:0] s1_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dp_op <= DP_IDLE;
    end else begin
      dp_op <= op0;
    end
    dp_first <= (b == pb);
    dp_blk   <= b;
    s1_addr  <= rd_addr;
  end

  assign wr_en   = (dp_op == DP_BWD) || (dp_op == DP_PIV);
  assign wr_addr = s1_addr;
  assign dp_bit  = bitp;
  assign dp_pblk = pb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      after_drain <= S_IDLE;
      row         <= '0;
      k           <= '0;
      pb          <= '0;
      b           <= '0;
      bitp        <= '0;
      done        <= 1'b0;
      fail        <= 1'b0;
      cycles      <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) cycles <= cycles + 32'd1;
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD;
          row    <= '0;
          k      <= '0;
          pb     <= '0;
          b      <= '0;
          bitp   <= '0;
          fail   <= 1'b0;
          cycles <= '0;
        end
        S_LOAD: begin
          if (last_blk) begin
            b <= pb;
            k <= row + KW'(1);
            if (row == KW'(MT - 1)) begin
              state       <= S_DRAIN;
              after_drain <= S_CHECK;
            end else begin
              state <= S_FWD;
            end
          end else begin
            b <= b + BW'(1);
          end
        end
        S_FWD: begin
          if (last_blk) begin
            b <= pb;
            k <= k + KW'(1);
            if (k == KW'(MT - 1)) begin
              state       <= S_DRAIN;
              after_drain <= S_CHECK;
            end
          end else begin
            b <= b + BW'(1);
          end
        end
        S_DRAIN: state <= after_drain;
        S_CHECK: begin
          if (!pivot_bit) begin
            fail  <= 1'b1;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            k     <= '0;
            b     <= pb;
            state <= S_BWD;
          end
        end
        S_BWD: begin
          if (last_blk) begin
            b <= pb;
            k <= k + KW'(1);
            if (k == KW'(MT - 1)) begin
              state       <= S_DRAIN;
              after_drain <= S_NEXT;
            end
          end else begin
            b <= b + BW'(1);
          end
        end
        S_NEXT: begin
          if (row == KW'(MT - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            row <= row + KW'(1);
            k   <= row + KW'(1);
            if (bitp == SW'(W - 1)) begin
              bitp <= '0;
              pb   <= pb + BW'(1);
              b    <= pb + BW'(1);
            end else begin
              bitp <= bitp + SW'(1);
              b    <= pb;
            end
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A word is never read in the cycle it is written.
  a_no_rw_collision: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en && wr_en) |-> (rd_addr != wr_addr));

  // The forward pass only visits rows below the pivot row.
  a_fwd_below_pivot: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FWD) |-> (k > row));

endmodule
