// Host side of the accelerator: load the matrix, run, return the result.
//
// The host sees two valid/ready word streams of W bits in the order of the
// matrix store (row by row, column block 0 first; the padding bits past
// column N-1 of the last block must be zero). matrix_io cycles through three
// modes:
//   IO_LOAD    in_ready is high; each accepted word is written to the next
//              address. After the last of MT*NB words it pulses eng_start.
//   IO_RUN     the elimination owns the store; in_ready is low.
//   IO_UNLOAD  entered when the engine reports success: the reduced matrix
//              is streamed out, out_last on the final word, then back to
//              IO_LOAD. On failure it goes straight back to IO_LOAD, since
//              key generation then starts over with a new matrix.
// out_data is the store's read register itself: a read is issued only when
// the output is empty or being taken, and the store holds its read word
// otherwise, so the stream runs at one word per cycle without a skid
// buffer. wdata and out_data are therefore plain wires from in_data and
// the store. The matrix and key travel through a vendor runtime in the HLS
// original; this stream interface and the modes are this design's own.
module matrix_io #(
  parameter int unsigned MT = 1664,
  parameter int unsigned NB = 8,
  parameter int unsigned W  = 1024,
  localparam int unsigned WORDS = MT * NB,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CW = $clog2(WORDS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host load stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  // host result stream
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  output logic          out_last,
  // elimination engine
  output logic          eng_start,
  input  logic          eng_done,
  input  logic          eng_fail,
  // matrix store
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [W-1:0]  wdata,
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [W-1:0]  rdata
);

  typedef enum logic [1:0] {IO_LOAD, IO_RUN, IO_UNLOAD} mode_t;

  mode_t         mode;
  logic [CW-1:0] cnt;

  assign in_ready = (mode == IO_LOAD);
  assign we       = in_valid && in_ready;
  assign waddr    = AW'(cnt);
  assign wdata    = in_data;

  assign re       = (mode == IO_UNLOAD) && (cnt != CW'(WORDS)) && (!out_valid || out_ready);
  assign raddr    = AW'(cnt);
  assign out_data = rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode      <= IO_LOAD;
      cnt       <= '0;
      eng_start <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      eng_start <= 1'b0;
      unique case (mode)
        IO_LOAD: if (we) begin
          if (cnt == CW'(WORDS - 1)) begin
            cnt       <= '0;
            mode      <= IO_RUN;
            eng_start <= 1'b1;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        IO_RUN: if (eng_done) begin
          mode <= eng_fail ? IO_LOAD : IO_UNLOAD;
        end
        IO_UNLOAD: begin
          if (re) begin
            cnt       <= cnt + CW'(1);
            out_valid <= 1'b1;
            out_last  <= (cnt == CW'(WORDS - 1));
          end else if (out_ready) begin
            out_valid <= 1'b0;
            if (out_valid && out_last) begin
              out_last <= 1'b0;
              cnt      <= '0;
              mode     <= IO_LOAD;
            end
          end
        end
        default: mode <= IO_LOAD;
      endcase
    end
  end

  // A word offered on the result stream stays until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
