// GF(2) Gaussian-elimination accelerator for Classic McEliece public keys.
//
// Key generation builds an MT x N binary matrix (MT = m*t) and must bring it
// to systematic form [I_MT | T]; T is the public key, and a matrix whose
// left MT x MT part is singular is rejected. This top holds the matrix on
// chip (matrix_ram, MT*NB words of W bits), runs the reduction with
// gauss_ctrl and elim_datapath at one W-bit block per cycle, and talks to the
// host through matrix_io:
//   load MT*NB words on in_* -> elimination starts by itself (busy high)
//   -> done pulses with fail -> on success the reduced matrix comes out on
//   out_* in load order; on failure the next matrix can be loaded at once.
// cycles holds the cycle count of the last elimination. Defaults are the
// largest parameter set, mceliece8192128: MT = 13*128 = 1664, N = 8192.
// The block width W = 1024 is this design's choice; at it, the cycle count
// at 300 MHz comes to about 0.1 s, the run time reported for the HLS original.
// Reset is synchronous and active low.
module gauss_elim_top #(
  parameter int unsigned MT = 1664,
  parameter int unsigned N  = 8192,
  parameter int unsigned W  = 1024,
  localparam int unsigned NB = (N + W - 1) / W,
  localparam int unsigned WORDS = MT * NB,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         out_last,
  output logic         busy,
  output logic         done,
  output logic         fail,
  output logic [31:0]  cycles
);

  import gauss_pkg::*;

  // matrix store ports and their two owners
  logic          ram_we, ram_re;
  logic [AW-1:0] ram_waddr, ram_raddr;
  logic [W-1:0]  ram_wdata, ram_rdata;

  logic          io_we, io_re;
  logic [AW-1:0] io_waddr, io_raddr;
  logic [W-1:0]  io_wdata;

  logic          eng_re, eng_we;
  logic [AW-1:0] eng_raddr, eng_waddr;
  logic [W-1:0]  eng_wdata;

  logic          start;
  dp_op_t        dp_op;
  logic          dp_first, pivot_bit;
  logic [BW-1:0] dp_blk, dp_pblk;
  logic [SW-1:0] dp_bit;

  // The engine owns the store while it runs; matrix_io the rest of the time.
  always_comb begin
    if (busy) begin
      ram_we = eng_we;  ram_waddr = eng_waddr; ram_wdata = eng_wdata;
      ram_re = eng_re;  ram_raddr = eng_raddr;
    end else begin
      ram_we = io_we;   ram_waddr = io_waddr;  ram_wdata = io_wdata;
      ram_re = io_re;   ram_raddr = io_raddr;
    end
  end

  matrix_ram #(.WIDTH(W), .DEPTH(WORDS)) u_ram (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .re    (ram_re),
    .raddr (ram_raddr),
    .rdata (ram_rdata)
  );

  matrix_io #(.MT(MT), .NB(NB), .W(W)) u_io (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data),
    .out_last  (out_last),
    .eng_start (start),
    .eng_done  (done),
    .eng_fail  (fail),
    .we        (io_we),
    .waddr     (io_waddr),
    .wdata     (io_wdata),
    .re        (io_re),
    .raddr     (io_raddr),
    .rdata     (ram_rdata)
  );

  gauss_ctrl #(.MT(MT), .NB(NB), .W(W)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .busy      (busy),
    .done      (done),
    .fail      (fail),
    .cycles    (cycles),
    .rd_en     (eng_re),
    .rd_addr   (eng_raddr),
    .wr_en     (eng_we),
    .wr_addr   (eng_waddr),
    .dp_op     (dp_op),
    .dp_first  (dp_first),
    .dp_blk    (dp_blk),
    .dp_bit    (dp_bit),
    .dp_pblk   (dp_pblk),
    .pivot_bit (pivot_bit)
  );

  elim_datapath #(.W(W), .NB(NB)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .op        (dp_op),
    .first     (dp_first),
    .blk       (dp_blk),
    .bit_sel   (dp_bit),
    .pblk      (dp_pblk),
    .rdata     (ram_rdata),
    .wdata     (eng_wdata),
    .pivot_bit (pivot_bit)
  );

endmodule
