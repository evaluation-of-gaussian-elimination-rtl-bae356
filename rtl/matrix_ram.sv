// Matrix store: the whole GF(2) matrix held on chip.
//
// The matrix has MT rows of N bits. Each row is cut into NB = ceil(N/W)
// words of W bits, and word b of row r sits at address r*NB + b, so the
// store holds MT*NB words. It has one write port and one read port, both
// synchronous: a read issued with re in cycle t returns its word on rdata in
// cycle t+1, and rdata keeps that word for as long as re stays low (the
// unload stream relies on this to hold a word under back-pressure). A read
// and a write to the same address in the same cycle return the old word; the
// controller never issues one. Keeping the matrix on chip follows the
// HLS original; the word layout and the port timing are this design's choice.
module matrix_ram #(
  parameter int unsigned WIDTH = 1024,
  parameter int unsigned DEPTH = 13312,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
