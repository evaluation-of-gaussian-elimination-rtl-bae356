// Test of the elimination datapath with W = 8 and NB = 4.
//
// For many random pivot positions (block pblk, bit bit_sel) the test loads a
// random pivot row, streams random rows through the forward pass, checks
// the pivot bit and the cached row against a bit-level model of the
// reference rule (add the row when the pivot bits differ), streams rows
// through the backward pass and checks each written block (row ^ pivot when
// the row's pivot bit is set), and finally reads the cached row back.
module tb_elim_datapath;

  import gauss_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned NB = 4;
  localparam int unsigned BW = $clog2(NB);
  localparam int unsigned SW = $clog2(W);
  localparam int unsigned RW = W * NB;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  dp_op_t        op = DP_IDLE;
  logic          first = 1'b0;
  logic [BW-1:0] blk = '0, pblk = '0;
  logic [SW-1:0] bit_sel = '0;
  logic [W-1:0]  rdata = '0, wdata;
  logic          pivot_bit;

  always #5 clk = ~clk;

  elim_datapath #(.W(W), .NB(NB)) dut (.*);

  int checks = 0, failures = 0;
  int n_add = 0, n_clear = 0;

  logic [RW-1:0] piv, row;
  int            pcol;

  // One row, blocks pblk..NB-1, one per cycle; `check` compares wdata.
  task automatic stream(input dp_op_t o, input logic [RW-1:0] data,
                        input logic [RW-1:0] expw, input logic check);
    for (int b = int'(pblk); b < NB; b++) begin
      @(negedge clk);
      op = o; first = (b == int'(pblk)); blk = BW'(b); rdata = data[b*W +: W];
      #1;
      if (check) begin
        checks++;
        if (wdata !== expw[b*W +: W]) begin
          failures++;
          $display("op %s blk %0d: wdata %h expected %h", o.name(), b, wdata, expw[b*W +: W]);
        end
      end
    end
    @(negedge clk);
    op = DP_IDLE; first = 1'b0;
  endtask

  initial begin : stimulus
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 200; it++) begin
      pcol    = int'($urandom_range(RW - 1));
      pblk    = BW'(pcol / W);
      bit_sel = SW'(pcol % W);
      piv = {$urandom} & ~((RW'(1) << (int'(pblk) * W)) - 1);
      stream(DP_LOAD, piv, '0, 1'b0);
      for (int k = 0; k < 3; k++) begin
        row = {$urandom} & ~((RW'(1) << (int'(pblk) * W)) - 1);
        if (piv[pcol] != row[pcol]) begin piv ^= row; n_add++; end
        stream(DP_FWD, row, '0, 1'b0);
      end
      checks++;
      if (pivot_bit !== piv[pcol]) begin
        failures++;
        $display("it %0d: pivot_bit %0b expected %0b", it, pivot_bit, piv[pcol]);
      end
      for (int k = 0; k < 3; k++) begin
        row = {$urandom} & ~((RW'(1) << (int'(pblk) * W)) - 1);
        if (row[pcol]) n_clear++;
        stream(DP_BWD, row, row[pcol] ? (row ^ piv) : row, 1'b1);
      end
      stream(DP_PIV, '0, piv, 1'b1);
    end
    checks++;
    if (n_add == 0 || n_clear == 0) begin failures++; $display("pass not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
