// One matrix of one Classic McEliece parameter set through the accelerator.
//
// Builds an MT x N matrix [I | R] with random R, scrambles it with random
// row swaps and row additions (it still reduces, to [I | R] and nothing
// else), loads it, waits for the elimination, checks success and the cycle
// count sum over r of (2*MT - r)*(NB - r/W) + 4, and checks every returned
// word. Results come out on checks/failures when finished rises. Used by
// tb_gauss_elim_sets.
module tb_set_runner #(
  parameter int unsigned MT = 768,
  parameter int unsigned N  = 3488,
  parameter int unsigned W  = 1024,
  parameter string       NAME = "mceliece348864",
  parameter real         PAPER_NS = 2.45e7
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned NB = (N + W - 1) / W;
  localparam int unsigned RW = NB * W;

  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, out_ready = 1'b0, out_last;
  logic [W-1:0]  out_data;
  logic          busy, done, fail;
  logic [31:0]   cycles;

  gauss_elim_top #(.MT(MT), .N(N), .W(W)) dut (.*);

  logic [RW-1:0] mat [MT];
  logic [RW-1:0] expd [MT];
  longint        exp_cyc;

  task automatic build();
    logic [RW-1:0] t;
    for (int r = 0; r < MT; r++) begin
      expd[r] = '0;
      for (int c = int'(MT); c < int'(N); c++) expd[r][c] = 1'($urandom);
      expd[r][r] = 1'b1;
      mat[r] = expd[r];
    end
    for (int i = 0; i < 4 * int'(MT); i++) begin
      int a = int'($urandom_range(MT - 1));
      int b = int'($urandom_range(MT - 1));
      if (a == b) continue;
      if (i % 4 == 0) begin
        t = mat[a]; mat[a] = mat[b]; mat[b] = t;
      end else begin
        mat[b] ^= mat[a];
      end
    end
  endtask

  initial begin : run
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    build();
    exp_cyc = 0;
    for (int r = 0; r < int'(MT); r++)
      exp_cyc += longint'((2 * int'(MT) - r) * (int'(NB) - r / int'(W)) + 4);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < int'(MT); r++)
      for (int b = 0; b < int'(NB); b++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = mat[r][b*W +: W];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk iff done);
    checks++;
    if (fail) begin failures++; $display("%s: elimination reported failure", NAME); end
    checks++;
    if (longint'(cycles) != exp_cyc) begin
      failures++;
      $display("%s: cycles=%0d expected %0d", NAME, cycles, exp_cyc);
    end
    $display("%s (%0dx%0d): %0d cycles, %0.1f ms at 300 MHz; reported HLS latency %0.1f ms",
             NAME, MT, N, cycles, cycles / 300.0e3, PAPER_NS / 1.0e6);
    if (!fail) begin
      @(negedge clk);
      out_ready = 1'b1;
      for (int r = 0; r < int'(MT); r++)
        for (int b = 0; b < int'(NB); b++) begin
          @(posedge clk);
          while (!out_valid) @(posedge clk);
          checks++;
          if (out_data !== expd[r][b*W +: W]
              || out_last !== (r == int'(MT) - 1 && b == int'(NB) - 1)) begin
            failures++;
            if (failures < 10) $display("%s: row %0d blk %0d differs", NAME, r, b);
          end
        end
      @(negedge clk);
      out_ready = 1'b0;
    end
    finished = 1'b1;
  end

endmodule
