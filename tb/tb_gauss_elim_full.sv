// Full-size run: one mceliece8192128 matrix through the accelerator at its
// default parameters (MT = 1664 rows, N = 8192 columns, W = 1024-bit blocks).
//
// The matrix is [I | R] with random R, scrambled by random row swaps and
// row additions; such a matrix reduces, and its only systematic form is
// [I | R], so every returned word is known in advance. The test also
// checks that the elimination takes sum over r of (2*MT - r)*(8 - r/1024) + 4
// cycles, about 29.9 million, i.e. about 0.1 s at 300 MHz.
module tb_gauss_elim_full;

  localparam int unsigned MT = 1664;
  localparam int unsigned N  = 8192;
  localparam int unsigned W  = 1024;
  localparam int unsigned NB = N / W;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, out_ready = 1'b0, out_last;
  logic [W-1:0]  out_data;
  logic          busy, done, fail;
  logic [31:0]   cycles;

  always #5 clk = ~clk;

  gauss_elim_top dut (.*);

  int checks = 0, failures = 0;

  logic [N-1:0] mat [MT];
  logic [N-1:0] expd [MT];

  task automatic build();
    logic [N-1:0] t;
    for (int r = 0; r < MT; r++) begin
      for (int c = 0; c < N; c += 32) expd[r][c +: 32] = $urandom;
      expd[r][MT-1:0] = '0;
      expd[r][r] = 1'b1;
      mat[r] = expd[r];
    end
    for (int i = 0; i < 4 * MT; i++) begin
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

  longint exp_cyc;

  initial begin : run
    build();
    exp_cyc = 0;
    for (int r = 0; r < MT; r++) exp_cyc += longint'((2 * int'(MT) - r) * (int'(NB) - r / int'(W)) + 4);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < MT; r++)
      for (int b = 0; b < NB; b++) begin
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
    if (fail) begin failures++; $display("elimination reported failure"); end
    checks++;
    if (longint'(cycles) != exp_cyc) begin
      failures++;
      $display("cycles=%0d expected %0d", cycles, exp_cyc);
    end
    $display("elimination took %0d cycles (%0.1f ms at 300 MHz)", cycles, cycles / 300.0e3);
    if (!fail) begin
      for (int r = 0; r < MT; r++)
        for (int b = 0; b < NB; b++) begin
          @(negedge clk);
          out_ready = (b != 3);
          @(posedge clk);
          while (!(out_valid && out_ready)) begin
            @(negedge clk);
            out_ready = 1'b1;
            @(posedge clk);
          end
          checks++;
          if (out_data !== expd[r][b*W +: W] || out_last !== (r == MT - 1 && b == NB - 1)) begin
            failures++;
            if (failures < 10) $display("row %0d blk %0d differs", r, b);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
