// The five Classic McEliece parameter sets, one accelerator build each
// (W = 1024), run side by side: mceliece348864 (768 x 3488),
// mceliece460896 (1248 x 4608), mceliece6688128 (1664 x 6688),
// mceliece6960119 (1547 x 6960) and mceliece8192128 (1664 x 8192). Each
// reduces one scrambled [I | R] matrix; the results and cycle counts are
// checked by tb_set_runner, and the run time at 300 MHz is printed next to
// the HLS latency reported for the same set.
module tb_gauss_elim_sets;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NSET = 5;
  logic fin [NSET];
  int   chk [NSET];
  int   bad [NSET];

  tb_set_runner #(.MT(768),  .N(3488), .NAME("mceliece348864"),  .PAPER_NS(2.45e7)) u_s0 (clk, fin[0], chk[0], bad[0]);
  tb_set_runner #(.MT(1248), .N(4608), .NAME("mceliece460896"),  .PAPER_NS(5.51e7)) u_s1 (clk, fin[1], chk[1], bad[1]);
  tb_set_runner #(.MT(1664), .N(6688), .NAME("mceliece6688128"), .PAPER_NS(1.84e8)) u_s2 (clk, fin[2], chk[2], bad[2]);
  tb_set_runner #(.MT(1547), .N(6960), .NAME("mceliece6960119"), .PAPER_NS(1.07e8)) u_s3 (clk, fin[3], chk[3], bad[3]);
  tb_set_runner #(.MT(1664), .N(8192), .NAME("mceliece8192128"), .PAPER_NS(9.52e7)) u_s4 (clk, fin[4], chk[4], bad[4]);

  int checks, failures;

  initial begin : collect
    repeat (2) @(posedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NSET; i++) begin
      checks += chk[i];
      failures += bad[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    checks = 0;
    failures = 1;
    for (int i = 0; i < NSET; i++) begin
      checks += chk[i];
      failures += bad[i];
    end
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
