// Test of the host interface, MT = 3 rows of NB = 2 words of W = 8 bits,
// with a matrix_ram behind it as in the accelerator.
//
// Three rounds: a matrix is loaded with random gaps on in_valid; eng_start
// must pulse once, right after the last word, and in_ready must stay low
// while the engine runs. The test then plays the engine: in round 0 it
// reports failure, after which in_ready must come back without any output;
// in rounds 1 and 2 it reports success (after altering the stored matrix
// the way the engine would), and the reduced matrix must come out in order
// under random out_ready stalls, out_last on the final word only, followed
// by a return to loading.
module tb_matrix_io;

  localparam int unsigned MT = 3;
  localparam int unsigned NB = 2;
  localparam int unsigned W  = 8;
  localparam int unsigned WORDS = MT * NB;
  localparam int unsigned AW = $clog2(WORDS);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, out_ready = 1'b0, out_last;
  logic [W-1:0]  out_data;
  logic          eng_start;
  logic          eng_done = 1'b0, eng_fail = 1'b0;
  logic          we, re, io_we;
  logic [AW-1:0] waddr, raddr, io_waddr;
  logic [W-1:0]  wdata, rdata, io_wdata;
  // the test writes the store itself when it plays the engine
  logic          tb_we = 1'b0;
  logic [AW-1:0] tb_waddr = '0;
  logic [W-1:0]  tb_wdata = '0;

  always #5 clk = ~clk;

  matrix_io #(.MT(MT), .NB(NB), .W(W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
    .out_data, .out_last, .eng_start, .eng_done, .eng_fail,
    .we(io_we), .waddr(io_waddr), .wdata(io_wdata), .re, .raddr, .rdata
  );

  assign we    = tb_we ? 1'b1 : io_we;
  assign waddr = tb_we ? tb_waddr : io_waddr;
  assign wdata = tb_we ? tb_wdata : io_wdata;

  matrix_ram #(.WIDTH(W), .DEPTH(WORDS)) u_ram (.*);

  int checks = 0, failures = 0;
  int n_start = 0, n_in_stall = 0, n_out_stall = 0;
  logic [W-1:0] words [WORDS];

  always @(posedge clk) if (rst_n) begin
    if (eng_start) n_start++;
    if (out_valid && !out_ready) n_out_stall++;
  end

  task automatic load();
    for (int i = 0; i < WORDS; i++) begin
      words[i] = W'($urandom);
      while ($urandom_range(2) == 0) @(negedge clk);
      in_valid = 1'b1;
      in_data  = words[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  task automatic round(input int r);
    int s0;
    s0 = n_start;
    load();
    repeat (2) @(negedge clk);
    checks++;
    if (n_start != s0 + 1) begin failures++; $display("round %0d: %0d start pulses", r, n_start - s0); end
    // offer a word while the engine runs: it must not be taken
    in_valid = 1'b1;
    in_data  = 8'hA5;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (in_ready) begin failures++; $display("round %0d: in_ready while running", r); end
      else n_in_stall++;
    end
    in_valid = 1'b0;
    if (r > 0) begin
      // the engine changes the matrix
      for (int i = 0; i < WORDS; i++) begin
        tb_we = 1'b1; tb_waddr = AW'(i); tb_wdata = ~words[i] ^ W'(i); words[i] = tb_wdata;
        @(negedge clk);
      end
      tb_we = 1'b0;
    end
    eng_done = 1'b1;
    eng_fail = (r == 0);
    @(negedge clk);
    eng_done = 1'b0;
    eng_fail = 1'b0;
    if (r == 0) begin
      repeat (3) @(negedge clk);
      checks++;
      if (!in_ready || out_valid) begin failures++; $display("no return to load after failure"); end
    end else begin
      for (int i = 0; i < WORDS; i++) begin
        out_ready = ($urandom_range(1) != 0);
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = ($urandom_range(1) != 0);
          @(posedge clk);
        end
        checks++;
        if (out_data !== words[i] || out_last !== (i == WORDS - 1)) begin
          failures++;
          $display("round %0d word %0d: %h last %0b, expected %h", r, i, out_data, out_last, words[i]);
        end
        @(negedge clk);
      end
      out_ready = 1'b0;
      repeat (2) @(negedge clk);
      checks++;
      if (!in_ready || out_valid) begin failures++; $display("no return to load after unload"); end
    end
  endtask

  initial begin : stimulus
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 3; r++) round(r);
    checks++;
    if (n_out_stall == 0 || n_in_stall == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
