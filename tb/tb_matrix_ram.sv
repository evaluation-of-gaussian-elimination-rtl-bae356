// Test of the matrix store: 20 words of 16 bits, a depth that is not a
// power of two. Random writes and reads run together against a shadow
// array; a read must return its word one cycle later, rdata must hold while
// re is low, and a read of the word being written returns the old word.
module tb_matrix_ram;

  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 20;
  localparam int unsigned AW = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             we = 1'b0, re = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  always #5 clk = ~clk;

  matrix_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  logic             pending;

  initial begin : stimulus
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = WIDTH'($urandom);
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    pending = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("read %0d: got %h expected %h", i, rdata, expect_q);
        end
      end
      re    = ($urandom_range(3) != 0);
      raddr = AW'($urandom_range(DEPTH - 1));
      we    = ($urandom_range(1) != 0);
      waddr = ($urandom_range(3) == 0) ? raddr : AW'($urandom_range(DEPTH - 1));
      wdata = WIDTH'($urandom);
      if (re) expect_q = shadow[raddr];
      pending = 1'b1;
      @(posedge clk);
      #1;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
