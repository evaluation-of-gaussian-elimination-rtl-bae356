// Test of the elimination controller alone, MT = 6 rows, NB = 3 blocks of
// W = 2 bits (so the pivot block moves twice).
//
// The test writes out the schedule the loop nest must follow and checks the
// controller against it cycle by cycle: every stage-1 datapath command (op,
// first, block, pivot bit and block) with the read issued for it one cycle
// before and the write-back it makes, then done, fail and the cycle count.
// The datapath's pivot bit is driven by the test: always 1 for a run that
// succeeds, 0 at one chosen pivot for runs that must stop there.
module tb_gauss_ctrl;

  import gauss_pkg::*;

  localparam int unsigned MT = 6;
  localparam int unsigned NB = 3;
  localparam int unsigned W  = 2;
  localparam int unsigned AW = $clog2(MT * NB);
  localparam int unsigned BW = $clog2(NB);
  localparam int unsigned SW = $clog2(W);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          busy, done, fail;
  logic [31:0]   cycles;
  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  dp_op_t        dp_op;
  logic          dp_first;
  logic [BW-1:0] dp_blk, dp_pblk;
  logic [SW-1:0] dp_bit;
  logic          pivot_bit;

  always #5 clk = ~clk;

  gauss_ctrl #(.MT(MT), .NB(NB), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  typedef struct {
    dp_op_t op;
    int     row;
    int     blk;
    int     pivot;
  } step_t;

  step_t sched [$];
  int    fail_at;

  function automatic void plan(input int f);
    sched.delete();
    for (int r = 0; r < MT; r++) begin
      int pb = r / W;
      for (int b = pb; b < NB; b++) sched.push_back('{DP_LOAD, r, b, r});
      for (int k = r + 1; k < MT; k++)
        for (int b = pb; b < NB; b++) sched.push_back('{DP_FWD, k, b, r});
      if (r == f) return;
      for (int k = 0; k < MT; k++)
        for (int b = pb; b < NB; b++) sched.push_back('{k == r ? DP_PIV : DP_BWD, k, b, r});
    end
  endfunction

  function automatic int cyc_of(input int f);
    int c = 0;
    int last = (f < 0) ? MT : f;
    for (int r = 0; r < last; r++) c += (2 * MT - r) * (NB - r / W) + 4;
    if (f >= 0) c += (MT - f) * (NB - f / W) + 2;
    return c;
  endfunction

  // pivot bit as the datapath would report it
  int cur_pivot;
  assign pivot_bit = !(fail_at >= 0 && cur_pivot == fail_at);

  logic          rd_en_q;
  logic [AW-1:0] rd_addr_q;
  always @(posedge clk) begin
    rd_en_q   <= rd_en;
    rd_addr_q <= rd_addr;
  end

  task automatic run(input int f);
    step_t s;
    int    idx, exp_c;
    fail_at = f;
    cur_pivot = 0;
    plan(f);
    exp_c = cyc_of(f);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    idx = 0;
    while (!done) begin
      if (dp_op != DP_IDLE) begin
        checks++;
        if (idx >= sched.size()) begin
          failures++;
          $display("extra command %s", dp_op.name());
        end else begin
          s = sched[idx];
          cur_pivot = s.pivot;
          if (dp_op != s.op || int'(dp_blk) != s.blk || dp_first != (s.blk == s.pivot / W)
              || int'(dp_bit) != s.pivot % W || int'(dp_pblk) != s.pivot / W
              || (s.op != DP_PIV && (!rd_en_q || int'(rd_addr_q) != s.row * NB + s.blk))
              || (wr_en != (s.op == DP_BWD || s.op == DP_PIV))
              || (wr_en && int'(wr_addr) != s.row * NB + s.blk)) begin
            failures++;
            $display("step %0d: got %s blk %0d first %0b rd %0d wr %0b/%0d; expected %s row %0d blk %0d",
                     idx, dp_op.name(), dp_blk, dp_first, rd_addr_q, wr_en, wr_addr,
                     s.op.name(), s.row, s.blk);
          end
        end
        idx++;
        if (idx < sched.size()) cur_pivot = sched[idx].pivot;
      end
      @(negedge clk);
    end
    checks++;
    if (idx != sched.size() || fail != (f >= 0) || cycles != 32'(exp_c)) begin
      failures++;
      $display("run f=%0d: %0d of %0d steps, fail=%0b, cycles=%0d expected %0d",
               f, idx, sched.size(), fail, cycles, exp_c);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("not idle after done"); end
  endtask

  initial begin : stimulus
    fail_at = -1;
    cur_pivot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(-1);
    run(0);
    run(3);
    run(MT - 1);
    run(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
