// End-to-end test of the elimination accelerator at a reduced size.
//
// MT = 20 rows, N = 44 columns and W = 8-bit blocks (NB = 6, so the pivot
// moves through three column blocks and the last block carries padding).
// Four matrices go through back to back:
//   0  solvable: [I | R] scrambled by random row swaps and row additions;
//      the only systematic form is [I | R], so R is known in advance
//   1  the same kind, then one row overwritten with a copy of another, so
//      the left part is singular and the run must fail
//   2  solvable again, loaded straight after the failure
//   3  fully random (fails or not, as it happens)
// A bit-level model of the reference loop nest gives, for every matrix,
// the expected reduced matrix, whether and at which pivot it fails, and from
// that the cycle count: sum over finished pivots r of
// (2*MT - r)*(NB - r/W) + 4, plus (MT - f)*(NB - f/W) + 2 for a pivot f that
// fails. The host streams stall at random, and the next matrix is offered
// while the engine is still busy, so both streams see back-pressure. Each
// mechanism (forward add, backward clear, pivot-row write-back, pivot block
// change, failure, success, load stall, unload stall) is counted and must
// occur at least once.
module tb_gauss_elim_top;

  localparam int unsigned MT = 20;
  localparam int unsigned N  = 44;
  localparam int unsigned W  = 8;
  localparam int unsigned NB = (N + W - 1) / W;
  localparam int unsigned RW = NB * W;
  localparam int NCASE = 4;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_ready;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, out_ready = 1'b0, out_last;
  logic [W-1:0]  out_data;
  logic          busy, done, fail;
  logic [31:0]   cycles;

  always #5 clk = ~clk;

  gauss_elim_top #(.MT(MT), .N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  logic [RW-1:0] mats [NCASE][MT];
  logic [RW-1:0] expd [NCASE][MT];
  logic          exp_fail [NCASE];
  int            exp_cyc  [NCASE];
  logic [RW-1:0] work [MT];

  function automatic logic [RW-1:0] rand_row(input int unsigned ncol);
    logic [RW-1:0] r = '0;
    for (int unsigned c = 0; c < ncol; c++) r[c] = 1'($urandom);
    return r;
  endfunction

  // Reference loop nest on `work`; returns the failing pivot or -1.
  function automatic int ref_reduce();
    for (int r = 0; r < MT; r++) begin
      for (int k = r + 1; k < MT; k++)
        if (work[r][r] != work[k][r]) work[r] ^= work[k];
      if (!work[r][r]) return r;
      for (int k = 0; k < MT; k++)
        if (k != r && work[k][r]) work[k] ^= work[r];
    end
    return -1;
  endfunction

  function automatic int cyc_of(input int f);
    int c = 0;
    int last = (f < 0) ? MT : f;
    for (int r = 0; r < last; r++) c += (2 * MT - r) * (NB - r / W) + 4;
    if (f >= 0) c += (MT - f) * (NB - f / W) + 2;
    return c;
  endfunction

  // [I | R] scrambled by invertible row operations.
  task automatic make_solvable(input int id);
    logic [RW-1:0] t;
    for (int r = 0; r < MT; r++) begin
      mats[id][r] = rand_row(N) & ~((RW'(1) << MT) - 1);
      mats[id][r][r] = 1'b1;
    end
    for (int i = 0; i < 6 * MT; i++) begin
      int a = int'($urandom_range(MT - 1));
      int b = int'($urandom_range(MT - 1));
      if (a == b) continue;
      if (i % 3 == 0) begin
        t = mats[id][a]; mats[id][a] = mats[id][b]; mats[id][b] = t;
      end else begin
        mats[id][b] ^= mats[id][a];
      end
    end
  endtask

  task automatic prepare(input int id);
    int f;
    for (int r = 0; r < MT; r++) work[r] = mats[id][r];
    f = ref_reduce();
    exp_fail[id] = (f >= 0);
    exp_cyc[id]  = cyc_of(f);
    for (int r = 0; r < MT; r++) expd[id][r] = work[r];
  endtask

  // mechanism counters
  int n_fwd_add, n_bwd_clr, n_piv_wb, n_pb_move, n_fail, n_ok;
  int n_in_stall, n_out_stall;
  logic [$bits(dut.u_ctrl.pb)-1:0] pb_prev = '0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_dp.op == gauss_pkg::DP_FWD && dut.u_dp.mask && dut.u_dp.first) n_fwd_add++;
    if (dut.u_dp.op == gauss_pkg::DP_BWD && dut.u_dp.mask && dut.u_dp.first) n_bwd_clr++;
    if (dut.u_dp.op == gauss_pkg::DP_PIV && dut.u_dp.first) n_piv_wb++;
    if (dut.u_ctrl.pb != pb_prev && dut.u_ctrl.pb != 0) n_pb_move++;
    pb_prev = dut.u_ctrl.pb;
    if (done && fail)  n_fail++;
    if (done && !fail) n_ok++;
    if (in_valid && !in_ready)   n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
  end

  // loader: offers every matrix as soon as the previous one is in
  initial begin : host_load
    @(posedge rst_n);
    for (int id = 0; id < NCASE; id++) begin
      for (int r = 0; r < MT; r++)
        for (int b = 0; b < NB; b++) begin
          while ($urandom_range(3) == 0) @(negedge clk);
          @(negedge clk);
          in_valid = 1'b1;
          in_data  = mats[id][r][b*W +: W];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
          in_valid = 1'b0;
        end
    end
  end

  // checker: result, status and cycle count of every matrix
  int busy_cyc;
  always @(posedge clk) if (busy) busy_cyc++;

  initial begin : result_check
    make_solvable(0);
    make_solvable(1);
    mats[1][MT - 3] = mats[1][4];
    make_solvable(2);
    for (int r = 0; r < MT; r++) mats[3][r] = rand_row(N);
    for (int id = 0; id < NCASE; id++) prepare(id);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int id = 0; id < NCASE; id++) begin
      busy_cyc = 0;
      @(posedge clk iff done);
      checks++;
      if (fail !== exp_fail[id]) begin
        failures++;
        $display("case %0d: fail=%0b, expected %0b", id, fail, exp_fail[id]);
      end
      checks++;
      if (cycles != 32'(exp_cyc[id]) || busy_cyc != exp_cyc[id]) begin
        failures++;
        $display("case %0d: cycles=%0d busy=%0d, expected %0d", id, cycles, busy_cyc, exp_cyc[id]);
      end
      if (!fail) begin
        for (int r = 0; r < MT; r++)
          for (int b = 0; b < NB; b++) begin
            @(negedge clk);
            out_ready = ($urandom_range(2) != 0);
            @(posedge clk);
            while (!(out_valid && out_ready)) begin
              @(negedge clk);
              out_ready = ($urandom_range(2) != 0);
              @(posedge clk);
            end
            checks++;
            if (out_data !== expd[id][r][b*W +: W]
                || out_last !== (r == MT - 1 && b == NB - 1)) begin
              failures++;
              $display("case %0d row %0d blk %0d: got %h expected %h last=%0b",
                       id, r, b, out_data, expd[id][r][b*W +: W], out_last);
            end
          end
        @(negedge clk);
        out_ready = 1'b0;
      end
    end
    // solvable matrices must come out as [I | R]
    for (int id = 0; id < NCASE; id += 2) begin
      checks++;
      for (int r = 0; r < MT; r++)
        if (expd[id][r][MT-1:0] != MT'(1) << r) begin
          failures++;
          $display("model: case %0d row %0d is not systematic", id, r);
          break;
        end
    end
    $display("mechanisms: fwd_add=%0d bwd_clear=%0d pivot_writeback=%0d pivot_block_moves=%0d fail=%0d success=%0d load_stall=%0d unload_stall=%0d",
             n_fwd_add, n_bwd_clr, n_piv_wb, n_pb_move, n_fail, n_ok, n_in_stall, n_out_stall);
    checks++; if (n_fwd_add == 0)   begin failures++; $display("no forward add");     end
    checks++; if (n_bwd_clr == 0)   begin failures++; $display("no backward clear");  end
    checks++; if (n_piv_wb == 0)    begin failures++; $display("no pivot write-back"); end
    checks++; if (n_pb_move == 0)   begin failures++; $display("no pivot block move"); end
    checks++; if (n_fail == 0)      begin failures++; $display("no failure");         end
    checks++; if (n_ok == 0)        begin failures++; $display("no success");         end
    checks++; if (n_in_stall == 0)  begin failures++; $display("no load stall");      end
    checks++; if (n_out_stall == 0) begin failures++; $display("no unload stall");    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
