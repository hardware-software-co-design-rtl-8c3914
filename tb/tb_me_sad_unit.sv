// tb_me_sad_unit: self-checking test of the SAD unit with early termination.
//
// Fills a macroblock memory and a search-area memory (one-cycle read models),
// plants an exact copy of the macroblock at one displacement, then evaluates
// a sequence of candidates (random ones, the planted one, out-of-range ones),
// for the whole macroblock and for sub-blocks of each variable block size.
// A reference model in the testbench computes the full or partial SAD, the
// pixel at which the running sum reaches the best SAD, the expected flags
// (better / early / skipped) and the exact latency from start to done.
module tb_me_sad_unit;
  localparam int N    = 16;
  localparam int SR   = 32;
  localparam int SA_W = N + SR;
  localparam int HALF = SR / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start = 1'b0, clr_best = 1'b0;
  logic signed [15:0] cand_x = '0, cand_y = '0;
  logic [3:0]         w_m1 = 4'd15, h_m1 = 4'd15, off_x = '0, off_y = '0;
  int bw = N, bh = N, bx0 = 0, by0 = 0;   // block being matched
  logic [5:0]         mb_raddr;
  logic [9:0]         sa_raddr;
  logic [31:0]        mb_rdata, sa_rdata;
  logic               busy, done, better, early, skipped;
  logic [15:0]        sad, best_sad;
  logic signed [15:0] best_x, best_y;

  me_sad_unit #(.MB_SIZE(N), .SEARCH_RANGE(SR)) dut (.*);

  logic [7:0]  cur [N*N];
  logic [7:0]  ref_pix [SA_W*SA_W];
  logic [31:0] mb_mem [N*N/4];
  logic [31:0] sa_mem [SA_W*SA_W/4];
  always_ff @(posedge clk) begin
    mb_rdata <= mb_mem[mb_raddr];
    sa_rdata <= sa_mem[sa_raddr];
  end

  int checks = 0, failures = 0;
  int n_early = 0, n_better = 0, n_skip = 0;
  int rbest = 'hFFFF, rbx = 0, rby = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic eval(input int cx, input int cy);
    int acc, k, lat, exp_lat;
    bit inr, rej;
    inr = (cx >= -HALF) && (cx < HALF) && (cy >= -HALF) && (cy < HALF);
    acc = 0; k = N*N-1; rej = 1'b0;
    if (inr) begin
      k = bw*bh-1;
      for (int p = 0; p < bw*bh; p++) begin
        int a, b;
        a = cur[(by0 + p / bw) * N + bx0 + p % bw];
        b = ref_pix[(cy + HALF + by0 + p / bw) * SA_W + (cx + HALF + bx0 + p % bw)];
        acc += (a > b) ? a - b : b - a;
        if (acc >= rbest) begin k = p; rej = 1'b1; break; end
      end
    end
    exp_lat = inr ? k + 3 : 2;
    @(negedge clk);
    cand_x = 16'(cx); cand_y = 16'(cy); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == exp_lat, $sformatf("latency (%0d,%0d): %0d, expected %0d", cx, cy, lat, exp_lat));
    check(skipped == !inr, $sformatf("skipped flag (%0d,%0d)", cx, cy));
    if (inr) begin
      check(sad == 16'(acc), $sformatf("sad (%0d,%0d): %0d, expected %0d", cx, cy, sad, acc));
      check(better == !rej, $sformatf("better flag (%0d,%0d)", cx, cy));
      check(early == (rej && k < bw*bh-1), $sformatf("early flag (%0d,%0d)", cx, cy));
      if (!rej) begin rbest = acc; rbx = cx; rby = cy; end
    end else begin
      check(!better && !early, "no flags on a skipped candidate");
    end
    if (early) n_early++;
    if (better) n_better++;
    if (skipped) n_skip++;
    @(negedge clk);
    check(best_sad == 16'(rbest) && best_x == 16'(rbx) && best_y == 16'(rby),
          $sformatf("best after (%0d,%0d): %0d (%0d,%0d) expected %0d (%0d,%0d)",
                    cx, cy, best_sad, best_x, best_y, rbest, rbx, rby));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Smooth reference picture with noise; the macroblock is a noisy copy
    // of the block at displacement (5,-3), and an exact copy sits at (-7,9).
    for (int y = 0; y < SA_W; y++)
      for (int x = 0; x < SA_W; x++)
        ref_pix[y*SA_W + x] = 8'((x * 5 + y * 3 + $urandom_range(0, 40)) & 8'hFF);
    for (int p = 0; p < N*N; p++)
      cur[p] = 8'(ref_pix[(-3 + HALF + p / N) * SA_W + (5 + HALF + p % N)] + $urandom_range(0, 6));
    for (int p = 0; p < N*N; p++)
      ref_pix[(9 + HALF + p / N) * SA_W + (-7 + HALF + p % N)] = cur[p];
    for (int w = 0; w < N*N/4; w++)
      mb_mem[w] = {cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]};
    for (int w = 0; w < SA_W*SA_W/4; w++)
      sa_mem[w] = {ref_pix[4*w+3], ref_pix[4*w+2], ref_pix[4*w+1], ref_pix[4*w]};

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(best_sad == 16'hFFFF, "best SAD is maximal after reset");
    // Random candidates, a corner, then the near match and the exact match.
    for (int i = 0; i < 30; i++)
      eval($urandom_range(0, SR - 1) - HALF, $urandom_range(0, SR - 1) - HALF);
    eval(-HALF, -HALF);
    eval(HALF - 1, HALF - 1);
    eval(HALF, 0);           // outside
    eval(0, -HALF - 1);      // outside
    eval(5, -3);
    eval(6, -3);
    eval(-7, 9);             // exact copy: SAD 0
    eval(5, -3);             // now stops at the first pixel
    eval(-7, 9);             // a tie is not better
    // Clearing the best restarts the search.
    @(negedge clk); clr_best = 1'b1; @(negedge clk); clr_best = 1'b0;
    rbest = 'hFFFF; rbx = 0; rby = 0;
    check(best_sad == 16'hFFFF && best_x == 0 && best_y == 0, "clr_best");
    eval(1, 1);
    eval(-7, 9);
    // Sub-blocks (variable block size): each starts a fresh search.
    for (int i = 0; i < 6; i++) begin
      int ws[6] = '{16, 8, 8, 8, 4, 4};
      int hs[6] = '{8, 16, 8, 4, 8, 4};
      bw = ws[i]; bh = hs[i];
      bx0 = 4 * $urandom_range(0, (N - bw) / 4);
      by0 = 4 * $urandom_range(0, (N - bh) / 4);
      w_m1 = 4'(bw - 1); h_m1 = 4'(bh - 1); off_x = 4'(bx0); off_y = 4'(by0);
      @(negedge clk); clr_best = 1'b1; @(negedge clk); clr_best = 1'b0;
      rbest = 'hFFFF; rbx = 0; rby = 0;
      for (int j = 0; j < 6; j++)
        eval($urandom_range(0, SR - 1) - HALF, $urandom_range(0, SR - 1) - HALF);
      eval(5, -3);
      eval(-7, 9);
      check(best_sad == 0 && best_x == -7 && best_y == 9, "sub-block matches the exact copy");
    end
    check(n_early > 0 && n_better > 1 && n_skip == 2, $sformatf(
          "mechanisms: early=%0d better=%0d skipped=%0d", n_early, n_better, n_skip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
