// tb_me_agu: self-checking test of the address generation unit.
//
// For random and corner candidate vectors, and for the whole macroblock and
// sub-blocks of every size, it walks all pixels of the block and compares the
// macroblock and search-area byte addresses, the `last` flag and the range
// flag with values computed from the raster formulas
//   mb = (oy + row) * MB_SIZE + ox + col
//   sa = (cy + R/2 + oy + row) * (MB_SIZE + R) + (cx + R/2 + ox + col)
// where (ox, oy) is the sub-block's offset inside the macroblock.
module tb_me_agu;
  localparam int N    = 16;
  localparam int SR   = 32;
  localparam int SA_W = N + SR;
  localparam int HALF = SR / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start = 1'b0, advance = 1'b0;
  logic signed [15:0] cand_x = '0, cand_y = '0;
  logic [3:0]         w_m1 = 4'd15, h_m1 = 4'd15, off_x = '0, off_y = '0;
  logic [7:0]         mb_addr;
  logic [11:0]        sa_addr;
  logic               last, in_range;

  me_agu #(.MB_SIZE(N), .SEARCH_RANGE(SR)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_sub = 0;
  task automatic walk(input int cx, input int cy, input int w = N, input int h = N,
                      input int ox = 0, input int oy = 0);
    bit inr;
    inr = (cx >= -HALF) && (cx < HALF) && (cy >= -HALF) && (cy < HALF);
    @(negedge clk);
    cand_x = 16'(cx); cand_y = 16'(cy); start = 1'b1;
    w_m1 = 4'(w - 1); h_m1 = 4'(h - 1); off_x = 4'(ox); off_y = 4'(oy);
    @(negedge clk);
    start = 1'b0;
    // The block inputs are latched at start.
    w_m1 = 4'($urandom); h_m1 = 4'($urandom); off_x = 4'($urandom); off_y = 4'($urandom);
    if (w != N || h != N) n_sub++;
    check(in_range == inr, $sformatf("in_range (%0d,%0d)", cx, cy));
    if (inr) begin
      for (int p = 0; p < w*h; p++) begin
        int exp_sa, exp_mb;
        exp_sa = (cy + HALF + oy + p / w) * SA_W + (cx + HALF + ox + p % w);
        exp_mb = (oy + p / w) * N + ox + p % w;
        check(mb_addr == 8'(exp_mb), $sformatf("mb_addr pixel %0d", p));
        check(sa_addr == 12'(exp_sa), $sformatf("sa_addr (%0d,%0d) pixel %0d: %0d, expected %0d",
                                                cx, cy, p, sa_addr, exp_sa));
        check(last == (p == w*h-1), $sformatf("last at pixel %0d", p));
        // Hold the address for a cycle now and then.
        if (p % 37 == 5) @(negedge clk);
        advance = 1'b1;
        @(negedge clk);
        advance = 1'b0;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    walk(0, 0);
    walk(-HALF, -HALF);
    walk(HALF - 1, HALF - 1);
    walk(HALF - 1, -HALF);
    for (int i = 0; i < 6; i++) walk($urandom_range(0, SR - 1) - HALF, $urandom_range(0, SR - 1) - HALF);
    walk(HALF, 0);
    walk(-HALF - 1, 3);
    walk(2, HALF);
    walk(2, -HALF - 1);
    // Variable block sizes: 16x8, 8x16, 8x8, 8x4, 4x8, 4x4 at several offsets.
    walk(3, -2, 16, 8, 0, 8);
    walk(-HALF, HALF - 1, 8, 16, 8, 0);
    walk(HALF - 1, -HALF, 8, 8, 8, 8);
    walk(-5, 7, 8, 4, 4, 12);
    walk(1, 1, 4, 8, 12, 4);
    walk(HALF - 1, HALF - 1, 4, 4, 12, 12);
    walk(0, 0, 4, 4, 0, 0);
    check(n_sub == 7, "sub-block walks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
