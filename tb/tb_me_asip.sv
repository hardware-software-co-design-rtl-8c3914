// tb_me_asip: self-checking test of the motion-estimation processor.
//
// Program, macroblock and search-area memories are modelled in the
// testbench (one-cycle reads); `go` is held high from the first start, as with a free-running
// in-circuit emulator. Full search, three step search and diamond search
// firmware is run on generated scenes (full search also on sub-blocks of
// every variable block size), plus a short program that exercises
// every ALU and branch instruction and out-of-range candidates. Results are
// compared with an instruction-set reference model (me_fw.svh), which also
// gives the exact cycle count from start to halt; the full-search result is
// also checked against a plain exhaustive minimum.
module tb_me_asip;
  import me_pkg::*;
  localparam int N    = 16;
  localparam int SR   = 32;
  localparam int SA_W = N + SR;
  localparam int HALF = SR / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5.555 clk = ~clk;

  logic               start = 1'b0, go = 1'b0, pc_load = 1'b0;
  logic [7:0]         pc_load_val = '0;
  logic [7:0]         prog_raddr, pc;
  logic [5:0]         mb_raddr;
  logic [9:0]         sa_raddr;
  logic [31:0]        prog_rdata, mb_rdata, sa_rdata;
  logic               fetch_wait, issue, halted, sad_done, sad_early, sad_skipped;
  logic signed [15:0] best_x, best_y;
  logic [15:0]        best_sad;
  logic [2:0]         dbg_rsel = '0;
  logic signed [15:0] dbg_rdata;

  me_asip #(.MB_SIZE(N), .SEARCH_RANGE(SR), .PROG_AW(8)) dut (.*);

  logic [7:0]  cur [N*N];
  logic [7:0]  ref_pix [SA_W*SA_W];
  logic [31:0] prog_mem [256];
  logic [31:0] mb_mem [N*N/4];
  logic [31:0] sa_mem [SA_W*SA_W/4];
  always_ff @(posedge clk) begin
    prog_rdata <= prog_mem[prog_raddr];
    mb_rdata   <= mb_mem[mb_raddr];
    sa_rdata   <= sa_mem[sa_raddr];
  end

  `include "me_fw.svh"

  int checks = 0, failures = 0;
  int n_sad = 0, n_early = 0, n_skip = 0;
  always @(posedge clk) begin
    if (sad_done) n_sad++;
    if (sad_early) n_early++;
    if (sad_skipped) n_skip++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input logic [31:0] p[$]);
    for (int i = 0; i < 256; i++) prog_mem[i] = (i < p.size()) ? p[i] : '0;
    for (int w = 0; w < N*N/4; w++)
      mb_mem[w] = {cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]};
    for (int w = 0; w < SA_W*SA_W/4; w++)
      sa_mem[w] = {ref_pix[4*w+3], ref_pix[4*w+2], ref_pix[4*w+1], ref_pix[4*w]};
  endtask

  task automatic run(input string name, input logic [31:0] p[$]);
    ref_result_t r;
    int cyc, s0, e0, k0;
    load(p);
    r = ref_run(p);
    s0 = n_sad; e0 = n_early; k0 = n_skip;
    @(negedge clk); start = 1'b1; go = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!halted) begin @(negedge clk); cyc++; end
    check(cyc == r.cycles, $sformatf("%s cycles %0d, expected %0d", name, cyc, r.cycles));
    check(best_x == 16'(r.bx) && best_y == 16'(r.by) && best_sad == 16'(r.bs),
          $sformatf("%s result (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d",
                    name, best_x, best_y, best_sad, r.bx, r.by, r.bs));
    for (int i = 0; i < 8; i++) begin
      dbg_rsel = 3'(i);
      #1 check(dbg_rdata == 16'(r.rf[i]), $sformatf("%s register r%0d = %0d, expected %0d",
                                                  name, i, dbg_rdata, r.rf[i]));
    end
    check(n_sad - s0 == r.n_sad && n_early - e0 == r.n_early && n_skip - k0 == r.n_skip,
          $sformatf("%s candidates %0d/%0d/%0d expected %0d/%0d/%0d", name,
                    n_sad - s0, n_early - e0, n_skip - k0, r.n_sad, r.n_early, r.n_skip));
    $display("%s: MV (%0d,%0d) SAD %0d, %0d cycles, %0d candidates, %0d stopped early, %0d skipped",
             name, best_x, best_y, best_sad, cyc, r.n_sad, r.n_early, r.n_skip);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p[$];
    int emin, ex, ey;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Full search, checked also against a plain exhaustive minimum.
    make_scene(6, -4, 8);
    p.delete(); fw_fsbm(p);
    run("FSBM", p);
    emin = 'hFFFF; ex = 0; ey = 0;
    for (int y = -HALF; y < HALF; y++)
      for (int x = -HALF; x < HALF; x++) begin
        int s;
        s = full_sad(x, y);
        if (s < emin) begin emin = s; ex = x; ey = y; end
      end
    check(best_sad == 16'(emin) && best_x == 16'(ex) && best_y == 16'(ey),
          "FSBM equals the exhaustive minimum");
    check(ex == 6 && ey == -4, "FSBM finds the planted displacement");

    // Variable block sizes: full search of sub-blocks, each checked against
    // a plain exhaustive minimum over that sub-block.
    for (int i = 0; i < 6; i++) begin
      int ws[6] = '{16, 8, 8, 8, 4, 4};
      int hs[6] = '{8, 16, 8, 4, 8, 4};
      int wc[6] = '{0, 1, 1, 1, 2, 2};
      int hc[6] = '{1, 0, 1, 2, 1, 2};
      int x0, y0;
      blk_imm_t b;
      x0 = 4 * $urandom_range(0, (N - ws[i]) / 4);
      y0 = 4 * $urandom_range(0, (N - hs[i]) / 4);
      b = '{unused: 4'd0, off_y4: 4'(y0 / 4), off_x4: 4'(x0 / 4), hsel: 2'(hc[i]), wsel: 2'(wc[i])};
      p.delete(); fw_fsbm(p, int'(b));
      run($sformatf("FSBM %0dx%0d at (%0d,%0d)", ws[i], hs[i], x0, y0), p);
      emin = 'hFFFF; ex = 0; ey = 0;
      for (int y = -HALF; y < HALF; y++)
        for (int x = -HALF; x < HALF; x++) begin
          int sd;
          sd = full_sad(x, y, ws[i], hs[i], x0, y0);
          if (sd < emin) begin emin = sd; ex = x; ey = y; end
        end
      check(best_sad == 16'(emin) && best_x == 16'(ex) && best_y == 16'(ey),
            $sformatf("sub-block %0dx%0d equals the exhaustive minimum", ws[i], hs[i]));
    end

    p.delete(); fw_3ss(p);
    run("3SS", p);
    p.delete(); fw_ds(p);
    run("DS", p);
    make_scene(-13, 9, 4);
    run("DS far", p);

    // ALU, branches and out-of-range candidates.
    p.delete();
    p.push_back(enc(OP_LDI, 0, 0, 0, 20));        // 0
    p.push_back(enc(OP_LDI, 1, 0, 0, -3));        // 1
    p.push_back(enc(OP_SAD, 0, 0, 1, 0));         // 2  x=20: outside
    p.push_back(enc(OP_SUB, 2, 1, 0, 0));         // 3  r2 = -23
    p.push_back(enc(OP_ADD, 3, 2, 0, 0));         // 4  r3 = -3
    p.push_back(enc(OP_BGE, 0, 3, 1, 7));         // 5  -3 >= -3: taken
    p.push_back(enc(OP_LDI, 0, 0, 0, 99));        // 6  skipped
    p.push_back(enc(OP_BEQ, 0, 3, 1, 9));         // 7  taken
    p.push_back(enc(OP_HALT, 0, 0, 0, 0));        // 8  skipped
    p.push_back(enc(OP_NOP, 0, 0, 0, 0));         // 9
    p.push_back(enc(OP_SAD, 0, 3, 1, 0));         // 10 (-3,-3)
    p.push_back(enc(OP_SAD, 0, 2, 1, 0));         // 11 x=-23: outside
    p.push_back(enc(OP_BNE, 0, 3, 1, 6));         // 12 not taken
    p.push_back(enc(OP_BLT, 0, 0, 2, 6));         // 13 20 < -23: not taken
    p.push_back(enc(OP_BLT, 0, 2, 0, 16));        // 14 taken
    p.push_back(enc(OP_HALT, 0, 0, 0, 0));        // 15 skipped
    p.push_back(enc(OP_GBX, 5, 0, 0, 0));         // 16 r5 = -3
    p.push_back(enc(OP_ADDI, 6, 5, 0, 1));        // 17 r6 = -2
    p.push_back(enc(OP_SAD, 0, 6, 6, 0));         // 18 (-2,-2)
    p.push_back(enc(OP_GBY, 4, 0, 0, 0));         // 19
    p.push_back(enc(OP_JMP, 0, 0, 0, 22));        // 20
    p.push_back(enc(OP_LDI, 4, 0, 0, 5));         // 21 skipped
    p.push_back(enc(OP_SAD, 0, 4, 4, 0));         // 22
    p.push_back(enc(OP_HALT, 0, 0, 0, 0));        // 23
    run("ALU/branch", p);
    check(n_skip >= 2 && n_early > 0, "mechanisms: skipped and early-terminated candidates");

    // Start while halted restarts the firmware.
    run("ALU/branch again", p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
