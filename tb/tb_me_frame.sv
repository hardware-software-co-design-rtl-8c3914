// tb_me_frame: whole-frame workload for the APB motion-estimation core.
//
// Motion estimation of one QCIF picture (176x144 pixels, 11x9 = 99
// macroblocks of 16x16) against the previous picture, with each of the three
// search programs: full search, three step search and diamond search. The
// core runs at its default sizes (16x16 blocks, 32x32 search range), with a
// 60 MHz bus clock and a 90 MHz ME clock.
//
// The testbench plays the CPU and uses the two pixel banks as a pipeline:
// while the processor searches macroblock i, the macroblock i+1 and its 48x48
// search area are stored into the other bank; then the banks are swapped and
// the next search is started. Pixels outside the previous picture are taken
// from its nearest edge pixel, so every search area is complete.
//
// The pictures are generated: a textured background panning by (3,-2) and a
// rectangular object moving by (-7,5), plus noise. Every macroblock's result
// is compared with the instruction-set reference model of me_fw.svh; the full
// search SAD must also equal the exhaustive minimum, and neither fast search
// may beat it. The testbench prints, per picture, the ME computation time and
// the bus time spent on search areas, macroblocks and motion vectors.
module tb_me_frame;
  import me_pkg::*;
  localparam int N    = 16;
  localparam int SR   = 32;
  localparam int SA_W = N + SR;
  localparam int HALF = SR / 2;
  localparam int FW   = 176;           // QCIF
  localparam int FH   = 144;
  localparam int MBX  = FW / N;
  localparam int MBY  = FH / N;
  localparam int NMB  = MBX * MBY;

  logic pclk = 1'b0, me_clk = 1'b0, presetn = 1'b0;
  always #8.333 pclk = ~pclk;
  always #5.555 me_clk = ~me_clk;

  logic        psel = 0, penable = 0, pwrite = 0;
  logic [7:0]  paddr = '0;
  logic [31:0] pwdata = '0, prdata;

  me_apb_core dut (.*);

  logic [7:0] cur [N*N];
  logic [7:0] ref_pix [SA_W*SA_W];
  `include "me_fw.svh"

  logic [7:0] prev_f [FW*FH];
  logic [7:0] cur_f  [FW*FH];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- counters (ME clock domain) ----------------
  int n_early = 0, n_skip = 0, n_sad = 0, n_swap = 0, n_overlap = 0, n_mb = 0;
  int me_cyc = 0, t_start = 0, t_halt = 0;
  logic halted_d = 0;
  always @(posedge me_clk) begin
    me_cyc++;
    if (dut.u_asip.sad_done)    n_sad++;
    if (dut.u_asip.sad_early)   n_early++;
    if (dut.u_asip.sad_skipped) n_skip++;
    if (dut.cmd_start) t_start = me_cyc;
    if (dut.halted && !halted_d) t_halt = me_cyc;
    halted_d <= dut.halted;
  end

  // ---------------- APB master ----------------
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge pclk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge pclk); penable = 1;
    @(negedge pclk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge pclk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge pclk); penable = 1;
    @(posedge pclk); d = prdata;
    @(negedge pclk); psel = 0; penable = 0;
  endtask

  // Bus time per picture, in ns.
  realtime t_sa = 0, t_mbx = 0, t_mv = 0;

  task automatic upload_prog(input logic [31:0] p[$]);
    apb_write(REG_ADDRESS, {18'd0, MEM_PROG, 12'd0});
    foreach (p[i]) apb_write(REG_DATA_IN, p[i]);
  endtask

  // Copy macroblock i of the current picture and its search area in the
  // previous picture (edge pixels repeated) into cur / ref_pix.
  function automatic void load_mb(input int i);
    int x0, y0;
    x0 = (i % MBX) * N;
    y0 = (i / MBX) * N;
    for (int q = 0; q < N*N; q++)
      cur[q] = cur_f[(y0 + q / N) * FW + x0 + q % N];
    for (int y = 0; y < SA_W; y++)
      for (int x = 0; x < SA_W; x++) begin
        int fx, fy;
        fx = x0 - HALF + x;
        fy = y0 - HALF + y;
        fx = (fx < 0) ? 0 : (fx >= FW) ? FW - 1 : fx;
        fy = (fy < 0) ? 0 : (fy >= FH) ? FH - 1 : fy;
        ref_pix[y*SA_W + x] = prev_f[fy*FW + fx];
      end
  endfunction

  task automatic upload_mb();
    realtime t0;
    t0 = $realtime;
    apb_write(REG_ADDRESS, {18'd0, MEM_MB, 12'd0});
    for (int w = 0; w < N*N/4; w++)
      apb_write(REG_DATA_IN, {cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]});
    t_mbx += $realtime - t0;
    t0 = $realtime;
    apb_write(REG_ADDRESS, {18'd0, MEM_SA, 12'd0});
    for (int w = 0; w < SA_W*SA_W/4; w++)
      apb_write(REG_DATA_IN, {ref_pix[4*w+3], ref_pix[4*w+2], ref_pix[4*w+1], ref_pix[4*w]});
    t_sa += $realtime - t0;
  endtask

  task automatic swap_banks();
    logic [31:0] c;
    apb_read(REG_CTRL_SET, c);
    if (c[CTRL_BANK]) apb_write(REG_CTRL_CLR, 32'(1 << CTRL_BANK));
    else              apb_write(REG_CTRL_SET, 32'(1 << CTRL_BANK));
    n_swap++;
  endtask

  // Exhaustive minimum SAD of the loaded macroblock.
  function automatic int min_sad();
    int m = 'hFFFF;
    for (int cy = -HALF; cy < HALF; cy++)
      for (int cx = -HALF; cx < HALF; cx++) begin
        int s;
        s = full_sad(cx, cy);
        if (s < m) m = s;
      end
    return m;
  endfunction

  int fsbm_sad [NMB];

  // Motion estimation of the whole picture with program p.
  task automatic run_picture(input string name, input int algo, input logic [31:0] p[$]);
    ref_result_t r;
    logic [31:0] s, x, y, sad;
    longint me_total = 0;
    int n_planted = 0, s0 = n_sad, e0 = n_early;
    realtime t_pic;
    t_sa = 0; t_mbx = 0; t_mv = 0;
    upload_prog(p);
    load_mb(0);
    upload_mb();
    swap_banks();
    t_pic = $realtime;
    for (int i = 0; i < NMB; i++) begin
      int emin;
      realtime t0;
      r = ref_run(p);
      emin = (algo == 0) ? min_sad() : 0;
      apb_write(REG_CTRL_SET, 32'(1 << CTRL_START));
      if (i + 1 < NMB) begin
        load_mb(i + 1);
        upload_mb();
        apb_read(REG_STATUS, s);
        if (s[STAT_BUSY]) n_overlap++;
      end
      do apb_read(REG_STATUS, s); while (s[STAT_BUSY]);
      check(s[STAT_DONE], $sformatf("%s MB %0d: done", name, i));
      check(t_halt - t_start == r.cycles,
            $sformatf("%s MB %0d: %0d ME cycles, expected %0d", name, i, t_halt - t_start, r.cycles));
      me_total += longint'(t_halt) - longint'(t_start);
      t0 = $realtime;
      apb_read(REG_MV_X, x);
      apb_read(REG_MV_Y, y);
      apb_read(REG_SAD, sad);
      t_mv += $realtime - t0;
      check(x == 32'(r.bx) && y == 32'(r.by) && sad == 32'(r.bs),
            $sformatf("%s MB %0d: MV (%0d,%0d) SAD %0d, expected (%0d,%0d) SAD %0d", name, i,
                      int'(signed'(x)), int'(signed'(y)), sad, r.bx, r.by, r.bs));
      if (algo == 0) begin
        check(r.bs == emin, $sformatf("%s MB %0d: SAD %0d, exhaustive minimum %0d", name, i, r.bs, emin));
        fsbm_sad[i] = r.bs;
      end else begin
        check(r.bs >= fsbm_sad[i], $sformatf("%s MB %0d: SAD below the full search", name, i));
      end
      if ((r.bx == 3 && r.by == -2) || (r.bx == -7 && r.by == 5)) n_planted++;
      n_mb++;
      if (i + 1 < NMB) swap_banks();
    end
    $display("%s: %0d MBs, %0d ME cycles = %0.2f ms at 90 MHz; bus time SA %0.2f ms, MB %0.2f ms, MV %0.3f ms; picture done in %0.2f ms; %0d candidates, %0d stopped early; %0d MBs on a planted vector",
             name, NMB, me_total, real'(me_total) / 90.0e3, t_sa / 1.0e6, t_mbx / 1.0e6,
             t_mv / 1.0e6, ($realtime - t_pic) / 1.0e6, n_sad - s0, n_early - e0, n_planted);
  endtask

  initial begin
    logic [31:0] p[$];
    // Previous picture: smooth texture with noise. Current picture: the
    // background moved by (3,-2), an object moved by (-7,5), new noise.
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        prev_f[y*FW + x] = 8'((x * 7 + y * 3) % 97 + ((x / 5 + y / 7) % 3) * 40
                              + (((x - 88) * (x - 88) + (y - 72) * (y - 72)) >> 6)
                              + $urandom_range(0, 10));
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int sx, sy;
        bit obj;
        obj = x >= 48 && x < 96 && y >= 32 && y < 80;
        sx = obj ? x - 7 : x + 3;
        sy = obj ? y + 5 : y - 2;
        sx = (sx < 0) ? 0 : (sx >= FW) ? FW - 1 : sx;
        sy = (sy < 0) ? 0 : (sy >= FH) ? FH - 1 : sy;
        cur_f[y*FW + x] = 8'(prev_f[sy*FW + sx] + $urandom_range(0, 6));
      end

    repeat (5) @(negedge pclk);
    presetn = 1'b1;
    repeat (10) @(negedge pclk);

    p.delete(); fw_fsbm(p); run_picture("FSBM", 0, p);
    p.delete(); fw_ds(p);   run_picture("DS",   1, p);
    p.delete(); fw_3ss(p);  run_picture("3SS",  2, p);

    check(n_mb == 3 * NMB, "every macroblock searched");
    check(n_overlap > 0 && n_swap > 0 && n_early > 0, "overlapped uploads, bank swaps, early termination");
    $display("mechanisms: macroblocks %0d, bank swaps %0d, overlapped uploads %0d, early terminations %0d, skipped %0d",
             n_mb, n_swap, n_overlap, n_early, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
