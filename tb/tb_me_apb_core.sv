// tb_me_apb_core: end-to-end test of the APB motion-estimation core.
//
// The testbench plays the CPU: over AMBA-2.0 APB (60 MHz bus clock, ME clock
// 90 MHz) it uploads firmware and pixel data with Data Input stores, reads
// them back through Data Output, starts the processor, polls the status
// register and reads the motion vector and SAD. Full search, three step
// search and diamond search run at the core's default sizes (16x16 block,
// 32x32 search range), on sub-blocks of the variable block sizes, and a
// short program with out-of-range candidates. One search runs while the next
// macroblock is uploaded into the other memory bank.
// Every result, candidate count and the processor cycle count is compared
// with the instruction-set reference model of me_fw.svh. Debug features are
// exercised too: both breakpoints, single step, stop, goto, run, and the
// reset control bit, and after every run the processor's registers are read
// through the debug register view. Each mechanism is counted; one that never
// happens is a failure.
module tb_me_apb_core;
  import me_pkg::*;
  localparam int N    = 16;
  localparam int SR   = 32;
  localparam int SA_W = N + SR;
  localparam int HALF = SR / 2;

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

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters (ME clock domain) ----------------
  int n_early = 0, n_skip = 0, n_better = 0, n_sad = 0, n_bp0 = 0, n_bp1 = 0;
  int n_step = 0, n_stop = 0, n_goto = 0, n_run = 0, n_start = 0, n_reset = 0;
  int n_dropped = 0, n_readback = 0, n_swap = 0, n_overlap = 0, n_vbs = 0, n_regview = 0;
  int me_cyc = 0, t_start = 0, t_halt = 0;
  logic halted_d = 0;
  always @(posedge me_clk) begin
    me_cyc++;
    if (dut.u_asip.sad_done)    n_sad++;
    if (dut.u_asip.sad_early)   n_early++;
    if (dut.u_asip.sad_skipped) n_skip++;
    if (dut.u_asip.u_sad.better) n_better++;
    if (dut.u_ice.bp_hit && dut.pc == dut.bp0_pc && dut.bp0_en) n_bp0++;
    if (dut.u_ice.bp_hit && dut.pc == dut.bp1_pc && dut.bp1_en) n_bp1++;
    if (dut.cmd_step)  n_step++;
    if (dut.cmd_stop)  n_stop++;
    if (dut.cmd_goto)  n_goto++;
    if (dut.cmd_run)   n_run++;
    if (dut.cmd_start) begin n_start++; t_start = me_cyc; end
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

  task automatic cmd(input ice_cmd_e c);
    logic [31:0] s;
    do apb_read(REG_STATUS, s); while (s[STAT_CMD]);
    apb_write(REG_ICE_CMD, 32'(c));
  endtask

  task automatic wait_stopped(output logic [31:0] s);
    do apb_read(REG_STATUS, s); while (s[STAT_BUSY]);
  endtask

  task automatic upload_prog(input logic [31:0] p[$]);
    apb_write(REG_ADDRESS, {18'd0, MEM_PROG, 12'd0});
    foreach (p[i]) apb_write(REG_DATA_IN, p[i]);
  endtask

  task automatic upload_scene();
    logic [31:0] d;
    apb_write(REG_ADDRESS, {18'd0, MEM_MB, 12'd0});
    for (int w = 0; w < N*N/4; w++)
      apb_write(REG_DATA_IN, {cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]});
    apb_write(REG_ADDRESS, {18'd0, MEM_SA, 12'd0});
    for (int w = 0; w < SA_W*SA_W/4; w++)
      apb_write(REG_DATA_IN, {ref_pix[4*w+3], ref_pix[4*w+2], ref_pix[4*w+1], ref_pix[4*w]});
    // Read the macroblock back through Data Output.
    apb_write(REG_ADDRESS, {18'd0, MEM_MB, 12'd0});
    for (int w = 0; w < N*N/4; w++) begin
      apb_read(REG_DATA_OUT, d);
      check(d == {cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]}, $sformatf("MB read-back word %0d", w));
      n_readback++;
    end
  endtask

  // Hand the freshly uploaded bank to the processor.
  task automatic swap_banks();
    logic [31:0] c;
    apb_read(REG_CTRL_SET, c);
    if (c[CTRL_BANK]) apb_write(REG_CTRL_CLR, 32'(1 << CTRL_BANK));
    else              apb_write(REG_CTRL_SET, 32'(1 << CTRL_BANK));
    n_swap++;
  endtask

  task automatic check_result(input string name, input ref_result_t r);
    logic [31:0] x, y, s;
    apb_read(REG_MV_X, x);
    apb_read(REG_MV_Y, y);
    apb_read(REG_SAD, s);
    check(x == 32'(r.bx) && y == 32'(r.by) && s == 32'(r.bs),
          $sformatf("%s: MV (%0d,%0d) SAD %0d, expected (%0d,%0d) SAD %0d",
                    name, int'(signed'(x)), int'(signed'(y)), s, r.bx, r.by, r.bs));
  endtask

  // Read the stopped processor's registers through the debug view.
  task automatic check_regs(input string name, input ref_result_t r);
    logic [31:0] d;
    for (int i = 0; i < 8; i++) begin
      apb_write(REG_ICE_RSEL, 32'(i));
      apb_read(REG_ICE_RVAL, d);
      check(d == 32'(r.rf[i]), $sformatf("%s: r%0d = %0d, expected %0d", name, i, int'(signed'(d)), r.rf[i]));
      n_regview++;
    end
  endtask

  task automatic run_algo(input string name, input logic [31:0] p[$]);
    ref_result_t r;
    logic [31:0] s;
    int s0, e0, k0;
    r = ref_run(p);
    upload_prog(p);
    s0 = n_sad; e0 = n_early; k0 = n_skip;
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_START));
    wait_stopped(s);
    check(s[STAT_DONE] && !s[STAT_BREAK], $sformatf("%s: status 0x%0h", name, s));
    check(t_halt - t_start == r.cycles, $sformatf("%s: %0d ME cycles, expected %0d",
                                                  name, t_halt - t_start, r.cycles));
    check(n_sad - s0 == r.n_sad && n_early - e0 == r.n_early && n_skip - k0 == r.n_skip,
          $sformatf("%s: candidate counts", name));
    check_result(name, r);
    check_regs(name, r);
    $display("%s: MV (%0d,%0d) SAD %0d in %0d ME cycles; %0d candidates, %0d stopped early, %0d skipped",
             name, r.bx, r.by, r.bs, r.cycles, r.n_sad, r.n_early, r.n_skip);
  endtask

  initial begin
    repeat (2_000_000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p[$], d, s;
    ref_result_t r;
    repeat (4) @(negedge pclk);
    presetn = 1;
    repeat (4) @(negedge pclk);

    // --- the three search algorithms on one macroblock ---
    make_scene(6, -4, 8);
    upload_scene();
    swap_banks();
    p.delete(); fw_fsbm(p); run_algo("FSBM", p);
    p.delete(); fw_3ss(p);  run_algo("3SS", p);
    p.delete(); fw_ds(p);   run_algo("DS", p);
    // Variable block size: full search of an 8x8 and a 4x8 sub-block.
    p.delete(); fw_fsbm(p, int'(blk_imm_t'{unused: 4'd0, off_y4: 4'd2, off_x4: 4'd2, hsel: 2'd1, wsel: 2'd1}));
    run_algo("FSBM 8x8 sub-block at (8,8)", p);
    n_vbs++;
    p.delete(); fw_fsbm(p, int'(blk_imm_t'{unused: 4'd0, off_y4: 4'd0, off_x4: 4'd3, hsel: 2'd1, wsel: 2'd2}));
    run_algo("FSBM 4x8 sub-block at (12,0)", p);
    n_vbs++;

    // The next macroblock is uploaded into the other bank while the
    // processor searches the current one.
    p.delete(); fw_ds(p);
    r = ref_run(p);
    upload_prog(p);
    p.delete(); fw_fsbm(p);
    r = ref_run(p);
    upload_prog(p);
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_START));
    make_scene(-15, 12, 4);
    upload_scene();
    apb_read(REG_STATUS, s);
    if (s[STAT_BUSY]) n_overlap++;
    check(s[STAT_BUSY], "upload overlapped the search");
    wait_stopped(s);
    check(s[STAT_DONE], "search during upload completes");
    check_result("FSBM while the next block is uploaded", r);
    swap_banks();
    p.delete(); fw_ds(p);
    run_algo("DS near the edge", p);
    p.delete(); fw_fsbm(p); run_algo("FSBM near the edge", p);

    // --- out-of-range candidates ---
    p.delete();
    p.push_back(enc(OP_CLRB, 0, 0, 0, 0));
    p.push_back(enc(OP_LDI, 0, 0, 0, -HALF - 1));
    p.push_back(enc(OP_LDI, 1, 0, 0, 0));
    p.push_back(enc(OP_SAD, 0, 0, 1, 0));        // outside
    p.push_back(enc(OP_LDI, 0, 0, 0, -HALF));
    p.push_back(enc(OP_SAD, 0, 0, 1, 0));        // inside, at the edge
    p.push_back(enc(OP_LDI, 1, 0, 0, HALF));
    p.push_back(enc(OP_SAD, 0, 0, 1, 0));        // outside
    p.push_back(enc(OP_HALT, 0, 0, 0, 0));
    run_algo("edge candidates", p);

    // --- debugging: breakpoints, step, stop, goto, run ---
    p.delete(); fw_3ss(p);
    r = ref_run(p);
    upload_prog(p);
    apb_write(REG_ICE_BP0, 32'h8000_0004);       // the first SAD
    apb_write(REG_ICE_BP1, 32'h8000_0000 | 32'(5 + 2 + 24));  // GBX after step 1
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_START));
    wait_stopped(s);
    apb_read(REG_ICE_PC, d);
    check(s[STAT_BREAK] && !s[STAT_DONE] && d == 4, $sformatf("breakpoint 0: status 0x%0h PC %0d", s, d));
    cmd(CMD_STEP);
    wait_stopped(s);
    apb_read(REG_ICE_PC, d);
    check(s[STAT_BREAK] && d == 5, $sformatf("single step: PC %0d", d));
    apb_read(REG_SAD, d);
    check(d == 32'(full_sad(0, 0)), "the stepped SAD instruction evaluated (0,0)");
    cmd(CMD_RUN);
    wait_stopped(s);
    apb_read(REG_ICE_PC, d);
    check(s[STAT_BREAK] && d == 31, $sformatf("breakpoint 1: PC %0d", d));
    cmd(CMD_RUN);
    wait_stopped(s);
    check(s[STAT_DONE] && !s[STAT_BREAK], "run to the end after breakpoints");
    check_result("3SS under the debugger", r);
    apb_write(REG_ICE_BP0, 32'h0);
    apb_write(REG_ICE_BP1, 32'h0);

    // Stop a long full search, then resume it.
    p.delete(); fw_fsbm(p);
    r = ref_run(p);
    upload_prog(p);
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_START));
    repeat (3000) @(negedge pclk);
    cmd(CMD_STOP);
    wait_stopped(s);
    check(s[STAT_BREAK] && !s[STAT_DONE], "stopped in the middle of the search");
    apb_read(REG_ICE_PC, d);
    repeat (200) @(negedge pclk);
    apb_read(REG_ICE_PC, s);
    check(d == s, "PC holds while stopped");
    cmd(CMD_RUN);
    wait_stopped(s);
    check(s[STAT_DONE], "resumed search completes");
    check_result("FSBM stopped and resumed", r);

    // goto: jump to the start of the program and run it again.
    apb_write(REG_ICE_GOTO, 32'd0);
    cmd(CMD_GOTO);
    apb_write(REG_ICE_CMD, 32'(CMD_RUN));        // dropped: GOTO still pending
    n_dropped++;
    cmd(CMD_RUN);
    wait_stopped(s);
    check(s[STAT_DONE], "goto 0 and run completes");
    check_result("FSBM after goto", r);
    check(n_run == 4, $sformatf("dropped command not delivered (runs %0d)", n_run));

    // Reset control bit: the processor's state returns to its reset values.
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_RESET));
    n_reset++;
    repeat (10) @(negedge pclk);
    apb_read(REG_SAD, d);
    apb_read(REG_STATUS, s);
    check(d == 32'hFFFF && !s[STAT_DONE], "reset clears the result and DONE");
    apb_write(REG_CTRL_CLR, 32'(1 << CTRL_RESET));
    p.delete(); fw_3ss(p);
    run_algo("3SS after reset", p);

    // --- every mechanism happened ---
    check(n_early > 0,    $sformatf("early terminations: %0d", n_early));
    check(n_skip > 0,     $sformatf("skipped candidates: %0d", n_skip));
    check(n_better > 1,   $sformatf("best updates: %0d", n_better));
    check(n_bp0 > 0 && n_bp1 > 0, $sformatf("breakpoint hits: %0d %0d", n_bp0, n_bp1));
    check(n_step > 0 && n_stop > 0 && n_goto > 0 && n_run > 0 && n_start > 0,
          $sformatf("commands: step %0d stop %0d goto %0d run %0d start %0d",
                    n_step, n_stop, n_goto, n_run, n_start));
    check(n_reset > 0 && n_dropped > 0 && n_readback > 0, "reset, dropped command, read-back");
    check(n_swap > 1 && n_overlap > 0 && n_vbs > 0, "bank swaps, overlapped upload, sub-blocks");
    check(n_regview > 0, "register view");
    $display("mechanisms: early %0d, skipped %0d, best updates %0d, bp0 %0d, bp1 %0d, step %0d, stop %0d, goto %0d, run %0d, start %0d, reset %0d, dropped %0d, read-back %0d, bank swaps %0d, overlapped uploads %0d, sub-block searches %0d, register reads %0d",
             n_early, n_skip, n_better, n_bp0, n_bp1, n_step, n_stop, n_goto, n_run, n_start,
             n_reset, n_dropped, n_readback, n_swap, n_overlap, n_vbs, n_regview);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
