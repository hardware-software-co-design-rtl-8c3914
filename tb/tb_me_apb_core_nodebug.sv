// tb_me_apb_core_nodebug: the APB motion-estimation core built without the
// run-time debug facility (DEBUG = 0).
//
// Over APB (60 MHz bus clock, 90 MHz ME clock) the testbench uploads a three
// step search and a macroblock, arms both breakpoints and starts the
// processor. Without the debug facility the breakpoints, goto, step and stop
// must have no effect: the search runs to HALT with the same result and the
// same cycle count as the reference model, and the debug registers read 0.
// START, BANK, RESET and the result registers work as in the full core.
module tb_me_apb_core_nodebug;
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

  me_apb_core #(.DEBUG(1'b0)) dut (.*);

  logic [7:0] cur [N*N];
  logic [7:0] ref_pix [SA_W*SA_W];
  `include "me_fw.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int me_cyc = 0, t_start = 0, t_halt = 0, n_start = 0, n_ignored = 0;
  logic halted_d = 0;
  always @(posedge me_clk) begin
    me_cyc++;
    if (dut.cmd_start) begin n_start++; t_start = me_cyc; end
    if (dut.halted && !halted_d) t_halt = me_cyc;
    if (dut.cmd_stop || dut.cmd_step || dut.cmd_goto) n_ignored++;
    halted_d <= dut.halted;
  end

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

  task automatic run_and_check(input string name, input logic [31:0] p[$]);
    ref_result_t r;
    logic [31:0] s, x, y, sad;
    r = ref_run(p);
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_START));
    // Debug commands while the search runs: all must be ignored.
    cmd(CMD_STOP);
    cmd(CMD_STEP);
    cmd(CMD_GOTO);
    wait_stopped(s);
    check(s[STAT_DONE] && !s[STAT_BREAK], $sformatf("%s: status 0x%0h", name, s));
    check(t_halt - t_start == r.cycles,
          $sformatf("%s: %0d ME cycles, expected %0d", name, t_halt - t_start, r.cycles));
    apb_read(REG_MV_X, x);
    apb_read(REG_MV_Y, y);
    apb_read(REG_SAD, sad);
    check(x == 32'(r.bx) && y == 32'(r.by) && sad == 32'(r.bs),
          $sformatf("%s: MV (%0d,%0d) SAD %0d, expected (%0d,%0d) SAD %0d", name,
                    int'(signed'(x)), int'(signed'(y)), sad, r.bx, r.by, r.bs));
    $display("%s: MV (%0d,%0d) SAD %0d in %0d ME cycles", name, r.bx, r.by, r.bs, r.cycles);
  endtask

  initial begin
    repeat (2_000_000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p[$];
    logic [31:0] d;
    repeat (5) @(negedge pclk);
    presetn = 1'b1;
    repeat (10) @(negedge pclk);

    make_scene(-5, 9, 6);
    p.delete(); fw_3ss(p);
    apb_write(REG_ADDRESS, {18'd0, MEM_PROG, 12'd0});
    foreach (p[i]) apb_write(REG_DATA_IN, p[i]);
    apb_write(REG_ADDRESS, {18'd0, MEM_MB, 12'd0});
    for (int w = 0; w < N*N/4; w++)
      apb_write(REG_DATA_IN, {cur[4*w+3], cur[4*w+2], cur[4*w+1], cur[4*w]});
    apb_write(REG_ADDRESS, {18'd0, MEM_SA, 12'd0});
    for (int w = 0; w < SA_W*SA_W/4; w++)
      apb_write(REG_DATA_IN, {ref_pix[4*w+3], ref_pix[4*w+2], ref_pix[4*w+1], ref_pix[4*w]});
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_BANK));

    // Breakpoints, goto target and register select cannot be set.
    apb_write(REG_ICE_BP0, 32'h8000_0004);
    apb_write(REG_ICE_BP1, 32'h8000_0010);
    apb_write(REG_ICE_GOTO, 32'd7);
    apb_write(REG_ICE_RSEL, 32'd3);
    apb_read(REG_ICE_BP0, d);  check(d == 0, "breakpoint 0 register reads 0");
    apb_read(REG_ICE_BP1, d);  check(d == 0, "breakpoint 1 register reads 0");
    apb_read(REG_ICE_GOTO, d); check(d == 0, "goto register reads 0");
    apb_read(REG_ICE_RSEL, d); check(d == 0, "register select reads 0");

    run_and_check("3SS without debug", p);
    apb_read(REG_ICE_RVAL, d); check(d == 0, "register view reads 0");

    // RESET and a second START still work.
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_RESET));
    repeat (10) @(negedge pclk);
    apb_write(REG_CTRL_CLR, 32'(1 << CTRL_RESET));
    repeat (10) @(negedge pclk);
    run_and_check("3SS after reset", p);

    check(n_start == 2 && n_ignored == 6, $sformatf("starts %0d, ignored debug commands %0d", n_start, n_ignored));
    $display("mechanisms: starts %0d, ignored debug commands %0d", n_start, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
