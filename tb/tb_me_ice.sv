// tb_me_ice: self-checking test of the in-circuit emulator.
//
// A tiny processor model in the testbench issues an instruction when `go`
// is high in its wait state, executes it in the next cycle (PC + 1) and
// halts at PC 60. The test runs into both breakpoints, resumes past them,
// single-steps, stops a running program, uses goto, restarts with start and
// checks that HALT ends a run. Every command's effect on PC, `running` and
// `brk` is compared with the expected value. A second emulator built without
// the debug facility watches the same run and must ignore every debug
// command.
module tb_me_ice;
  localparam int AW = 8;
  localparam int HALT_PC = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          cmd_start = 0, cmd_run = 0, cmd_stop = 0, cmd_step = 0, cmd_goto = 0;
  logic [AW-1:0] goto_pc = '0, bp0_pc = '0, bp1_pc = '0;
  logic          bp0_en = 0, bp1_en = 0;
  logic [AW-1:0] pc;
  logic          fetch_wait, issue, halted;
  logic          go, pc_load, running, step_pend, brk, bp_hit;
  logic [AW-1:0] pc_load_val;

  me_ice #(.PROG_AW(AW)) dut (.*);

  // A second emulator built without the debug facility sees the same
  // commands and processor state; it may never stop, step, load the PC or
  // flag a break, and lets the processor issue whenever it is running.
  logic nd_go, nd_pc_load, nd_running, nd_step_pend, nd_brk, nd_bp_hit;
  logic [AW-1:0] nd_pc_load_val;
  int   nd_bad = 0;
  me_ice #(.PROG_AW(AW), .DEBUG(1'b0)) u_nodebug (
    .clk, .rst_n, .cmd_start, .cmd_run, .cmd_stop, .cmd_step, .cmd_goto, .goto_pc,
    .bp0_en, .bp0_pc, .bp1_en, .bp1_pc, .pc, .fetch_wait, .issue(issue && nd_go), .halted,
    .go(nd_go), .pc_load(nd_pc_load), .pc_load_val(nd_pc_load_val), .running(nd_running),
    .step_pend(nd_step_pend), .brk(nd_brk), .bp_hit(nd_bp_hit));
  always @(posedge clk)
    if (rst_n && (nd_pc_load || nd_step_pend || nd_brk || nd_bp_hit ||
                  (nd_go != (fetch_wait && nd_running && !cmd_start)))) nd_bad++;

  // Processor model
  logic exec_q, halt_q;
  int   n_issued;
  assign fetch_wait = !exec_q && !halt_q;
  assign halted     = halt_q;
  assign issue      = fetch_wait && go && !cmd_start && !pc_load;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exec_q <= 0; halt_q <= 0; pc <= '0; n_issued <= 0;
    end else if (cmd_start && !exec_q) begin
      pc <= '0; halt_q <= 0;
    end else if (pc_load && !exec_q) begin
      pc <= pc_load_val; halt_q <= 0;
    end else if (exec_q) begin
      exec_q <= 0;
      if (pc == AW'(HALT_PC)) halt_q <= 1; else pc <= pc + 1'b1;
    end else if (issue) begin
      exec_q <= 1; n_issued <= n_issued + 1;
    end
  end

  int checks = 0, failures = 0;
  int n_bp = 0;
  always @(posedge clk) if (bp_hit) n_bp++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (pc=%0d running=%0b brk=%0b)", what, pc, running, brk); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1'b1; @(negedge clk); sig = 1'b0;
  endtask

  task automatic settle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    settle(5);
    check(pc == 0 && !running && n_issued == 0, "nothing runs after reset");
    bp0_en = 1; bp0_pc = 8'd10; bp1_en = 1; bp1_pc = 8'd25;
    pulse(cmd_start);
    settle(60);
    check(pc == 10 && !running && brk, "stopped at breakpoint 0");
    check(nd_running && nd_go, "without debug: the breakpoint is ignored");
    check(n_issued == 10, "ten instructions before breakpoint 0");
    pulse(cmd_run);
    settle(60);
    check(pc == 25 && !running && brk, "run passes breakpoint 0, stops at breakpoint 1");
    n0 = n_issued;
    pulse(cmd_step);
    settle(6);
    check(pc == 26 && n_issued == n0 + 1 && brk && !running, "step executes one instruction");
    pulse(cmd_step);
    settle(6);
    check(pc == 27 && n_issued == n0 + 2, "second step");
    // goto back before breakpoint 1 and run into it again
    goto_pc = 8'd20;
    pulse(cmd_goto);
    settle(2);
    check(pc == 20, "goto loads the PC");
    pulse(cmd_run);
    settle(30);
    check(pc == 25 && brk, "breakpoint 1 hit again after goto");
    // step onto a breakpoint address: a step ignores breakpoints
    goto_pc = 8'd10;
    pulse(cmd_goto);
    pulse(cmd_step);
    settle(6);
    check(pc == 11, "step executes the instruction at a breakpoint");
    // stop a free run
    bp0_en = 0; bp1_en = 0;
    pulse(cmd_run);
    settle(8);
    check(running && !brk, "running");
    pulse(cmd_stop);
    settle(4);
    n0 = pc;
    settle(10);
    check(!running && brk && pc == n0, "stop holds the PC");
    // run to HALT
    pulse(cmd_run);
    settle(150);
    check(halted && !running && pc == HALT_PC, "HALT ends the run");
    // start from a halted program
    pulse(cmd_start);
    settle(2);
    check(running && !halted, "start restarts");
    settle(150);
    check(halted && pc == HALT_PC, "second run ends at HALT");
    check(n_bp == 3, $sformatf("breakpoint hits: %0d", n_bp));
    check(nd_bad == 0, $sformatf("without debug: %0d cycles with a debug action", nd_bad));
    check(!nd_running, "without debug: HALT ends the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The emulator never lets the processor issue outside its wait state.
  a_go: assert property (@(posedge clk) go |-> fetch_wait);
endmodule
