// me_ice: in-circuit emulator (run-time debug controller) of the ME processor.
//
// Decides, cycle by cycle, whether the processor may issue its next
// instruction. It holds the run/stop state, a pending single step, and two
// hardware breakpoints. Commands (one-cycle pulses in the ME clock domain):
//   start  restart the firmware (the processor loads PC 0) and run
//   run    continue from the current PC; a breakpoint at that PC is passed
//          once, so a run after a breakpoint stop makes progress
//   stop   stop before the next instruction
//   step   issue exactly one instruction, then stop
//   goto   load goto_pc into the PC (through pc_load/pc_load_val)
// A breakpoint matches when the processor waits to issue the instruction at
// its address: the instruction is not issued, `running` drops and `brk` is
// set. `brk` is also set after a step and after a stop, and cleared by run,
// start and step. A HALT executed by the firmware clears `running`.
// Timing: `go` is combinational from the registered state and the
// processor's `fetch_wait`/`pc`; `issue` from the processor acknowledges it.
// With DEBUG = 0 the run-time debug facility is left out, for systems that
// do not need it: run, stop, step, goto and the breakpoints are ignored, and
// only start (and HALT) control the processor.
// The debug commands (two breakpoints, step, goto, run) and the option of
// leaving them out follow the published description; the command encoding
// and the stop-before-issue breakpoint rule are this design's own choice.
module me_ice #(
  parameter int unsigned PROG_AW = 8,
  parameter bit          DEBUG   = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_start,
  input  logic               cmd_run,
  input  logic               cmd_stop,
  input  logic               cmd_step,
  input  logic               cmd_goto,
  input  logic [PROG_AW-1:0] goto_pc,
  input  logic               bp0_en,
  input  logic [PROG_AW-1:0] bp0_pc,
  input  logic               bp1_en,
  input  logic [PROG_AW-1:0] bp1_pc,
  input  logic [PROG_AW-1:0] pc,
  input  logic               fetch_wait,
  input  logic               issue,
  input  logic               halted,
  output logic               go,
  output logic               pc_load,
  output logic [PROG_AW-1:0] pc_load_val,
  output logic               running,
  output logic               step_pend,
  output logic               brk,
  output logic               bp_hit
);

  logic skip;   // pass a breakpoint at the current PC once

  // Debug commands and breakpoints, removed when DEBUG = 0.
  logic d_run, d_stop, d_step, d_goto, d_bp0, d_bp1;
  assign d_run  = DEBUG && cmd_run;
  assign d_stop = DEBUG && cmd_stop;
  assign d_step = DEBUG && cmd_step;
  assign d_goto = DEBUG && cmd_goto;
  assign d_bp0  = DEBUG && bp0_en;
  assign d_bp1  = DEBUG && bp1_en;

  always_comb begin
    bp_hit = fetch_wait && running && !skip && !step_pend &&
             ((d_bp0 && pc == bp0_pc) || (d_bp1 && pc == bp1_pc));
    go     = fetch_wait && !cmd_start && !d_goto &&
             ((running && !bp_hit) || step_pend);
  end

  assign pc_load     = d_goto;
  assign pc_load_val = goto_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      step_pend <= 1'b0;
      brk       <= 1'b0;
      skip      <= 1'b0;
    end else begin
      if (issue) begin
        skip      <= 1'b0;
        step_pend <= 1'b0;
        if (step_pend && !running) brk <= 1'b1;
      end
      if (bp_hit) begin
        running <= 1'b0;
        brk     <= 1'b1;
      end
      if (halted) running <= 1'b0;
      if (d_stop) begin
        running   <= 1'b0;
        step_pend <= 1'b0;
        brk       <= !halted;
      end
      if (d_step) begin
        step_pend <= 1'b1;
        brk       <= 1'b0;
      end
      if (d_run) begin
        running <= 1'b1;
        brk     <= 1'b0;
        skip    <= 1'b1;
      end
      if (cmd_start) begin
        running   <= 1'b1;
        step_pend <= 1'b0;
        brk       <= 1'b0;
        skip      <= 1'b0;
      end
    end
  end

  // The processor only issues with permission.
  a_issue_go: assert property (@(posedge clk) disable iff (!rst_n) issue |-> go);

endmodule
