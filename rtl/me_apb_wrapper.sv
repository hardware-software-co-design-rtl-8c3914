// me_apb_wrapper: AMBA-2.0 APB slave of the motion-estimation core.
//
// Turns the processor into a memory-mapped peripheral. Bus side (pclk):
//  * control register with set/clear write addresses (START, RESET, BANK)
//    and a status register (BUSY, DONE, BREAK, CMD pending);
//  * BANK selects which of the two macroblock/search-area banks the
//    processor reads; uploads and read-back use the other bank, so the next
//    macroblock can be stored while the current one is searched;
//  * Address, Data Input and Data Output registers: a word written to Data
//    Input is stored in the memory selected by Address[13:12] (0 program,
//    1 macroblock, 2 search area) at word Address[11:0]; a read of Data
//    Output returns the word there; both then increment Address[11:0], so
//    firmware and pixels are moved with plain load/store sequences;
//  * MV x, MV y and SAD result registers (sign-extended / zero-extended);
//  * hidden debug registers (command, goto PC, two breakpoints, stopped PC)
//    for the in-circuit emulator, and a register view: ICE_RSEL picks one
//    of the processor's registers, ICE_RVAL shows it while the processor is
//    stopped. The register index is quasi-static (written while stopped)
//    and only steers a multiplexer whose output is copied like the results.
//    With DEBUG = 0 the goto, breakpoint and register-view registers are not
//    built (they read 0).
// APB timing: no wait states (AMBA 2.0 APB has no PREADY). Writes take
// effect at the end of the access phase; prdata is combinational during the
// access phase. Data Output relies on the memory read issued in the setup
// phase, as the memory port A reads the word at Address every cycle.
//
// Clock crossing to the ME clock (me_clk): one command at a time is passed
// with a request/acknowledge toggle pair; the command code and the goto PC
// are held stable while the request is in flight. A command written while
// one is pending is dropped (status bit CMD shows this). Breakpoint
// registers are quasi-static and meant to be written while the processor is
// stopped. Status bits come back through two-flop synchronisers; the result
// registers are copied from the ME domain only while no command is pending
// and the processor is stopped, when those values do not change. The ME
// domain answers a command one cycle after acting on it, so the status seen
// with the acknowledge already reflects the command.
// The register set follows the published programming model; the addresses,
// bit positions, auto-increment and the crossing scheme are this design's
// own choice.
module me_apb_wrapper
  import me_pkg::*;
#(
  parameter int unsigned PROG_AW = 8,
  parameter int unsigned SAD_W   = 16,
  parameter bit          DEBUG   = 1'b1
) (
  // APB (bus clock domain)
  input  logic               pclk,
  input  logic               presetn,
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [7:0]         paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  // memory upload port (bus clock domain)
  output logic [11:0]        host_addr,
  output logic [31:0]        host_wdata,
  output logic               host_we_prog,
  output logic               host_we_mb,
  output logic               host_we_sa,
  output logic               host_bank,
  input  logic [31:0]        host_rdata_prog,
  input  logic [31:0]        host_rdata_mb,
  input  logic [31:0]        host_rdata_sa,
  // ME clock domain
  input  logic               me_clk,
  input  logic               me_rst_n,
  output logic               core_rst_n,
  output logic               core_bank,
  output logic               cmd_start,
  output logic               cmd_run,
  output logic               cmd_stop,
  output logic               cmd_step,
  output logic               cmd_goto,
  output logic [PROG_AW-1:0] goto_pc,
  output logic               bp0_en,
  output logic [PROG_AW-1:0] bp0_pc,
  output logic               bp1_en,
  output logic [PROG_AW-1:0] bp1_pc,
  input  logic               st_busy,
  input  logic               st_done,
  input  logic               st_brk,
  input  logic [PROG_AW-1:0] st_pc,
  output logic [2:0]         dbg_rsel,
  input  logic signed [15:0] st_rval,
  input  logic signed [15:0] res_x,
  input  logic signed [15:0] res_y,
  input  logic [SAD_W-1:0]   res_sad
);

  // ------------------------------------------------------------------
  // Bus side registers
  // ------------------------------------------------------------------
  logic [2:0]         ctrl;
  logic [13:0]        addr_q;
  logic [31:0]        din_q;
  logic [PROG_AW-1:0] goto_q;
  logic [31:0]        bp0_q, bp1_q;
  logic               req_tgl, ack_s;
  ice_cmd_e           cmd_q;
  logic               pend;
  logic               busy_s, done_s, brk_s;
  logic signed [15:0] mvx_q, mvy_q;
  logic [SAD_W-1:0]   sad_q;
  logic [PROG_AW-1:0] pc_q;
  logic [2:0]         rsel_q;
  logic signed [15:0] rval_q;

  logic wr, rd;
  assign wr   = psel && penable && pwrite;
  assign rd   = psel && penable && !pwrite;
  assign pend = (req_tgl != ack_s);

  mem_sel_e sel;
  assign sel        = mem_sel_e'(addr_q[13:12]);
  assign host_addr  = addr_q[11:0];
  assign host_wdata = pwdata;
  assign host_bank  = !ctrl[CTRL_BANK];
  always_comb begin
    host_we_prog = 1'b0;
    host_we_mb   = 1'b0;
    host_we_sa   = 1'b0;
    if (wr && paddr == REG_DATA_IN) begin
      unique case (sel)
        MEM_PROG: host_we_prog = 1'b1;
        MEM_MB:   host_we_mb   = 1'b1;
        MEM_SA:   host_we_sa   = 1'b1;
        default:  ;
      endcase
    end
  end

  logic [31:0] dout;
  always_comb begin
    unique case (sel)
      MEM_PROG: dout = host_rdata_prog;
      MEM_MB:   dout = host_rdata_mb;
      MEM_SA:   dout = host_rdata_sa;
      default:  dout = '0;
    endcase
  end

  // A new command: START from the control register, others from ICE_CMD.
  logic     issue_cmd;
  ice_cmd_e new_cmd;
  always_comb begin
    issue_cmd = 1'b0;
    new_cmd   = CMD_NONE;
    if (!pend) begin
      if (wr && paddr == REG_ICE_CMD && pwdata[2:0] != 3'(CMD_NONE) &&
          pwdata[2:0] <= 3'(CMD_START)) begin
        issue_cmd = 1'b1;
        new_cmd   = ice_cmd_e'(pwdata[2:0]);
      end else if (ctrl[CTRL_START] && !ctrl[CTRL_RESET]) begin
        issue_cmd = 1'b1;
        new_cmd   = CMD_START;
      end
    end
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      ctrl    <= '0;
      addr_q  <= '0;
      din_q   <= '0;
      goto_q  <= '0;
      bp0_q   <= '0;
      bp1_q   <= '0;
      req_tgl <= 1'b0;
      cmd_q   <= CMD_NONE;
      mvx_q   <= '0;
      mvy_q   <= '0;
      sad_q   <= '0;
      pc_q    <= '0;
      rsel_q  <= '0;
      rval_q  <= '0;
    end else begin
      if (issue_cmd) begin
        cmd_q   <= new_cmd;
        req_tgl <= !req_tgl;
        if (new_cmd == CMD_START) ctrl[CTRL_START] <= 1'b0;
      end
      if (wr) begin
        unique case (paddr)
          REG_CTRL_SET: ctrl   <= ctrl | pwdata[2:0];
          REG_CTRL_CLR: ctrl   <= ctrl & ~pwdata[2:0];
          REG_ADDRESS:  addr_q <= pwdata[13:0];
          REG_DATA_IN: begin
            din_q         <= pwdata;
            addr_q[11:0]  <= addr_q[11:0] + 1'b1;
          end
          REG_ICE_GOTO: if (DEBUG && !pend) goto_q <= pwdata[PROG_AW-1:0];
          REG_ICE_BP0:  if (DEBUG) bp0_q <= pwdata;
          REG_ICE_BP1:  if (DEBUG) bp1_q <= pwdata;
          REG_ICE_RSEL: if (DEBUG) rsel_q <= pwdata[2:0];
          default: ;
        endcase
      end
      if (rd && paddr == REG_DATA_OUT) addr_q[11:0] <= addr_q[11:0] + 1'b1;
      // Results are stable while the processor is stopped.
      if (!pend && !busy_s) begin
        mvx_q <= res_x;
        mvy_q <= res_y;
        sad_q <= res_sad;
        pc_q  <= st_pc;
        rval_q <= DEBUG ? st_rval : '0;
      end
    end
  end

  always_comb begin
    prdata = '0;
    unique case (paddr)
      REG_CTRL_SET, REG_CTRL_CLR: prdata = 32'(ctrl);
      REG_STATUS:   prdata = {28'd0, pend, brk_s && !pend, done_s && !pend, busy_s || pend};
      REG_ADDRESS:  prdata = 32'(addr_q);
      REG_DATA_IN:  prdata = din_q;
      REG_DATA_OUT: prdata = dout;
      REG_MV_X:     prdata = 32'(mvx_q);
      REG_MV_Y:     prdata = 32'(mvy_q);
      REG_SAD:      prdata = 32'(sad_q);
      REG_ICE_GOTO: prdata = 32'(goto_q);
      REG_ICE_BP0:  prdata = bp0_q;
      REG_ICE_BP1:  prdata = bp1_q;
      REG_ICE_PC:   prdata = 32'(pc_q);
      REG_ICE_RSEL: prdata = 32'(rsel_q);
      REG_ICE_RVAL: prdata = 32'(rval_q);
      default:      prdata = '0;
    endcase
  end

  // ------------------------------------------------------------------
  // ME clock domain
  // ------------------------------------------------------------------
  logic rst_req_s;
  logic req_s, req_d, ack_tgl, cmd_act;

  me_sync2 #(.WIDTH(1)) u_sync_rst (.clk(me_clk), .rst_n(me_rst_n),
                                    .d(ctrl[CTRL_RESET]), .q(rst_req_s));
  assign core_rst_n = me_rst_n && !rst_req_s;

  // BANK is changed only while the processor is stopped; a START written
  // after it reaches the ME domain no earlier than the bank bit.
  me_sync2 #(.WIDTH(1)) u_sync_bank (.clk(me_clk), .rst_n(me_rst_n),
                                     .d(ctrl[CTRL_BANK]), .q(core_bank));

  me_sync2 #(.WIDTH(1)) u_sync_req (.clk(me_clk), .rst_n(me_rst_n),
                                    .d(req_tgl), .q(req_s));

  always_ff @(posedge me_clk or negedge me_rst_n) begin
    if (!me_rst_n) begin
      req_d   <= 1'b0;
      ack_tgl <= 1'b0;
    end else begin
      req_d   <= req_s;
      ack_tgl <= req_d;      // answer one cycle after the command pulse
    end
  end

  assign cmd_act   = (req_s != req_d);
  assign cmd_start = cmd_act && cmd_q == CMD_START;
  assign cmd_run   = cmd_act && cmd_q == CMD_RUN;
  assign cmd_stop  = cmd_act && cmd_q == CMD_STOP;
  assign cmd_step  = cmd_act && cmd_q == CMD_STEP;
  assign cmd_goto  = cmd_act && cmd_q == CMD_GOTO;
  assign goto_pc   = goto_q;
  assign bp0_en    = bp0_q[31];
  assign bp0_pc    = bp0_q[PROG_AW-1:0];
  assign bp1_en    = bp1_q[31];
  assign bp1_pc    = bp1_q[PROG_AW-1:0];
  assign dbg_rsel  = rsel_q;

  // ------------------------------------------------------------------
  // Back to the bus clock domain
  // ------------------------------------------------------------------
  me_sync2 #(.WIDTH(1)) u_sync_ack (.clk(pclk), .rst_n(presetn), .d(ack_tgl), .q(ack_s));
  me_sync2 #(.WIDTH(3)) u_sync_st  (.clk(pclk), .rst_n(presetn),
                                    .d({st_busy, st_done, st_brk}),
                                    .q({busy_s, done_s, brk_s}));

  // AMBA 2.0 APB: the access phase follows a setup phase with psel held.
  a_apb_setup: assert property (@(posedge pclk) disable iff (!presetn)
    psel && penable |-> $past(psel) && !$past(penable));

endmodule
