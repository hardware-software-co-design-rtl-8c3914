// me_apb_core: APB motion-estimation accelerator (top level).
//
// A programmable motion-estimation (ME) processor packaged as an AMBA-2.0
// APB peripheral for a multi-core video encoder, in which a general-purpose
// CPU runs the encoder and offloads the block-matching search. The CPU
// uploads the search firmware, the current 16x16 macroblock and the 48x48
// pixel search area through the APB wrapper, starts the processor and reads
// back the best motion vector and its SAD.
//
//   APB --> me_apb_wrapper --(upload port, pclk)--> program / MB / SA memories
//                 |  commands, status, results (clock crossing)
//                 v
//              me_ice  --go/goto-->  me_asip --(read ports, me_clk)--> memories
//                                      +-- me_sad_unit (+ me_agu)
//
// Two clocks: pclk for the bus (60 MHz in the reference FPGA system) and
// me_clk from a local clock generator (90 MHz there), so the ME processor
// can run at its own frequency. The clock generator is an FPGA clock macro
// outside this RTL: me_clk is an input. presetn resets both domains (it is
// synchronised into me_clk). The memories are dual-clock: written and read
// back from the bus side, read by the processor on me_clk.
// Memory sizes: program PROG_DEPTH words; macroblock 2 x MB_SIZE^2/4 words;
// search area 2 x (MB_SIZE+SEARCH_RANGE)^2/4 words (4 pixels per word). The
// pixel memories are double-buffered: while the processor searches one bank,
// the bus fills the other (CTRL.BANK chooses), so transfers and block
// matching overlap.
// DEBUG = 0 builds the core without the run-time debug facility (no
// breakpoints, step, stop, goto or run; START and HALT still work), which
// the published design names as the cheaper option for systems that do not
// need it.
// The partitioning into processor, SAD unit, AGU, local memories, in-circuit
// emulator, APB wrapper and separate clock follows the published design;
// sizes not given there (program memory) are this design's choice.
module me_apb_core
  import me_pkg::*;
#(
  parameter int unsigned MB_SIZE      = 16,
  parameter int unsigned SEARCH_RANGE = 32,
  parameter int unsigned PROG_DEPTH   = 256,
  parameter bit          DEBUG        = 1'b1,
  localparam int unsigned PROG_AW  = $clog2(PROG_DEPTH),
  localparam int unsigned SA_W     = MB_SIZE + SEARCH_RANGE,
  localparam int unsigned MB_WORDS = MB_SIZE * MB_SIZE / 4,
  localparam int unsigned SA_WORDS = SA_W * SA_W / 4,
  localparam int unsigned MB_WAW   = $clog2(MB_WORDS),
  localparam int unsigned SA_WAW   = $clog2(SA_WORDS),
  localparam int unsigned SAD_W    = $clog2(MB_SIZE * MB_SIZE * 255 + 1)
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        me_clk,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata
);

  // Upload port
  logic [11:0] host_addr;
  logic [31:0] host_wdata;
  logic        host_we_prog, host_we_mb, host_we_sa, host_bank;
  logic [31:0] host_rdata_prog, host_rdata_mb, host_rdata_sa;

  // ME domain
  logic               me_rst_n, core_rst_n, core_bank;
  logic               cmd_start, cmd_run, cmd_stop, cmd_step, cmd_goto;
  logic [PROG_AW-1:0] goto_pc, bp0_pc, bp1_pc;
  logic               bp0_en, bp1_en;
  logic               go, pc_load, running, step_pend, brk, bp_hit;
  logic [PROG_AW-1:0] pc_load_val, pc;
  logic               fetch_wait, issue, halted;
  logic               sad_done, sad_early, sad_skipped;
  logic [PROG_AW-1:0] prog_raddr;
  logic [MB_WAW-1:0]  mb_raddr;
  logic [SA_WAW-1:0]  sa_raddr;
  logic [31:0]        prog_rdata, mb_rdata, sa_rdata;
  logic signed [15:0] best_x, best_y;
  logic [SAD_W-1:0]   best_sad;
  logic               st_busy;
  logic [2:0]         dbg_rsel;
  logic signed [15:0] dbg_rdata;

  me_rst_sync u_rst_sync (.clk(me_clk), .rst_in_n(presetn), .rst_out_n(me_rst_n));

  me_apb_wrapper #(.PROG_AW(PROG_AW), .SAD_W(SAD_W), .DEBUG(DEBUG)) u_wrap (
    .pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .host_addr, .host_wdata, .host_we_prog, .host_we_mb, .host_we_sa, .host_bank,
    .host_rdata_prog, .host_rdata_mb, .host_rdata_sa,
    .me_clk, .me_rst_n, .core_rst_n, .core_bank,
    .cmd_start, .cmd_run, .cmd_stop, .cmd_step, .cmd_goto, .goto_pc,
    .bp0_en, .bp0_pc, .bp1_en, .bp1_pc,
    .st_busy, .st_done(halted), .st_brk(brk), .st_pc(pc), .dbg_rsel, .st_rval(dbg_rdata),
    .res_x(best_x), .res_y(best_y), .res_sad(best_sad)
  );

  me_dpram #(.DEPTH(PROG_DEPTH)) u_prog_mem (
    .clk_a(pclk), .en_a(1'b1), .we_a(host_we_prog), .addr_a(host_addr[PROG_AW-1:0]),
    .wdata_a(host_wdata), .rdata_a(host_rdata_prog),
    .clk_b(me_clk), .addr_b(prog_raddr), .rdata_b(prog_rdata));

  // Pixel memories hold two banks each: bank b occupies words
  // b*WORDS .. b*WORDS+WORDS-1. The bus side uses host_bank, the processor
  // core_bank (the other one in normal use).
  logic [MB_WAW:0] mb_addr_a, mb_addr_b;
  logic [SA_WAW:0] sa_addr_a, sa_addr_b;
  assign mb_addr_a = (MB_WAW+1)'(host_addr[MB_WAW-1:0]) + (host_bank ? (MB_WAW+1)'(MB_WORDS) : '0);
  assign mb_addr_b = (MB_WAW+1)'(mb_raddr)              + (core_bank ? (MB_WAW+1)'(MB_WORDS) : '0);
  assign sa_addr_a = (SA_WAW+1)'(host_addr[SA_WAW-1:0]) + (host_bank ? (SA_WAW+1)'(SA_WORDS) : '0);
  assign sa_addr_b = (SA_WAW+1)'(sa_raddr)              + (core_bank ? (SA_WAW+1)'(SA_WORDS) : '0);

  me_dpram #(.DEPTH(2 * MB_WORDS)) u_mb_mem (
    .clk_a(pclk), .en_a(1'b1), .we_a(host_we_mb), .addr_a(mb_addr_a),
    .wdata_a(host_wdata), .rdata_a(host_rdata_mb),
    .clk_b(me_clk), .addr_b(mb_addr_b), .rdata_b(mb_rdata));

  me_dpram #(.DEPTH(2 * SA_WORDS)) u_sa_mem (
    .clk_a(pclk), .en_a(1'b1), .we_a(host_we_sa), .addr_a(sa_addr_a),
    .wdata_a(host_wdata), .rdata_a(host_rdata_sa),
    .clk_b(me_clk), .addr_b(sa_addr_b), .rdata_b(sa_rdata));

  me_ice #(.PROG_AW(PROG_AW), .DEBUG(DEBUG)) u_ice (
    .clk(me_clk), .rst_n(core_rst_n),
    .cmd_start, .cmd_run, .cmd_stop, .cmd_step, .cmd_goto, .goto_pc,
    .bp0_en, .bp0_pc, .bp1_en, .bp1_pc,
    .pc, .fetch_wait, .issue, .halted,
    .go, .pc_load, .pc_load_val, .running, .step_pend, .brk, .bp_hit);

  me_asip #(.MB_SIZE(MB_SIZE), .SEARCH_RANGE(SEARCH_RANGE), .PROG_AW(PROG_AW)) u_asip (
    .clk(me_clk), .rst_n(core_rst_n),
    .start(cmd_start), .go, .pc_load, .pc_load_val,
    .prog_raddr, .prog_rdata, .mb_raddr, .mb_rdata, .sa_raddr, .sa_rdata,
    .pc, .fetch_wait, .issue, .halted,
    .sad_done, .sad_early, .sad_skipped,
    .best_x, .best_y, .best_sad, .dbg_rsel, .dbg_rdata);

  // The processor is busy while it runs, has a step to do or is inside an
  // instruction.
  assign st_busy = running || step_pend || !(fetch_wait || halted);

endmodule
