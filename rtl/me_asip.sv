// me_asip: programmable motion-estimation processor.
//
// A small application-specific processor whose firmware (uploaded into its
// program memory) implements the block-matching search: full search, three
// step search, diamond search or any other. It has eight 16-bit registers,
// a branch unit and the SAD unit (with its AGU); the SAD unit keeps the best
// motion vector and SAD, which are the processor's results. BLK selects the
// block that SAD matches: the whole macroblock or a sub-block of the H.264
// variable block sizes (16x8, 8x16, 8x8, 8x4, 4x8, 4x4 for a 16x16 block).
// Instruction format and opcodes: see me_pkg. An instruction is issued from
// state WAIT when the in-circuit emulator gives `go` and executed in the
// next cycle (2 cycles per instruction); SAD stays in execution until the
// SAD unit is done; HALT stops the processor and raises `halted`.
// `start` (taken in WAIT or HALTED, held pending otherwise) clears the
// registers and the best match, selects the whole macroblock and loads
// PC 0; `pc_load` loads a PC in WAIT or HALTED. Memories are read through
// synchronous ports (one cycle).
// dbg_rdata shows register dbg_rsel, for the run-time debugger.
// The processor, its SAD unit, AGU and local memories follow the published
// description of the accelerator; the register count, the instruction set
// and its encoding are this design's own.
module me_asip
  import me_pkg::*;
#(
  parameter int unsigned MB_SIZE      = 16,
  parameter int unsigned SEARCH_RANGE = 32,
  parameter int unsigned PROG_AW      = 8,
  localparam int unsigned SA_W   = MB_SIZE + SEARCH_RANGE,
  localparam int unsigned MB_AW  = $clog2(MB_SIZE * MB_SIZE),
  localparam int unsigned SA_AW  = $clog2(SA_W * SA_W),
  localparam int unsigned SAD_W  = $clog2(MB_SIZE * MB_SIZE * 255 + 1),
  localparam int unsigned IDX_W  = $clog2(MB_SIZE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               go,
  input  logic               pc_load,
  input  logic [PROG_AW-1:0] pc_load_val,
  output logic [PROG_AW-1:0] prog_raddr,
  input  logic [31:0]        prog_rdata,
  output logic [MB_AW-3:0]   mb_raddr,
  input  logic [31:0]        mb_rdata,
  output logic [SA_AW-3:0]   sa_raddr,
  input  logic [31:0]        sa_rdata,
  output logic [PROG_AW-1:0] pc,
  output logic               fetch_wait,
  output logic               issue,
  output logic               halted,
  output logic               sad_done,
  output logic               sad_early,
  output logic               sad_skipped,
  output logic signed [15:0] best_x,
  output logic signed [15:0] best_y,
  output logic [SAD_W-1:0]   best_sad,
  input  logic [2:0]         dbg_rsel,
  output logic signed [15:0] dbg_rdata
);

  typedef enum logic [1:0] {C_WAIT, C_EXEC, C_SADW, C_HALT} cstate_e;
  cstate_e state;

  logic signed [15:0] regs [8];
  logic               start_pend, restart;
  instr_t             ins;
  logic signed [15:0] va, vb, imm;
  logic               take;
  logic               sad_start, clr_best;
  logic [SAD_W-1:0]   sad_val;
  logic               sad_better, sad_busy;
  blk_imm_t           blk;          // selected block (OP_BLK)
  logic [IDX_W-1:0]   w_m1, h_m1, off_x, off_y;

  assign ins        = instr_t'(prog_rdata);
  assign dbg_rdata  = regs[dbg_rsel];   // register view for the debugger
  assign va         = regs[ins.ra];
  assign vb         = regs[ins.rb];
  assign imm        = signed'(ins.imm);
  assign prog_raddr = pc;
  assign fetch_wait = (state == C_WAIT);
  assign halted     = (state == C_HALT);
  assign restart    = (start || start_pend) && (state == C_WAIT || state == C_HALT);
  assign issue      = (state == C_WAIT) && !restart && !pc_load && go;

  always_comb begin
    unique case (ins.op)
      OP_BLT:  take = (va <  vb);
      OP_BGE:  take = (va >= vb);
      OP_BEQ:  take = (va == vb);
      OP_BNE:  take = (va != vb);
      OP_JMP:  take = 1'b1;
      default: take = 1'b0;
    endcase
  end

  assign sad_start = (state == C_EXEC) && (ins.op == OP_SAD);
  assign clr_best  = restart || ((state == C_EXEC) && (ins.op == OP_CLRB));

  // Block geometry: MB_SIZE >> code (code 3 acts as 2), offsets in 4-pixel units.
  always_comb begin
    w_m1  = IDX_W'((MB_SIZE >> ((blk.wsel == 2'd3) ? 2'd2 : blk.wsel)) - 1);
    h_m1  = IDX_W'((MB_SIZE >> ((blk.hsel == 2'd3) ? 2'd2 : blk.hsel)) - 1);
    off_x = IDX_W'({blk.off_x4, 2'b00});
    off_y = IDX_W'({blk.off_y4, 2'b00});
  end

  me_sad_unit #(.MB_SIZE(MB_SIZE), .SEARCH_RANGE(SEARCH_RANGE)) u_sad (
    .clk, .rst_n,
    .start    (sad_start),
    .cand_x   (va),
    .cand_y   (vb),
    .w_m1, .h_m1, .off_x, .off_y,
    .clr_best,
    .mb_raddr, .mb_rdata, .sa_raddr, .sa_rdata,
    .busy     (sad_busy),
    .done     (sad_done),
    .better   (sad_better),
    .early    (sad_early),
    .skipped  (sad_skipped),
    .sad      (sad_val),
    .best_x, .best_y, .best_sad
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_WAIT;
      pc         <= '0;
      start_pend <= 1'b0;
      blk        <= '0;
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      if (start) start_pend <= 1'b1;
      unique case (state)
        C_WAIT, C_HALT: begin
          if (restart) begin
            pc         <= '0;
            state      <= C_WAIT;
            start_pend <= 1'b0;
            blk        <= '0;
            for (int i = 0; i < 8; i++) regs[i] <= '0;
          end else if (pc_load) begin
            pc    <= pc_load_val;
            state <= C_WAIT;
          end else if (issue) begin
            state <= C_EXEC;
          end
        end
        C_EXEC: begin
          pc    <= take ? ins.imm[PROG_AW-1:0] : pc + 1'b1;
          state <= C_WAIT;
          unique case (ins.op)
            OP_LDI:  regs[ins.rd] <= imm;
            OP_ADD:  regs[ins.rd] <= va + vb;
            OP_ADDI: regs[ins.rd] <= va + imm;
            OP_SUB:  regs[ins.rd] <= va - vb;
            OP_GBX:  regs[ins.rd] <= best_x;
            OP_GBY:  regs[ins.rd] <= best_y;
            OP_BLK:  blk <= blk_imm_t'(ins.imm);
            OP_SAD:  state <= C_SADW;
            OP_HALT: begin
              state <= C_HALT;
              pc    <= pc;
            end
            default: ;
          endcase
        end
        C_SADW: if (sad_done) state <= C_WAIT;
        default: state <= C_WAIT;
      endcase
    end
  end

  // The SAD unit is only started when idle.
  a_sad_idle: assert property (@(posedge clk) disable iff (!rst_n)
    sad_start |-> !sad_busy);

endmodule
