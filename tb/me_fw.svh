// me_fw.svh: firmware builders and a reference instruction-set model for the
// motion-estimation processor testbenches.
//
// Included inside a testbench module that imports me_pkg and declares
//   localparam int N, SA_W, HALF;  logic [7:0] cur[N*N];  logic [7:0] ref_pix[SA_W*SA_W];
// Firmware builders append instruction words to a queue:
//   fw_fsbm  full search over every displacement -HALF..HALF-1 (y outer, x inner),
//            for the macroblock or one sub-block (variable block size)
//   fw_3ss   three step search, steps HALF/2, HALF/4, ..., 1
//   fw_ds    diamond search: large diamond until the centre wins, then small diamond
// ref_run interprets a program with the same early-termination rule as the
// hardware and returns the best vector, its SAD, the candidate counts and the
// exact number of processor cycles (2 per instruction, SAD adds its latency).

function automatic logic [31:0] enc(input opcode_e op, input int rd, input int ra,
                                    input int rb, input int imm);
  instr_t i;
  i.op = op; i.rd = 3'(rd); i.ra = 3'(ra); i.rb = 3'(rb); i.unused = '0; i.imm = 16'(imm);
  return 32'(i);
endfunction

// blk: immediate of BLK (blk_imm_t); 0 = whole macroblock, no BLK emitted.
function automatic void fw_fsbm(ref logic [31:0] p[$], input int blk = 0);
  int ly, lx;
  p.push_back(enc(OP_CLRB, 0, 0, 0, 0));
  if (blk != 0) p.push_back(enc(OP_BLK, 0, 0, 0, blk));
  p.push_back(enc(OP_LDI, 1, 0, 0, -HALF));
  p.push_back(enc(OP_LDI, 3, 0, 0, HALF));
  ly = p.size();
  p.push_back(enc(OP_LDI, 0, 0, 0, -HALF));
  lx = p.size();
  p.push_back(enc(OP_SAD, 0, 0, 1, 0));
  p.push_back(enc(OP_ADDI, 0, 0, 0, 1));
  p.push_back(enc(OP_BLT, 0, 0, 3, lx));
  p.push_back(enc(OP_ADDI, 1, 1, 0, 1));
  p.push_back(enc(OP_BLT, 0, 1, 3, ly));
  p.push_back(enc(OP_HALT, 0, 0, 0, 0));
endfunction

function automatic void fw_3ss(ref logic [31:0] p[$]);
  int rsel[3] = '{2, 7, 6};   // registers holding -s, 0, +s
  p.push_back(enc(OP_CLRB, 0, 0, 0, 0));
  p.push_back(enc(OP_LDI, 7, 0, 0, 0));
  p.push_back(enc(OP_LDI, 4, 0, 0, 0));
  p.push_back(enc(OP_LDI, 5, 0, 0, 0));
  p.push_back(enc(OP_SAD, 0, 4, 5, 0));
  for (int s = HALF / 2; s >= 1; s /= 2) begin
    p.push_back(enc(OP_LDI, 6, 0, 0, s));
    p.push_back(enc(OP_SUB, 2, 7, 6, 0));
    for (int b = 0; b < 3; b++)
      for (int a = 0; a < 3; a++)
        if (!(a == 1 && b == 1)) begin
          p.push_back(enc(OP_ADD, 0, 4, rsel[a], 0));
          p.push_back(enc(OP_ADD, 1, 5, rsel[b], 0));
          p.push_back(enc(OP_SAD, 0, 0, 1, 0));
        end
    p.push_back(enc(OP_GBX, 4, 0, 0, 0));
    p.push_back(enc(OP_GBY, 5, 0, 0, 0));
  end
  p.push_back(enc(OP_HALT, 0, 0, 0, 0));
endfunction

function automatic void fw_ds(ref logic [31:0] p[$]);
  int ldx[8] = '{0, -1, 1, -2, 2, -1, 1, 0};
  int ldy[8] = '{-2, -1, -1, 0, 0, 1, 1, 2};
  int sdx[4] = '{0, -1, 1, 0};
  int sdy[4] = '{-1, 0, 0, 1};
  int l, b1, b2, js, m;
  p.push_back(enc(OP_CLRB, 0, 0, 0, 0));
  p.push_back(enc(OP_LDI, 7, 0, 0, 0));
  p.push_back(enc(OP_LDI, 4, 0, 0, 0));
  p.push_back(enc(OP_LDI, 5, 0, 0, 0));
  p.push_back(enc(OP_SAD, 0, 4, 5, 0));
  l = p.size();
  for (int k = 0; k < 8; k++) begin
    p.push_back(enc(OP_ADDI, 0, 4, 0, ldx[k]));
    p.push_back(enc(OP_ADDI, 1, 5, 0, ldy[k]));
    p.push_back(enc(OP_SAD, 0, 0, 1, 0));
  end
  p.push_back(enc(OP_GBX, 0, 0, 0, 0));
  p.push_back(enc(OP_GBY, 1, 0, 0, 0));
  b1 = p.size(); p.push_back('0);
  b2 = p.size(); p.push_back('0);
  js = p.size(); p.push_back('0);
  m = p.size();
  p.push_back(enc(OP_ADD, 4, 0, 7, 0));
  p.push_back(enc(OP_ADD, 5, 1, 7, 0));
  p.push_back(enc(OP_JMP, 0, 0, 0, l));
  p[b1] = enc(OP_BNE, 0, 0, 4, m);
  p[b2] = enc(OP_BNE, 0, 1, 5, m);
  p[js] = enc(OP_JMP, 0, 0, 0, p.size());
  for (int k = 0; k < 4; k++) begin
    p.push_back(enc(OP_ADDI, 0, 4, 0, sdx[k]));
    p.push_back(enc(OP_ADDI, 1, 5, 0, sdy[k]));
    p.push_back(enc(OP_SAD, 0, 0, 1, 0));
  end
  p.push_back(enc(OP_HALT, 0, 0, 0, 0));
endfunction

// Full SAD of candidate (cx,cy) without early termination, for the block of
// w x h pixels at (x0,y0) in the macroblock.
function automatic int full_sad(input int cx, input int cy, input int w = N, input int h = N,
                               input int x0 = 0, input int y0 = 0);
  int acc = 0;
  for (int p = 0; p < w*h; p++) begin
    int a, b;
    a = cur[(y0 + p / w) * N + x0 + p % w];
    b = ref_pix[(cy + HALF + y0 + p / w) * SA_W + (cx + HALF + x0 + p % w)];
    acc += (a > b) ? a - b : b - a;
  end
  return acc;
endfunction

typedef struct {
  int bx, by, bs;
  int cycles;      // start to halted
  int n_sad, n_early, n_skip, n_better, n_instr;
  int rf[8];       // registers at HALT (16-bit values, sign-extended)
} ref_result_t;

function automatic ref_result_t ref_run(input logic [31:0] p[$]);
  ref_result_t r;
  int regs[8];
  int pc = 0;
  int bw = N, bh = N, bx0 = 0, by0 = 0;   // block selected by BLK
  for (int i = 0; i < 8; i++) regs[i] = 0;
  r = '{default: 0};
  r.bs = 'hFFFF;
  r.cycles = 1;
  for (int guard = 0; guard < 1000000; guard++) begin
    instr_t ins;
    int va, vb, imm, tgt;
    bit take;
    ins  = instr_t'(p[pc]);
    va   = int'(signed'(16'(regs[ins.ra])));
    vb   = int'(signed'(16'(regs[ins.rb])));
    imm  = int'(signed'(ins.imm));
    tgt  = int'(ins.imm);
    take = 1'b0;
    r.cycles += 2;
    r.n_instr++;
    case (ins.op)
      OP_LDI:  regs[ins.rd] = imm;
      OP_ADD:  regs[ins.rd] = va + vb;
      OP_ADDI: regs[ins.rd] = va + imm;
      OP_SUB:  regs[ins.rd] = va - vb;
      OP_BLT:  take = va < vb;
      OP_BGE:  take = va >= vb;
      OP_BEQ:  take = va == vb;
      OP_BNE:  take = va != vb;
      OP_JMP:  take = 1'b1;
      OP_CLRB: begin r.bs = 'hFFFF; r.bx = 0; r.by = 0; end
      OP_GBX:  regs[ins.rd] = r.bx;
      OP_GBY:  regs[ins.rd] = r.by;
      OP_BLK: begin
        blk_imm_t b;
        b   = blk_imm_t'(ins.imm);
        bw  = N >> ((b.wsel == 3) ? 2 : b.wsel);
        bh  = N >> ((b.hsel == 3) ? 2 : b.hsel);
        bx0 = 4 * b.off_x4;
        by0 = 4 * b.off_y4;
      end
      OP_SAD: begin
        r.n_sad++;
        if (va < -HALF || va >= HALF || vb < -HALF || vb >= HALF) begin
          r.n_skip++;
          r.cycles += 2;
        end else begin
          int acc, k;
          bit rej;
          acc = 0; k = bw*bh-1; rej = 0;
          for (int q = 0; q < bw*bh; q++) begin
            int a, b;
            a = cur[(by0 + q / bw) * N + bx0 + q % bw];
            b = ref_pix[(vb + HALF + by0 + q / bw) * SA_W + (va + HALF + bx0 + q % bw)];
            acc += (a > b) ? a - b : b - a;
            if (acc >= r.bs) begin k = q; rej = 1; break; end
          end
          r.cycles += k + 3;
          if (rej && k < bw*bh-1) r.n_early++;
          if (!rej) begin r.bs = acc; r.bx = va; r.by = vb; r.n_better++; end
        end
      end
      OP_HALT: begin
        for (int i = 0; i < 8; i++) r.rf[i] = regs[i];
        return r;
      end
      default: ;
    endcase
    for (int i = 0; i < 8; i++) regs[i] = int'(signed'(16'(regs[i])));
    pc = take ? tgt : pc + 1;
  end
  return r;
endfunction

// Test scene: a smooth, textured reference picture with noise, and a current
// macroblock copied from displacement (dx0,dy0) with up to `noise` added.
function automatic void make_scene(input int dx0, input int dy0, input int noise);
  for (int y = 0; y < SA_W; y++)
    for (int x = 0; x < SA_W; x++)
      ref_pix[y*SA_W + x] = 8'(((x - SA_W/2) * (x - SA_W/2) + (y - SA_W/2) * (y - SA_W/2)) / 3
                               + x * 2 + $urandom_range(0, 12));
  for (int q = 0; q < N*N; q++)
    cur[q] = 8'(ref_pix[(dy0 + HALF + q / N) * SA_W + (dx0 + HALF + q % N)]
                + $urandom_range(0, noise));
endfunction
