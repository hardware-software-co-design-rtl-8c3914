// tb_me_apb_wrapper: self-checking test of the APB register interface.
//
// Drives AMBA-2.0 APB transfers on a 60 MHz bus clock while the ME side runs
// at 90 MHz. Memory models behind the upload port check where Data Input
// writes land and what Data Output returns, including the auto-increment.
// Command pulses arriving in the ME clock domain are counted and decoded;
// status bits and result registers driven from the ME side are read back
// through the synchronisers. Checks: register read-back, set/clear control,
// self-clearing START, the bank bit, one pulse per command, a command dropped while one is
// pending, breakpoint fields, the processor reset, and that results are
// copied only while the processor is stopped.
module tb_me_apb_wrapper;
  import me_pkg::*;

  logic pclk = 1'b0, me_clk = 1'b0, presetn = 1'b0;
  always #8.333 pclk = ~pclk;
  always #5.555 me_clk = ~me_clk;

  logic        psel = 0, penable = 0, pwrite = 0;
  logic [7:0]  paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic [11:0] host_addr;
  logic [31:0] host_wdata;
  logic        host_we_prog, host_we_mb, host_we_sa, host_bank, core_bank;
  logic [31:0] host_rdata_prog, host_rdata_mb, host_rdata_sa;
  logic        me_rst_n, core_rst_n;
  logic        cmd_start, cmd_run, cmd_stop, cmd_step, cmd_goto;
  logic [7:0]  goto_pc, bp0_pc, bp1_pc, st_pc = '0;
  logic        bp0_en, bp1_en;
  logic        st_busy = 0, st_done = 0, st_brk = 0;
  logic signed [15:0] res_x = '0, res_y = '0;
  logic [2:0]         dbg_rsel;
  logic signed [15:0] st_rval;
  assign st_rval = 16'sd1000 - 16'(dbg_rsel) * 16'sd300;   // stands in for the register file
  logic [15:0] res_sad = '0;

  me_apb_wrapper #(.PROG_AW(8), .SAD_W(16)) dut (.*);
  assign me_rst_n = presetn;

  // Memories behind the upload port (synchronous read, as the block RAMs).
  logic [31:0] mem [3][4096];
  always_ff @(posedge pclk) begin
    if (host_we_prog) mem[0][host_addr] <= host_wdata;
    if (host_we_mb)   mem[1][host_addr] <= host_wdata;
    if (host_we_sa)   mem[2][host_addr] <= host_wdata;
    host_rdata_prog <= mem[0][host_addr];
    host_rdata_mb   <= mem[1][host_addr];
    host_rdata_sa   <= mem[2][host_addr];
  end

  int n_start = 0, n_run = 0, n_stop = 0, n_step = 0, n_goto = 0;
  logic [7:0] last_goto;
  always @(posedge me_clk) begin
    if (cmd_start) n_start++;
    if (cmd_run)   n_run++;
    if (cmd_stop)  n_stop++;
    if (cmd_step)  n_step++;
    if (cmd_goto) begin n_goto++; last_goto = goto_pc; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  task automatic wait_idle();
    logic [31:0] s;
    do apb_read(REG_STATUS, s); while (s[STAT_CMD]);
  endtask

  initial begin
    repeat (20000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, w[3][8];
    repeat (3) @(negedge pclk);
    presetn = 1;
    repeat (4) @(negedge pclk);
    // Address register and uploads to each memory with auto-increment.
    for (int m = 0; m < 3; m++) begin
      apb_write(REG_ADDRESS, {18'd0, 2'(m), 12'd100});
      apb_read(REG_ADDRESS, d);
      check(d == {18'd0, 2'(m), 12'd100}, "Address read-back");
      for (int i = 0; i < 8; i++) begin
        w[m][i] = $urandom;
        apb_write(REG_DATA_IN, w[m][i]);
      end
      apb_read(REG_ADDRESS, d);
      check(d[11:0] == 12'd108, "Address incremented by Data Input writes");
      apb_read(REG_DATA_IN, d);
      check(d == w[m][7], "Data Input read-back");
    end
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < 8; i++)
        check(mem[m][100+i] == w[m][i], $sformatf("memory %0d word %0d written", m, i));
    check(mem[0][108] !== w[1][0] && mem[1][99] !== w[1][0], "no stray writes");
    for (int m = 2; m >= 0; m--) begin
      apb_write(REG_ADDRESS, {18'd0, 2'(m), 12'd100});
      for (int i = 0; i < 8; i++) begin
        apb_read(REG_DATA_OUT, d);
        check(d == w[m][i], $sformatf("Data Output memory %0d word %0d", m, i));
      end
    end
    // Control set/clear and self-clearing START.
    apb_write(REG_CTRL_SET, 32'h2);
    apb_read(REG_CTRL_CLR, d);
    check(d[1:0] == 2'b10, "RESET bit set");
    repeat (6) @(negedge pclk);
    check(!core_rst_n, "processor held in reset");
    apb_write(REG_CTRL_SET, 32'h1);
    repeat (10) @(negedge pclk);
    check(n_start == 0, "START waits while RESET is set");
    apb_write(REG_CTRL_CLR, 32'h2);
    wait_idle();
    apb_read(REG_CTRL_SET, d);
    check(d[1:0] == 2'b00, "START self-cleared, RESET cleared");
    check(n_start == 1 && core_rst_n, "one start pulse after reset release");
    // ICE commands and a command dropped while another is pending.
    apb_write(REG_ICE_GOTO, 32'd77);
    apb_write(REG_ICE_CMD, 32'(CMD_GOTO));
    apb_write(REG_ICE_CMD, 32'(CMD_RUN));     // dropped: GOTO still in flight
    wait_idle();
    check(n_goto == 1 && last_goto == 8'd77 && n_run == 0, "goto delivered, second command dropped");
    apb_write(REG_ICE_CMD, 32'(CMD_RUN));  wait_idle();
    apb_write(REG_ICE_CMD, 32'(CMD_STEP)); wait_idle();
    apb_write(REG_ICE_CMD, 32'(CMD_STOP)); wait_idle();
    apb_write(REG_ICE_CMD, 32'd7);         wait_idle();   // not a command
    check(n_run == 1 && n_step == 1 && n_stop == 1 && n_start == 1 && n_goto == 1,
          "one pulse per command");
    apb_write(REG_ICE_BP0, 32'h8000_0012);
    apb_write(REG_ICE_BP1, 32'h0000_0034);
    apb_read(REG_ICE_BP0, d);
    check(d == 32'h8000_0012 && bp0_en && bp0_pc == 8'h12 && !bp1_en && bp1_pc == 8'h34,
          "breakpoint registers");
    // Pixel bank selection.
    check(host_bank && !core_bank, "bus uses bank 1, processor bank 0 after reset");
    apb_write(REG_CTRL_SET, 32'(1 << CTRL_BANK));
    repeat (4) @(negedge pclk);
    check(!host_bank && core_bank, "BANK set swaps the banks");
    apb_write(REG_CTRL_CLR, 32'(1 << CTRL_BANK));
    repeat (4) @(negedge pclk);
    check(host_bank && !core_bank, "BANK cleared");
    // Status and results.
    res_x = -16'sd5; res_y = 16'sd7; res_sad = 16'd1234; st_pc = 8'd42; st_done = 1;
    repeat (6) @(negedge pclk);
    apb_read(REG_STATUS, d);
    check(d[3:0] == 4'b0010, "status DONE");
    apb_read(REG_MV_X, d);  check(d == 32'hFFFF_FFFB, "MV x sign-extended");
    apb_read(REG_MV_Y, d);  check(d == 32'd7, "MV y");
    apb_read(REG_SAD, d);   check(d == 32'd1234, "SAD");
    apb_read(REG_ICE_PC, d); check(d == 32'd42, "stopped PC");
    apb_write(REG_ICE_RSEL, 32'd5);
    apb_read(REG_ICE_RSEL, d); check(d == 32'd5 && dbg_rsel == 3'd5, "register select");
    apb_read(REG_ICE_RVAL, d); check(d == 32'hFFFF_FE0C, "register view, sign-extended");
    apb_write(REG_ICE_RSEL, 32'd1);
    apb_read(REG_ICE_RVAL, d); check(d == 32'd700, "register view follows the select");
    st_done = 0; st_busy = 1;
    repeat (6) @(negedge pclk);
    res_x = 16'sd3; res_sad = 16'd9;
    repeat (6) @(negedge pclk);
    apb_read(REG_STATUS, d);
    check(d[3:0] == 4'b0001, "status BUSY");
    apb_read(REG_MV_X, d);  check(d == 32'hFFFF_FFFB, "results frozen while busy");
    st_busy = 0; st_brk = 1;
    repeat (6) @(negedge pclk);
    apb_read(REG_STATUS, d);
    check(d[3:0] == 4'b0100, "status BREAK");
    apb_read(REG_MV_X, d);  check(d == 32'd3, "results follow once stopped");
    apb_read(REG_SAD, d);   check(d == 32'd9, "SAD follows once stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
