// tb_me_dpram: self-checking test of the dual-clock scratchpad memory.
//
// Port A (clock 60 MHz) writes random words and reads them back; port B
// (clock 90 MHz) reads them too. Checks the one-cycle read latency on both
// ports, read-before-write on port A, and that en_a low blocks a write.
module tb_me_dpram;
  localparam int DEPTH = 64;

  logic clk_a = 1'b0, clk_b = 1'b0;
  always #8.333 clk_a = ~clk_a;
  always #5.555 clk_b = ~clk_b;

  logic        en_a = 1'b0, we_a = 1'b0;
  logic [5:0]  addr_a = '0, addr_b = '0;
  logic [31:0] wdata_a = '0, rdata_a, rdata_b;

  me_dpram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_a);
      model[i] = $urandom;
      en_a = 1'b1; we_a = 1'b1; addr_a = 6'(i); wdata_a = model[i];
    end
    @(negedge clk_a);
    en_a = 1'b0; we_a = 1'b0;
    // Port A read-back
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_a);
      en_a = 1'b1; addr_a = 6'(i);
      @(negedge clk_a);
      en_a = 1'b0;
      check(rdata_a == model[i], $sformatf("port A word %0d", i));
    end
    // Port B reads on its own clock
    for (int i = DEPTH - 1; i >= 0; i--) begin
      @(negedge clk_b);
      addr_b = 6'(i);
      @(negedge clk_b);
      check(rdata_b == model[i], $sformatf("port B word %0d", i));
    end
    // Read-before-write on port A
    @(negedge clk_a);
    en_a = 1'b1; we_a = 1'b1; addr_a = 6'd7; wdata_a = 32'hCAFE_0007;
    @(negedge clk_a);
    check(rdata_a == model[7], "port A returns the old word while writing");
    model[7] = 32'hCAFE_0007;
    // A write with en_a low is ignored
    en_a = 1'b0; we_a = 1'b1; addr_a = 6'd9; wdata_a = 32'hDEAD_0009;
    @(negedge clk_a);
    we_a = 1'b0;
    @(negedge clk_b); addr_b = 6'd9; @(negedge clk_b); @(negedge clk_b);
    check(rdata_b == model[9], "write without enable is ignored");
    addr_b = 6'd7; @(negedge clk_b); @(negedge clk_b);
    check(rdata_b == 32'hCAFE_0007, "port B sees the new word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
