// me_dpram: one local scratchpad memory of the motion-estimation core.
//
// The core keeps its firmware, the current macroblock and the search area in
// on-chip memories so that block matching never waits for the frame memory.
// Each memory has two ports on two clocks, as an FPGA block RAM does:
//   port A (bus clock):  host upload and read-back, one word per cycle,
//                        synchronous read (rdata_a valid the cycle after en_a)
//   port B (ME clock):   read-only port used by the processor, synchronous
//                        read (rdata_b valid the cycle after addr_b is given)
// Only port A writes. A read of a word being written on port A in the same
// cycle returns the old word. The host is expected to upload while the
// processor is stopped; nothing arbitrates between the ports. The word width
// of 32 bits follows the widened accelerator data bus; depths are set by the
// instantiating module.
module me_dpram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk_a,
  input  logic             en_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             clk_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= wdata_a;
      rdata_a <= mem[addr_a];
    end
  end

  always_ff @(posedge clk_b) begin
    rdata_b <= mem[addr_b];
  end

endmodule
