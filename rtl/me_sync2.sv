// me_sync2: two-flip-flop synchroniser for a level signal.
//
// Brings a signal that changes in another clock domain into the `clk`
// domain; the output follows the input two to three cycles later. Use it
// only for single bits, or for multi-bit values that are held stable while
// they are read. Reset value is `RST_VAL`. A standard circuit, not taken
// from the published design.
module me_sync2 #(
  parameter int unsigned WIDTH   = 1,
  parameter logic        RST_VAL = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= {WIDTH{RST_VAL}};
      q    <= {WIDTH{RST_VAL}};
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
