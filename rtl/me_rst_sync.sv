// me_rst_sync: reset synchroniser.
//
// Asserts `rst_out_n` at once when `rst_in_n` falls and releases it two
// `clk` cycles after `rst_in_n` rises, so that every flip-flop of the
// clock domain leaves reset on the same edge. A standard circuit, used for
// the ME clock domain; not taken from the published design.
module me_rst_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);

  logic meta;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      meta      <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_out_n <= meta;
    end
  end

endmodule
