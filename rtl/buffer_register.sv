// Buffer register for one digital measurement word.
//
// A strobe on t copies the word present on the inputs of all stages into the
// register; the contents can then be read by the multiplexer any number of
// times without being destroyed, until the next strobe. In this synchronous
// form t is sampled on clk and q changes on the clk edge that ends a strobe
// cycle. The width is this design's choice (the 4-bit telemetry word).
module buffer_register #(
  parameter int unsigned W = cu_pkg::WORD_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         t,      // transfer strobe
  input  logic [W-1:0] d,      // "in" of every stage
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (t) q <= d;
  end
endmodule
