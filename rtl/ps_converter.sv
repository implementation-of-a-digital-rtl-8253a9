// Parallel-serial converter: a shift register loaded in parallel and emptied
// serially, most significant bit first.
//
// A load strobe takes the word from the multiplexer; each shift strobe moves
// the register one place towards the output, filling with 0. ser_out is the
// register's top bit, so the first bit of a word is on the line from the
// clk edge that ends the load cycle. Load wins over shift. Bit order and
// strobe form are this design's choice.
module ps_converter #(
  parameter int unsigned W = cu_pkg::WORD_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] par_in,
  output logic         ser_out
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= par_in;
    else if (shift) sr <= {sr[W-2:0], 1'b0};
  end

  assign ser_out = sr[W-1];
endmodule
