// Modulo-2 adder and synchronisation flip-flop of the code generator.
//
// The two fold outputs BC1 and BC2 are added modulo 2. Because the counters
// behind them may pass through transient states, the sum may carry spikes;
// a flip-flop fed with the sum and its complement takes it over only when
// the strobe, in phase with the input of the first code-generator stage, is
// active. Output code changes one clk after a strobe cycle and holds for the
// whole chip. Structure and strobe phase follow the original design; the strobe
// being one clk wide is this design's synchronous form of the extra gate.
// The adder is built from four SC1173 parallel gates used as NANDs (positive
// signal direction), in the usual four-NAND exclusive-or; that gate-level
// arrangement is this design's own.
module code_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic bc1,
  input  logic bc2,
  input  logic strobe,  // transfer gate, once per chip
  output logic sum,     // output of the modulo-2 adder (unclocked)
  output logic code,    // clocked code
  output logic code_n
);
  logic n_ab, n_a, n_b;

  // sum = NAND(NAND(a, NAND(a,b)), NAND(b, NAND(a,b))); the third input of
  // each gate is tied to one of the other two.
  sc1173_gate u_nand_ab (.a(bc1),  .b(bc2), .c(bc2), .y(n_ab));
  sc1173_gate u_nand_a  (.a(bc1),  .b(n_ab), .c(n_ab), .y(n_a));
  sc1173_gate u_nand_b  (.a(bc2),  .b(n_ab), .c(n_ab), .y(n_b));
  sc1173_gate u_nand_s  (.a(n_a),  .b(n_b), .c(n_b), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      code <= 1'b0;
    else if (strobe) code <= sum;
  end

  assign code_n = ~code;
endmodule
