// Decoding matrix of the command sub-unit.
//
// Each output is one product term over the frequency-divider state q: output
// i is 1 while every bit of q selected by MASK[i] equals the same bit of
// VALUE[i]. The bits left out of a term set the length of the command (the
// lowest decoded bit k gives pulses 2^k clk long at most) and the highest
// decoded bit its period, so one matrix gives commands of different length
// and period. The outputs are registered, so they change one clk after the
// divider state and carry no decoding spikes.
//
// The original design says only that the matrix decodes divider states into
// commands and that the exact configuration depends on the pulse pattern
// required; the three default patterns are this design's own examples.
module decode_matrix #(
  parameter int unsigned                     N_OUT = 3,
  parameter int unsigned                     W     = 11,
  parameter logic [N_OUT-1:0][W-1:0]         MASK  = {11'h7C0, 11'h0F8, 11'h03E},
  parameter logic [N_OUT-1:0][W-1:0]         VALUE = {11'h000, 11'h018, 11'h000}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     q,
  output logic [N_OUT-1:0] y
);
  logic [N_OUT-1:0] hit;

  for (genvar i = 0; i < N_OUT; i++) begin : g_term
    assign hit[i] = ((q & MASK[i]) == (VALUE[i] & MASK[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= hit;
  end
endmodule
