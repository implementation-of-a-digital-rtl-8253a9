// Barker code matrix: decodes the state of one 11-state counter into the
// chip of the 11-bit Barker code 11100010010, starting with the first chip
// when the counter is reset.
//
// Purely combinational. States 0..LENGTH-1 give CODE[state]. The counter
// passes through state LENGTH for one clk while it is being reset; the matrix
// decodes it like state 0, the state it is about to take, and any other
// unused state as 0. The code itself comes from the original design; this handling of the
// unused states is this design's choice, since the transistor matrix cannot
// be read back to a truth table.
module barker_matrix #(
  parameter int unsigned          LENGTH = cu_pkg::BARKER_LEN,
  parameter logic [LENGTH-1:0]    CODE   = cu_pkg::BARKER11
) (
  input  logic [3:0] state,
  output logic       bc
);
  always_comb begin
    if (32'(state) < LENGTH)       bc = CODE[state];
    else if (32'(state) == LENGTH) bc = CODE[0];
    else                           bc = 1'b0;
  end
endmodule
