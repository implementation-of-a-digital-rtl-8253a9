// SC1173 three-input parallel gate.
//
// Three P-channel transistors in parallel between the supply and a load
// resistor to ground: the output is at 0 V only when all three gates are at
// the positive level. Read with positive signal direction this is a
// three-input NAND; with negative direction (0 V = logic 1) the same block is
// a three-input NOR. DIR selects how the logic values on the ports are to be
// read; the truth table is the one of the original design. An unused input is
// tied to one of the used ones. Combinational, no timing of its own here.
module sc1173_gate #(
  parameter cu_pkg::signal_dir_e DIR = cu_pkg::DIR_POSITIVE
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  always_comb begin
    if (DIR == cu_pkg::DIR_POSITIVE) y = !(a && b && c);
    else                             y = !(a || b || c);
  end
endmodule
