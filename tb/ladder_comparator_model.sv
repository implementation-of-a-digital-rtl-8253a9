// Behavioural model of the analogue front of the A-D converter (not
// synthesizable): the R-2R ladder switched by the four counter outputs and
// the difference-amplifier comparator. The ladder gives sw * LSB_MV millivolts;
// cmp is 1 while that is below the analogue input, so the counter keeps
// counting. Voltages are integers in millivolts.
module ladder_comparator_model #(
  parameter int LSB_MV = 625        // 10 V full scale / 16
) (
  input  logic [3:0] sw,
  input  int         vin_mv,
  output logic       cmp
);
  assign cmp = (int'(sw) * LSB_MV) < vin_mv;
endmodule
