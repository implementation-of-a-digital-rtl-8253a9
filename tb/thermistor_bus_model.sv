// Behavioural model of the analogue sequencer bus (not synthesizable): four
// thermistor networks, powered only while the frame signal f is active, each
// switched onto the bus by its t_i. The bus voltage is the selected channel's
// voltage, or 0 when no switch is closed. Voltages in millivolts.
module thermistor_bus_model (
  input  logic [3:0] t,
  input  logic       f,
  input  int         ch_mv [4],
  output int         bus_mv
);
  always_comb begin
    bus_mv = 0;
    if (f)
      for (int i = 0; i < 4; i++)
        if (t[i]) bus_mv = ch_mv[i];
  end
endmodule
