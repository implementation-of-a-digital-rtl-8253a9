// Input sequencer: timing of the analogue channels, the buffer registers and
// the A-D converter, decoded from the frequency-divider state.
//
// Divider state q (q[0] = central clock, one clk per step) is read as
//   q[2:1] bit of the word, q[5:3] word slot of the frame, q[7:6] frame number.
// In every frame one of the four analogue channels is measured, in turn by
// frame number: the A-D converter is reset during slot 1, converts during
// slots 2 to 5 (16 counter clocks), and holds the result for the multiplexer.
// The frame signal f supplies the thermistor group only in slots 1 to 5, and
// the switch t_i of the channel of this frame is closed during the same time.
// The buffer strobes are produced by a decoding matrix at fixed times of the
// frame, independent of the slots in which the multiplexer reads the buffers.
//
// The original design gives t_i, f and the principle (decoding of divider states,
// timing independent of the multiplexer, allowance for conversion time); the
// slot numbers and strobe times are this design's choice.
module input_sequencer #(
  parameter int unsigned                          W        = 11,
  parameter int unsigned                          N_ANALOG = cu_pkg::N_ANALOG,
  parameter int unsigned                          N_BUF    = cu_pkg::N_BUF,
  // buffer j is loaded when q[5:0] == BUF_TIME[j] (then one clk later)
  parameter logic [N_BUF-1:0][5:0]                BUF_TIME = {6'd50, 6'd21, 6'd43}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        q,
  output logic [N_ANALOG-1:0] t_an,        // analogue channel switches
  output logic                f,           // frame supply of the thermistor group
  output logic [1:0]          chan,        // channel measured in this frame
  output logic                adc_reset,
  output logic                adc_enable,
  output logic [N_BUF-1:0]    buf_load
);
  logic [2:0] slot;

  assign slot       = q[5:3];
  assign chan       = q[7:6];
  assign adc_reset  = (slot == 3'd1);
  assign adc_enable = (slot >= 3'd2) && (slot <= 3'd5);
  assign f          = (slot >= 3'd1) && (slot <= 3'd5);

  for (genvar i = 0; i < N_ANALOG; i++) begin : g_t
    assign t_an[i] = f && (32'(chan) == i);
  end

  localparam logic [N_BUF-1:0][W-1:0] BUF_MASK = {N_BUF{W'(6'h3F)}};

  function automatic logic [N_BUF-1:0][W-1:0] widen(input logic [N_BUF-1:0][5:0] t);
    for (int j = 0; j < N_BUF; j++) widen[j] = W'(t[j]);
  endfunction

  decode_matrix #(
    .N_OUT(N_BUF),
    .W    (W),
    .MASK (BUF_MASK),
    .VALUE(widen(BUF_TIME))
  ) u_buf_time (
    .clk  (clk),
    .rst_n(rst_n),
    .q    (q),
    .y    (buf_load)
  );

  initial assert (N_ANALOG <= 4 && W >= 8);
endmodule
