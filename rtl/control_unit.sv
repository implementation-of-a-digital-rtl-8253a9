// Digital control unit of a small space probe.
//
// One central clock (clk) drives a frequency divider of cascaded SC1149
// binary counter stages; every other sub-unit takes its timing from decoded
// divider states:
//   - the code generator sends a double-folded 11-bit Barker code (121 chips,
//     one chip per central-clock period) for synchronisation;
//   - the command sub-unit decodes three command signals;
//   - the input sequencer switches one of four analogue channels per frame to
//     the A-D converter and strobes three digital buffer registers;
//   - the 4-bit counting A-D converter steps an R-2R ladder until the external
//     comparator reports that the ladder has reached the analogue input;
//   - the multiplexer puts eight 4-bit words per frame in order (slot 0 the
//     A-D result of the previous frame, slots 1-3 the buffers, slots 4-7 the
//     direct digital inputs) and the parallel-serial converter sends them MSB
//     first, one bit per central-clock period.
// Analogue parts (thermistor bus, ladder, comparator) are outside: the ladder
// drive, the switch signals and the comparator input are ports.
//
// Timing: telemetry word = 8 clk, frame = 64 clk, analogue channel cycle = 4
// frames, divider period = 2048 clk. A word is loaded into the shift register
// at the cycle with q[2:0] = 0 and its first bit is on tm_out one clk later.
// The block structure comes from the original design; frame layout and sizes are this
// design's own.
module control_unit
  import cu_pkg::*;
#(
  parameter int unsigned N_STAGES = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // digital measurements
  input  word_t [N_BUF-1:0]         buf_in,      // data that must be taken at their own time
  input  word_t [N_DIRECT-1:0]      direct_in,   // data taken when multiplexed
  // analogue side
  input  logic                      adc_cmp,     // comparator: ladder below analogue input
  output logic [WORD_BITS-1:0]      ladder_sw,   // ladder switch drive (A-D counter)
  output logic [N_ANALOG-1:0]       t_an,        // analogue channel switches
  output logic                      f_supply,    // thermistor group supply
  // outputs
  output logic                      code,
  output logic                      code_n,
  output logic [2:0]                cmd,
  output logic                      tm_out,      // serial telemetry
  output logic                      tm_load,     // a new word enters the shift register
  output logic [2:0]                tm_slot,     // slot of the word being loaded
  output logic [N_STAGES:0]         div_q        // divider state, for observation
);
  logic [N_STAGES:0]   q;
  logic                in_rise, in_fall;

  freq_divider #(.N_STAGES(N_STAGES)) u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .q      (q),
    .q_master(),
    .in_rise(in_rise),
    .in_fall(in_fall)
  );

  // ---- code generator ------------------------------------------------------
  code_generator u_code (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_rise     (in_rise),
    .in_fall     (in_fall),
    .code        (code),
    .code_n      (code_n),
    .fold1_state (),
    .fold2_state (),
    .bc1         (),
    .bc2         (),
    .period_start()
  );

  // ---- command sub-unit ----------------------------------------------------
  decode_matrix #(.N_OUT(3), .W(N_STAGES + 1)) u_cmd (
    .clk  (clk),
    .rst_n(rst_n),
    .q    (q),
    .y    (cmd)
  );

  // ---- input sequencer and buffers -----------------------------------------
  logic             adc_reset, adc_enable;
  logic [N_BUF-1:0] buf_load;
  word_t [N_BUF-1:0] buf_q;

  input_sequencer #(.W(N_STAGES + 1)) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .q         (q),
    .t_an      (t_an),
    .f         (f_supply),
    .chan      (),
    .adc_reset (adc_reset),
    .adc_enable(adc_enable),
    .buf_load  (buf_load)
  );

  for (genvar j = 0; j < N_BUF; j++) begin : g_buf
    buffer_register #(.W(WORD_BITS)) u_buf (
      .clk  (clk),
      .rst_n(rst_n),
      .t    (buf_load[j]),
      .d    (buf_in[j]),
      .q    (buf_q[j])
    );
  end

  // ---- A-D converter -------------------------------------------------------
  word_t adc_word;

  ad_converter #(.BITS(WORD_BITS)) u_adc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clk_rate(q[0]),
    .enable  (adc_enable),
    .reset   (adc_reset),
    .cmp     (adc_cmp),
    .count   (adc_word)
  );
  assign ladder_sw = adc_word;

  // ---- multiplexer and parallel-serial converter ---------------------------
  word_t [N_SLOTS-1:0] frame_words;
  word_t               mux_word;

  assign frame_words[0] = adc_word;
  for (genvar j = 0; j < N_BUF; j++) begin : g_fw_buf
    assign frame_words[1 + j] = buf_q[j];
  end
  for (genvar j = 0; j < N_DIRECT; j++) begin : g_fw_dir
    assign frame_words[1 + N_BUF + j] = direct_in[j];
  end

  multiplexer #(.N_WORDS(N_SLOTS), .W(WORD_BITS)) u_mux (
    .words(frame_words),
    .sel  (q[5:3]),
    .y    (mux_word)
  );

  assign tm_load = (q[2:0] == 3'd0);
  assign tm_slot = q[5:3];

  ps_converter #(.W(WORD_BITS)) u_ps (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (tm_load),
    .shift  (!q[0] && (q[2:1] != 2'd0)),
    .par_in (mux_word),
    .ser_out(tm_out)
  );

  assign div_q = q;

  initial assert (N_STAGES >= 7 && 1 + N_BUF + N_DIRECT == N_SLOTS);
endmodule
