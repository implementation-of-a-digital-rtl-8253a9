// Code generator: double-folded 11-bit Barker code for synchronisation.
//
// Fold 2 (the fast fold) is an 11-state counter stepped by the input clock
// IN; its reset pulse drives fold 1, a second 11-state counter that thus
// steps once every 11 chips. Each counter's state is decoded into its fold
// BC2/BC1 by a Barker matrix, the two are added modulo 2 and retimed by the
// synchronisation flip-flop once per chip, while IN is high. The output is
// the 121-chip sequence code[n] = B[n / 11] xor B[n % 11], with
// B = 11100010010, one chip per period of IN.
//
// Timing: after reset, chip 0 appears one clk after the first cycle in which
// in_fall is set, and every chip lasts one IN period. period_start marks the
// clk in which the whole 121-chip period wraps (Reset2 in the original design).
module code_generator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_rise,       // IN rises at the end of this cycle
  input  logic       in_fall,       // IN is high and falls at the end of this cycle
  output logic       code,
  output logic       code_n,
  output logic [3:0] fold1_state,
  output logic [3:0] fold2_state,
  output logic       bc1,
  output logic       bc2,
  output logic       period_start   // fold 1 reset flip-flop (Reset2)
);
  logic rst2, wrap2_rise, wrap2_fall;
  logic wrap1_rise, wrap1_fall;
  logic sum;

  barker_counter #(.LENGTH(cu_pkg::BARKER_LEN)) u_fold2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_rise  (in_rise),
    .in_fall  (in_fall),
    .state    (fold2_state),
    .rst_ff   (rst2),
    .wrap_rise(wrap2_rise),
    .wrap_fall(wrap2_fall)
  );

  barker_counter #(.LENGTH(cu_pkg::BARKER_LEN)) u_fold1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_rise  (wrap2_rise),
    .in_fall  (wrap2_fall),
    .state    (fold1_state),
    .rst_ff   (period_start),
    .wrap_rise(wrap1_rise),
    .wrap_fall(wrap1_fall)
  );

  barker_matrix u_bc1 (.state(fold1_state), .bc(bc1));
  barker_matrix u_bc2 (.state(fold2_state), .bc(bc2));

  code_sync u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .bc1   (bc1),
    .bc2   (bc2),
    .strobe(in_fall),
    .sum   (sum),
    .code  (code),
    .code_n(code_n)
  );
endmodule
