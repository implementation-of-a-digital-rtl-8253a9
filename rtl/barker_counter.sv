// 11-state counter of the Barker code generator, with reset matrix and reset
// flip-flop.
//
// Four SC1149 stages (a counter_chain) would count to 16; a reset matrix stops
// them after LENGTH states. The matrix is an AND of the input, the master of
// the first stage and the slave outputs that are 1 in LENGTH-1, true in the
// half input period in which the counter leaves state LENGTH-1. The original
// design writes its matrix as the pin product (1/7).(1/3).(2/8).(4/8); this
// model decodes the same step past state LENGTH-1 from its own signals
// rather than from those pins. The matrix sets the reset
// flip-flop rst_ff on the edge where the counter steps to LENGTH; one clk
// later, with rst_ff stable, the counter is cleared and rst_ff falls back.
// The counter therefore shows state LENGTH for one clk, like the short
// erroneous pulse of the original pulse diagram; the Barker matrix decodes
// that state like state 0, so it never reaches the code.
//
// rst_ff is a pulse one clk long, once per LENGTH input periods. The reset
// pulse feeds the next 11-state group as its input: wrap_rise/wrap_fall are
// its edges in the strobe form the SC1149 stages take.
module barker_counter #(
  parameter int unsigned LENGTH = 11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_rise,    // input IN rises at the end of this cycle
  input  logic       in_fall,    // input IN is high and falls at the end of this cycle
  output logic [3:0] state,      // slave outputs (pins 3) of the four stages
  output logic       rst_ff,     // reset flip-flop, one clk wide
  output logic       wrap_rise,  // reset pulse rises at the end of this cycle
  output logic       wrap_fall   // reset pulse falls at the end of this cycle
);
  localparam logic [3:0] LAST = 4'(LENGTH - 1);

  logic [3:0] master;
  logic       reset_cond;

  counter_chain #(.N(4), .FROM_OUT2('1)) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (rst_ff),
    .in_rise(in_rise),
    .in_fall(in_fall),
    .out1   (master),
    .out2   (state)
  );

  // Reset matrix: IN high, first master set, and every slave that is 1 in LAST.
  assign reset_cond = in_fall && (master[0] || !LAST[0]) && ((state & LAST) == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rst_ff <= 1'b0;
    else if (reset_cond) rst_ff <= 1'b1;
    else if (rst_ff)     rst_ff <= 1'b0;
  end

  assign wrap_rise = reset_cond;
  assign wrap_fall = rst_ff;

  initial assert (LENGTH >= 2 && LENGTH <= 15);
endmodule
