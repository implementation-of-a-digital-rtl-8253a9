// Frequency divider of the control unit.
//
// The central clock is the square wave IN; here it is the register phase,
// which toggles on every clk (one clk = half a period of the central clock).
// IN drives a chain of N_STAGES SC1149 blocks, each fed from the slave
// outputs (pins 3/5) of the one before, so with q = {slaves, phase} the
// divider state q counts clk cycles in binary: q[0] is the central clock and
// q[k] the slave output OUT2 of flip-flop FFk, of period 2^(k+1) clk, changing
// on the trailing edge of its input. q_master[k-1] is the master output OUT1
// of FFk, half an input period ahead of q[k]. All other sub-units take their
// timing from q.
//
// The original design gives the cascade but not the number of stages; 10 stages
// (a frame of 64 clk and 16 frames per divider period) is this design's choice.
module freq_divider #(
  parameter int unsigned N_STAGES = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [N_STAGES:0]   q,        // {OUT2 of FF N_STAGES .. FF1, central clock}
  output logic [N_STAGES-1:0] q_master, // OUT1 (master) of FF N_STAGES .. FF1
  output logic                in_rise,  // central clock rises at the end of this cycle
  output logic                in_fall   // central clock falls at the end of this cycle
);
  logic                phase;
  logic [N_STAGES-1:0] slaves;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;
  end

  assign in_rise = !phase;
  assign in_fall =  phase;

  counter_chain #(.N(N_STAGES), .FROM_OUT2('1)) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (1'b0),
    .in_rise(in_rise),
    .in_fall(in_fall),
    .out1   (q_master),
    .out2   (slaves)
  );

  assign q = {slaves, phase};
endmodule
