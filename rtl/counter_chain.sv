// A cascade of SC1149 stages (count-down chain).
//
// Stage 1 is driven by the input edge strobes. Every further stage k is
// driven by the previous stage, either by its slave outputs OUT2 (pins 3 and
// 5) when bit k of FROM_OUT2 is set, or by its master outputs OUT1 (pins 8
// and 4). Both cascades appear in the original three-stage divider drawing. Fed from
// the slaves throughout (the default), the slave outputs count the input
// periods in binary and change on the trailing input edge; each master runs
// half an input period of its stage ahead of its slave. Feeding a stage from
// a master instead shifts it and all later stages by half a period of the
// stage before.
//
// The edge strobes of stage k are worked out from the state of stage k-1 and
// its own input strobes, so the whole chain changes on one clk edge: the
// ripple delay of the discrete chain is not modelled. out1[k]/out2[k] are the
// master/slave outputs of stage k+1 (index 0 is the first stage).
module counter_chain #(
  parameter int unsigned  N         = 4,
  parameter logic [N-1:0] FROM_OUT2 = '1   // bit k: stage k fed by the slave of stage k-1 (bit 0 unused)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         in_rise,
  input  logic         in_fall,
  output logic [N-1:0] out1,   // masters, pin 8
  output logic [N-1:0] out2    // slaves, pin 3
);
  logic [N-1:0] rise, fall;
  logic [N-1:0] out1_n, out2_n;

  assign rise[0] = in_rise;
  assign fall[0] = in_fall;

  for (genvar k = 1; k < N; k++) begin : g_edge
    if (FROM_OUT2[k]) begin : g_from_slave
      // slave of stage k-1 changes on its second input edge
      assign rise[k] = fall[k-1] &&  out1[k-1] && !out2[k-1];
      assign fall[k] = fall[k-1] && !out1[k-1] &&  out2[k-1];
    end else begin : g_from_master
      // master of stage k-1 changes on its first input edge
      assign rise[k] = rise[k-1] && !out2[k-1] && !out1[k-1];
      assign fall[k] = rise[k-1] &&  out2[k-1] &&  out1[k-1];
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    sc1149_stage u_ff (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .in_rise(rise[k]),
      .in_fall(fall[k]),
      .out1   (out1[k]),
      .out1_n (out1_n[k]),
      .out2   (out2[k]),
      .out2_n (out2_n[k])
    );
  end
endmodule
