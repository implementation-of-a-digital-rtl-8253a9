// Digital part of the 4-bit counting A-D converter.
//
// A four-stage SC1149 counter drives the switches of an R-2R ladder. The
// counter clock passes an AND gate together with the enable window and the
// comparator output; the comparator (outside this module) is 1 while the
// ladder voltage is below the analogue input. The count thus climbs in
// binary steps until the ladder reaches the input, then the gate closes and
// the count is held, as the digital value, until the next RESET. The count
// is both the ladder drive and the word read by the multiplexer.
//
// clk_rate is the counter clock as a level (here the central clock, high
// every other clk). The gate output is registered once and its edges drive
// the chain, so each counter step completes two clk after the gate opens and
// the comparator always sees the new count before the gate may open again.
// The gate is also closed at count 15, so an input above full scale reads 15
// instead of wrapping to 0; that and the clock rate are this design's choices.
// The gate is two three-input blocks in positive signal direction: an SC1173
// (NAND) of clock, window and comparator, followed by an SC1128 (NOR) that
// also takes the full-scale and RESET terms.
module ad_converter #(
  parameter int unsigned BITS = cu_pkg::WORD_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clk_rate,  // counter clock rate
  input  logic            enable,    // conversion window
  input  logic            reset,     // RESET of all counter stages
  input  logic            cmp,       // comparator: ladder below the analogue input
  output logic [BITS-1:0] count      // ladder switches and digital result
);
  logic            gate, gate_d, open_n, full;
  logic [BITS-1:0] master;

  assign full = &count;

  // gate = clk_rate & enable & cmp & !full & !reset
  sc1173_gate u_gate_in  (.a(clk_rate), .b(enable), .c(cmp),   .y(open_n));
  sc1128_gate u_gate_out (.a(open_n),   .b(full),   .c(reset), .y(gate));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gate_d <= 1'b0;
    else        gate_d <= gate;
  end

  counter_chain #(.N(BITS), .FROM_OUT2('1)) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (reset),
    .in_rise(gate && !gate_d),
    .in_fall(!gate && gate_d),
    .out1   (master),
    .out2   (count)
  );
endmodule
