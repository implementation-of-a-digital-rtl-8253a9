// One SC1149 binary counter block: a master-slave toggle flip-flop.
//
// The integrated block holds two flip-flops in master-slave configuration.
// On the first edge of its input (IN on pin 1 falling, its complement on pin
// 7 rising) the master takes the complement of the slave; on the second edge
// the slave copies the master. So the master output OUT1 (pin 8, complement
// pin 4) divides the input by two, and the slave output OUT2 (pin 3,
// complement pin 5) follows it half an input period later. RESET (pin 2)
// forces both flip-flops to the quiescent state 0.
//
// In this synchronous model the two input edges arrive as one-cycle strobes
// sampled on clk: in_rise (pin 7 rises, master loads) and in_fall (pin 7
// falls, slave loads); both outputs change on the clk edge that ends the
// strobe. The reset strobe clr is synchronous; an input rise in the same
// cycle is applied to the freshly reset master, so a reset never swallows a
// count. rst_n is the power-on reset. Pin numbers and the master/slave order
// follow the block's description and waveforms; the strobe interface is this
// design's own.
module sc1149_stage (
  input  logic clk,
  input  logic rst_n,     // power-on reset, active low
  input  logic clr,       // RESET pin 2, synchronous, active high here
  input  logic in_rise,   // first input edge this cycle: master loads ~slave
  input  logic in_fall,   // second input edge this cycle: slave loads master
  output logic out1,      // pin 8, master
  output logic out1_n,    // pin 4
  output logic out2,      // pin 3, slave
  output logic out2_n     // pin 5
);
  logic master, slave;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master <= 1'b0;
      slave  <= 1'b0;
    end else if (clr) begin
      master <= in_rise;
      slave  <= 1'b0;
    end else begin
      if (in_rise) master <= ~slave;
      if (in_fall) slave  <= master;
    end
  end

  assign out1   = master;
  assign out1_n = ~master;
  assign out2   = slave;
  assign out2_n = ~slave;

  // The two input edges are exclusive: the block oscillates if both inputs
  // are at ground together.
  assert property (@(posedge clk) !(in_rise && in_fall));
endmodule
