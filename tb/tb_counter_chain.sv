// Testbench of the SC1149 cascade. Three chains of four stages get the same
// square-wave input with random pauses and one clr:
//   S: every stage fed from the slave of the one before (pins 3/5);
//   M: every stage fed from the master (pins 8/4);
//   X: the mixed cascade of the original divider drawing, FF2 from FF1's pins 8/4 and
//      FF3, FF4 from the pins 3/5 before them.
// Reference: a stage whose input is bit j of a count v has its master at bit
// j+1 of v + 2^j and its slave at bit j+1 of v. With e input edges since the
// clr, stage 1 sees bit 0 of e; feeding the next stage from a master adds
// 2^(k-1) to the count it sees. So stage k shows slave = bit k of (e + o_k)
// and master = bit k of (e + o_k + 2^(k-1)), o_k summed over the masters used.
module tb_counter_chain;
  logic clk = 0, rst_n = 0, clr = 0, in_rise = 0, in_fall = 0;
  logic [3:0] s1, s2, m1, m2, x1, x2;
  int checks = 0, failures = 0, edges = 0;

  counter_chain #(.N(4), .FROM_OUT2(4'b1111)) u_s (.clk, .rst_n, .clr, .in_rise, .in_fall, .out1(s1), .out2(s2));
  counter_chain #(.N(4), .FROM_OUT2(4'b0000)) u_m (.clk, .rst_n, .clr, .in_rise, .in_fall, .out1(m1), .out2(m2));
  counter_chain #(.N(4), .FROM_OUT2(4'b1100)) u_x (.clk, .rst_n, .clr, .in_rise, .in_fall, .out1(x1), .out2(x2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t edges=%0d", what, $time, edges); end
  endtask

  // expected {masters, slaves} for a chain whose stage k>=2 is fed from the
  // slave when from_slave[k-1] is set
  function automatic logic [7:0] expect_chain(input int unsigned e, input logic [3:0] from_slave);
    int unsigned o = 0;
    logic [3:0] m, s;
    for (int k = 1; k <= 4; k++) begin
      if (k >= 2 && !from_slave[k-1]) o += 1 << (k - 2);
      s[k-1] = 1'((e + o) >> k);
      m[k-1] = 1'((e + o + (1 << (k - 1))) >> k);
    end
    return {m, s};
  endfunction

  initial begin
    logic [7:0] es, em, ex;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_rise = 0; in_fall = 0; clr = 0;
      if (n == 2000) clr = 1;
      else if ($urandom_range(0, 4) != 0) begin
        if (edges % 2 == 0) in_rise = 1; else in_fall = 1;
      end
      @(posedge clk);
      #1;
      if (clr) edges = 0;
      else if (in_rise || in_fall) edges++;
      es = expect_chain(edges, 4'b1111);
      em = expect_chain(edges, 4'b0000);
      ex = expect_chain(edges, 4'b1100);
      check({s1, s2} == es, "slave-fed cascade");
      check({m1, m2} == em, "master-fed cascade");
      check({x1, x2} == ex, "mixed cascade");
      check(s2 == 4'(edges / 2), "slave-fed chain counts input periods");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
