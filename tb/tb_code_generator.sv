// Testbench of the code generator: driven by a continuous central clock (one
// clk per half period), the clocked code must follow the double-folded
// Barker sequence chip(n) = B[n/11] xor B[n%11], B = 11100010010, for three
// full 121-chip periods, one chip per two clk, and mark each period start
// once. The reference sequence is built here from the code digits, not from
// the design's package.
module tb_code_generator;
  logic clk = 0, rst_n = 0, phase = 0;
  logic in_rise, in_fall;
  logic code, code_n, bc1, bc2, period_start;
  logic [3:0] fold1_state, fold2_state;
  int checks = 0, failures = 0, periods = 0, chips = 0, spikes = 0;
  localparam logic B [11] = '{1,1,1,0,0,0,1,0,0,1,0};

  assign in_rise = !phase;
  assign in_fall = phase;

  code_generator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk or negedge rst_n) if (!rst_n) phase <= 0; else phase <= ~phase;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t chip=%0d", what, $time, chips); end
  endtask

  initial begin
    int last_start = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2 * 121 * 3 + 4; t++) begin
      @(posedge clk);
      #1;
      if (period_start) begin
        if (last_start >= 0) check(t - last_start == 242, "121 chips per period");
        last_start = t;
        periods++;
      end
      if ((bc1 ^ bc2) != code && !phase) spikes++;
      if (phase == 1'b0 && t >= 1) begin
        // the code was updated at the end of the previous (high) cycle
        check(code == (B[(chips / 11) % 11] ^ B[chips % 11]), "double-folded Barker chip");
        check(code_n == !code, "complement");
        chips++;
      end
    end
    check(periods == 3, "three code periods");
    $display("chips=%0d periods=%0d", chips, periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
