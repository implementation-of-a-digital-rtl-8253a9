// Testbench of the frequency divider at its default size: the state q must
// count clk cycles in binary from reset (q[0] the central clock, q[k] the
// slave output OUT2 of FFk, period 2^(k+1) clk), and each master output OUT1
// of FFk must run 2^(k-1) clk ahead of its slave. Runs two full periods.
module tb_freq_divider;
  localparam int N = 10;
  logic clk = 0, rst_n = 0;
  logic [N:0] q;
  logic [N-1:0] q_master;
  logic in_rise, in_fall;
  int checks = 0, failures = 0;

  freq_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int unsigned t, lead;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (t = 0; t < 2 * (1 << (N + 1)) + 7; t++) begin
      check(q == (N+1)'(t), "divider counts clk cycles");
      check(in_rise == !q[0] && in_fall == q[0], "central clock edges");
      for (int k = 1; k <= N; k++) begin
        lead = t + (1 << (k - 1));
        check(q_master[k-1] == lead[k], "master leads slave by half an input period");
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
