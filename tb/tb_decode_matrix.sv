// Testbench of the command decoding matrix with its default patterns, driven
// by a free-running 11-bit divider state. The expected commands are written
// out here: cmd2 while q[10:6] = 0 (one frame in 32), cmd1 while
// q[7:3] = 3 (one word slot every four frames), cmd0 while q[5:1] = 0 (two
// clk every frame); each appears one clk after its state. Also measures each
// command's length and period.
module tb_decode_matrix;
  logic clk = 0, rst_n = 0;
  logic [10:0] q = '0, q_d = '0;
  logic [2:0] y;
  int checks = 0, failures = 0;
  int len [3] = '{0, 0, 0};
  int first [3] = '{-1, -1, -1};
  int second [3] = '{-1, -1, -1};

  decode_matrix dut (.clk, .rst_n, .q, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t q_d=%h y=%b", what, $time, q_d, y); end
  endtask

  initial begin
    logic [2:0] e, y_prev;
    y_prev = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2 * 2048 + 3; t++) begin
      @(posedge clk);
      q_d = q;
      #1 q = q + 1;
      e[2] = (q_d[10:6] == 5'd0);
      e[1] = (q_d[7:3] == 5'd3);
      e[0] = (q_d[5:1] == 5'd0);
      check(y == e, "decoded commands");
      for (int i = 0; i < 3; i++) begin
        if (y[i] && t < 2048) len[i]++;
        if (y[i] && !y_prev[i]) begin
          if (first[i] < 0) first[i] = t; else if (second[i] < 0) second[i] = t;
        end
      end
      y_prev = y;
    end
    check(len[2] == 64 && second[2] - first[2] == 2048, "cmd2: 64 clk every 2048");
    check(len[1] == 8 * 8 && second[1] - first[1] == 256, "cmd1: 8 clk every 256");
    check(len[0] == 2 * 32 && second[0] - first[0] == 64, "cmd0: 2 clk every 64");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
