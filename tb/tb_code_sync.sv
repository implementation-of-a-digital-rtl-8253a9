// Testbench of the modulo-2 adder and synchronisation flip-flop: random
// fold inputs with spikes between strobes; the adder output must be the
// exclusive-or, and the clocked code must change only after a strobe, to the
// sum present in the strobe cycle.
module tb_code_sync;
  logic clk = 0, rst_n = 0, bc1 = 0, bc2 = 0, strobe = 0;
  logic sum, code, code_n;
  logic expect_code = 0;
  int checks = 0, failures = 0;

  code_sync dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      bc1 = 1'($urandom); bc2 = 1'($urandom); strobe = (n % 3 == 0);
      #1 check(sum == (bc1 != bc2), "modulo-2 sum");
      if (strobe) expect_code = (bc1 != bc2);
      @(posedge clk);
      #1 check(code == expect_code && code_n == !expect_code, "clocked code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
