// Testbench of the buffer register: random data and strobes; the register
// must take the input only on a strobe and keep it, unchanged by repeated
// reads, until the next one.
module tb_buffer_register;
  logic clk = 0, rst_n = 0, t = 0;
  logic [3:0] d = '0, q, held = '0;
  int checks = 0, failures = 0;

  buffer_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      d = 4'($urandom);
      t = ($urandom_range(0, 4) == 0);
      if (t) held = d;
      @(posedge clk);
      #1;
      checks++;
      if (q != held) begin failures++; $display("FAIL q=%h expected %h", q, held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
