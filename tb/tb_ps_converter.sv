// Testbench of the parallel-serial converter: random words loaded, then
// shifted out four bits, MSB first; the serial line is compared with the
// loaded word bit by bit, with random pauses between shifts.
module tb_ps_converter;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [3:0] par_in = '0;
  logic ser_out;
  int checks = 0, failures = 0;

  ps_converter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      w = 4'($urandom);
      par_in = w; load = 1; shift = 1;     // load wins over shift
      @(negedge clk);
      load = 0; shift = 0; par_in = 4'($urandom);
      for (int b = 3; b >= 0; b--) begin
        checks++;
        if (ser_out != w[b]) begin failures++; $display("FAIL word %h bit %0d", w, b); end
        repeat ($urandom_range(0, 2)) @(negedge clk);
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
      checks++;
      if (ser_out != 1'b0) begin failures++; $display("FAIL register not emptied"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
