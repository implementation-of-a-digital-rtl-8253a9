// Testbench of one SC1149 stage: drives its input as a square wave with
// random pauses and random RESETs (some together with an input edge), and
// checks that the master (OUT1) has toggled once per first input edge and the
// slave (OUT2) once per second input edge since the last reset, and that
// pins 4 and 5 are the complements.
module tb_sc1149_stage;
  logic clk = 0, rst_n = 0, clr = 0, in_rise = 0, in_fall = 0;
  logic out1, out1_n, out2, out2_n;
  int checks = 0, failures = 0, rises = 0, falls = 0;
  logic in_lvl = 0;

  sc1149_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
      in_rise = 0; in_fall = 0; clr = 0;
      if ($urandom_range(0, 49) == 0) begin
        clr = 1;
        if (!in_lvl && $urandom_range(0, 1) == 0) in_rise = 1;
      end else if ($urandom_range(0, 3) != 0) begin
        if (!in_lvl) in_rise = 1; else in_fall = 1;
      end
      @(posedge clk);
      #1;
      if (clr) begin rises = int'(in_rise); falls = 0; in_lvl = in_rise; end
      else if (in_rise) begin rises++; in_lvl = 1; end
      else if (in_fall) begin falls++; in_lvl = 0; end
      check(out1 == rises[0], "master (pin 8) toggles on the first input edge");
      check(out2 == falls[0], "slave (pin 3) follows on the second input edge");
      check(out1_n == !out1 && out2_n == !out2, "complement pins");
      check(rises - falls == int'(in_lvl), "edge bookkeeping");
    end
    in_rise = 0; in_fall = 0; clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
