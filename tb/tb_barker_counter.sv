// Testbench of the 11-state counter with reset matrix. The input is a square
// wave with random pauses. At every cycle in which the input is high the
// state must equal (periods since reset) mod 11; the reset flip-flop must
// pulse exactly once per 11 input periods, for one clk, and the transient
// state 11 must appear only while it is set.
module tb_barker_counter;
  logic clk = 0, rst_n = 0, in_rise = 0, in_fall = 0;
  logic [3:0] state;
  logic rst_ff, wrap_rise, wrap_fall;
  int checks = 0, failures = 0, periods = 0, resets = 0, transients = 0;

  barker_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t periods=%0d state=%0d", what, $time, periods, state); end
  endtask

  initial begin
    logic lvl = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_rise = 0; in_fall = 0;
      if ($urandom_range(0, 3) != 0) begin
        if (!lvl) in_rise = 1; else in_fall = 1;
      end
      #1;
      if (in_fall) check(32'(state) == periods % 11, "state counts input periods mod 11");
      check(wrap_rise == (in_fall && periods % 11 == 10), "reset matrix fires at the 11th period");
      if (state == 4'd11) begin transients++; check(rst_ff, "state 11 only while resetting"); end
      else check(32'(state) <= 10, "no state above 11");
      if (rst_ff) resets++;
      @(posedge clk);
      if (in_rise) lvl = 1;
      if (in_fall) begin lvl = 0; periods++; end
    end
    check(resets == periods / 11 || resets == periods / 11 - 1 || resets == periods / 11 + 1, "one reset per 11 periods");
    check(transients > 0, "transient state seen");
    $display("periods=%0d resets=%0d", periods, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
