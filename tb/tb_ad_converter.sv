// Testbench of the counting A-D converter with a behavioural ladder and
// comparator (LSB = 625 mV). For random inputs, and for 0 V and inputs above
// full scale, it resets the counter, opens a 40-clk window and expects the
// smallest count whose ladder voltage reaches the input (15 at most), reached
// after two clk per count, and then held after the window closes.
module tb_ad_converter;
  logic clk = 0, rst_n = 0, clk_rate = 0, enable = 0, reset = 0;
  logic cmp;
  logic [3:0] count;
  int vin_mv = 0;
  int checks = 0, failures = 0, stops = 0, saturations = 0;

  ad_converter dut (.*);
  ladder_comparator_model #(.LSB_MV(625)) u_analog (.sw(count), .vin_mv(vin_mv), .cmp(cmp));

  always #5 clk = ~clk;
  always @(posedge clk) clk_rate <= ~clk_rate;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s vin=%0d count=%0d", what, vin_mv, count); end
  endtask

  initial begin
    int expect_code, done_at;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      case (n)
        0: vin_mv = 0;
        1: vin_mv = 12000;
        2: vin_mv = 9375;
        3: vin_mv = 9376;
        default: vin_mv = $urandom_range(0, 11000);
      endcase
      expect_code = (vin_mv + 624) / 625;
      if (expect_code > 15) expect_code = 15;
      @(negedge clk); reset = 1;
      repeat (4) @(negedge clk);
      reset = 0;
      check(count == 0, "counter reset");
      enable = 1;
      done_at = -1;
      for (int c = 0; c < 40; c++) begin
        @(negedge clk);
        if (done_at < 0 && int'(count) == expect_code) done_at = c + 1;
      end
      enable = 0;
      check(int'(count) == expect_code, "conversion result");
      check(done_at >= 0 && done_at <= 2 * expect_code + 2, "two clk per count");
      if (expect_code == 15 && vin_mv > 15 * 625) saturations++; else stops++;
      repeat (10) @(negedge clk);
      check(int'(count) == expect_code, "result held");
    end
    check(stops > 0 && saturations > 0, "comparator stop and full scale both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
