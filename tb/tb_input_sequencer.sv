// Testbench of the input sequencer: sweeps the divider state through a whole
// period and checks the A-D reset (slot 1), the conversion window (slots
// 2-5), the frame supply f (slots 1-5), the channel switch of the frame
// (channel = frame number mod 4) and the buffer strobes, one clk after the
// frame times 43, 21 and 50. It also checks that every channel switch closes
// and each buffer strobe fires once per frame.
module tb_input_sequencer;
  logic clk = 0, rst_n = 0;
  logic [10:0] q = '0, q_d;
  logic [3:0] t_an;
  logic f, adc_reset, adc_enable;
  logic [1:0] chan;
  logic [2:0] buf_load;
  int checks = 0, failures = 0;
  int t_seen [4] = '{0, 0, 0, 0};
  int loads [3] = '{0, 0, 0};
  localparam int BT [3] = '{43, 21, 50};

  input_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at q=%0d", what, q); end
  endtask

  initial begin
    int slot, frame, tin;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    q_d = q;
    for (int t = 0; t < 2048; t++) begin
      slot = (t >> 3) & 7;
      frame = t >> 6;
      tin = t & 63;
      check(adc_reset == (slot == 1), "A-D reset in slot 1");
      check(adc_enable == (slot >= 2 && slot <= 5), "conversion window");
      check(f == (slot >= 1 && slot <= 5), "frame supply");
      check(chan == 2'(frame), "channel of the frame");
      for (int i = 0; i < 4; i++) begin
        check(t_an[i] == (f && (frame % 4) == i), "channel switch");
        if (t_an[i]) t_seen[i]++;
      end
      for (int j = 0; j < 3; j++) begin
        check(buf_load[j] == (t > 0 && ((t - 1) & 63) == BT[j]), "buffer strobe time");
        if (buf_load[j]) loads[j]++;
      end
      @(posedge clk);
      #1 q = q + 1;
      #1;
    end
    for (int i = 0; i < 4; i++) check(t_seen[i] == 8 * 40, "each channel measured in 8 frames");
    for (int j = 0; j < 3; j++) check(loads[j] == 32, "one strobe per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
