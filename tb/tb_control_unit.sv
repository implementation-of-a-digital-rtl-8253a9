// End-to-end testbench of the control unit at its default size. The
// analogue side is closed with behavioural models of the thermistor bus and
// of the ladder and comparator. Over two full divider periods (4096 clk, 64
// telemetry frames) it checks:
//   - the code output against the double-folded Barker sequence;
//   - the three command outputs against the divider state;
//   - every telemetry word, read back from the serial line: slot 0 the A-D
//     result of the previous frame's channel, slots 1-3 the digital inputs
//     as they were when each buffer strobe came, slots 4-7 the direct inputs;
//   - the channel switches and the frame supply.
// It counts how often each mechanism happened (transient reset state of the
// code counters, comparator stop, full-scale clamp, buffer load, code period,
// each command, each channel) and counts a
// failure for any that never did.
module tb_control_unit;
  import cu_pkg::*;

  logic clk = 0, rst_n = 0;
  word_t [N_BUF-1:0]    buf_in = '0;
  word_t [N_DIRECT-1:0] direct_in = '0;
  logic adc_cmp;
  logic [3:0] ladder_sw, t_an;
  logic f_supply, code, code_n, tm_out, tm_load;
  logic [2:0] cmd, tm_slot;
  logic [10:0] div_q;

  int ch_mv [4] = '{0, 0, 0, 0};
  int bus_mv;

  control_unit dut (.*);
  thermistor_bus_model u_bus (.t(t_an), .f(f_supply), .ch_mv(ch_mv), .bus_mv(bus_mv));
  ladder_comparator_model #(.LSB_MV(625)) u_lad (.sw(ladder_sw), .vin_mv(bus_mv), .cmp(adc_cmp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_transient = 0, n_stop = 0, n_clamp = 0, n_bufload = 0, n_code_periods = 0, n_words = 0;
  int n_cmd [3] = '{0, 0, 0};
  int n_chan [4] = '{0, 0, 0, 0};
  localparam int BT [3] = '{43, 21, 50};
  localparam logic B [11] = '{1,1,1,0,0,0,1,0,0,1,0};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle q=%0d", what, div_q); end
  endtask

  function automatic int adc_code(input int mv);
    int c = (mv + 624) / 625;
    return c > 15 ? 15 : c;
  endfunction

  initial begin
    word_t buf_seen [3] = '{0, 0, 0};
    word_t pending [$];
    word_t expect_word, got;
    int adc_expect_cur = 0;
    int chips = 0, t;
    logic [2:0] cmd_exp, cmd_next;
    int bitpos = -1;
    cmd_next = '0;

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (t = 0; t < 4096 + 8; t++) begin
      // ---- stimulus, set after the clock edge ----
      foreach (buf_in[j]) buf_in[j] = word_t'($urandom);
      if (div_q[2:0] == 3'd3 && $urandom_range(0, 1) == 0)
        foreach (direct_in[j]) direct_in[j] = word_t'($urandom);
      if (div_q[5:0] == 6'd2) begin
        for (int i = 0; i < 4; i++)
          case ($urandom_range(0, 5))
            0: ch_mv[i] = 0;
            1: ch_mv[i] = 10000 + $urandom_range(0, 2000);    // above full scale
            default: ch_mv[i] = $urandom_range(0, 9300);
          endcase
      end
      #1;
      // ---- code: one chip per two clk, updated at the end of q[0] = 1 cycles
      if (!div_q[0] && t >= 1) begin
        check(code == (B[(chips / 11) % 11] ^ B[chips % 11]), "Barker chip");
        check(code_n == !code, "code complement");
        chips++;
        if (chips % 121 == 0) n_code_periods++;
      end
      // the 11-state counters pass through state 11 while being reset
      if (dut.u_code.fold1_state == 4'd11 || dut.u_code.fold2_state == 4'd11) n_transient++;
      // ---- commands, one clk after the decoded state
      cmd_exp = cmd_next;
      cmd_next[2] = (div_q[10:6] == 5'd0);
      cmd_next[1] = (div_q[7:3] == 5'd3);
      cmd_next[0] = (div_q[5:1] == 5'd0);
      if (t >= 1) check(cmd == cmd_exp, "command outputs");
      for (int i = 0; i < 3; i++) if (cmd[i]) n_cmd[i]++;
      // ---- sequencer
      check(f_supply == (div_q[5:3] >= 3'd1 && div_q[5:3] <= 3'd5), "frame supply");
      for (int i = 0; i < 4; i++) begin
        check(t_an[i] == (f_supply && div_q[7:6] == 2'(i)), "channel switch");
        if (t_an[i] && div_q[5:0] == 6'd20) n_chan[i]++;
      end
      // ---- buffer strobes: loaded one clk after q[5:0] == BT[j]
      for (int j = 0; j < 3; j++)
        if (t >= 1 && div_q[5:0] == 6'(BT[j] + 1)) begin buf_seen[j] = buf_in[j]; n_bufload++; end
      // ---- A-D: the channel voltage is stable over the frame's window
      if (div_q[5:0] == 6'd16) begin
        adc_expect_cur = adc_code(bus_mv);
        if (bus_mv > 15 * 625) n_clamp++; else n_stop++;
      end
      if (div_q[5:0] == 6'd60) check(int'(ladder_sw) == adc_expect_cur, "A-D conversion result");
      // ---- telemetry: expected word at each load
      if (tm_load) begin
        check(tm_slot == div_q[5:3], "slot number");
        case (tm_slot)
          3'd0: expect_word = word_t'(adc_expect_cur);   // previous frame's conversion
          3'd1, 3'd2, 3'd3: expect_word = buf_seen[tm_slot - 1];
          default: expect_word = direct_in[tm_slot - 4];
        endcase
        pending.push_back(expect_word);
        bitpos = 0;
      end
      // ---- serial line: bit b of the word is on tm_out at offsets 1, 3, 5, 7
      if (div_q[2:0] inside {3'd1, 3'd3, 3'd5, 3'd7} && t >= 1 && pending.size() > 0) begin
        got[3 - div_q[2:1]] = tm_out;
        if (div_q[2:0] == 3'd7) begin
          expect_word = pending.pop_front();
          check(got == expect_word, "telemetry word");
          if (got != expect_word) $display("  slot %0d got %h expected %h", div_q[5:3], got, expect_word);
          n_words++;
        end
      end
      @(posedge clk);
      #1;
    end
    $display("transients=%0d words=%0d code_periods=%0d adc_stops=%0d adc_clamps=%0d buffer_loads=%0d cmd=%0d/%0d/%0d chan=%0d/%0d/%0d/%0d",
             n_transient, n_words, n_code_periods, n_stop, n_clamp, n_bufload, n_cmd[0], n_cmd[1], n_cmd[2],
             n_chan[0], n_chan[1], n_chan[2], n_chan[3]);
    check(n_words >= 512, "all telemetry words of two divider periods");
    check(n_code_periods >= 16, "code periods");
    check(n_transient > 0, "counter reset through the transient state");
    check(n_stop > 0, "A-D stopped by the comparator");
    check(n_clamp > 0, "A-D clamped at full scale");
    check(n_bufload > 0, "buffer loads");
    for (int i = 0; i < 3; i++) check(n_cmd[i] > 0, "every command issued");
    for (int i = 0; i < 4; i++) check(n_chan[i] > 0, "every analogue channel measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
