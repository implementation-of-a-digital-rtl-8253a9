// Testbench of the Barker code matrix: all 16 counter states against the
// code 1 1 1 0 0 0 1 0 0 1 0 written out chip by chip.
module tb_barker_matrix;
  logic [3:0] state;
  logic bc;
  int checks = 0, failures = 0;
  // chips 0..10, then the transient state 11 decodes like state 0, the rest 0
  localparam logic EXPECT [16] = '{1,1,1,0,0,0,1,0,0,1,0, 1, 0,0,0,0};

  barker_matrix dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      state = 4'(s);
      #1;
      checks++;
      if (bc !== EXPECT[s]) begin failures++; $display("FAIL state %0d gives %b", s, bc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
