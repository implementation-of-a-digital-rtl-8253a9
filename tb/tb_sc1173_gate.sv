// Testbench of the SC1173 three-input parallel gate: the printed P-channel
// parallel truth table (output at 0 V only when A, B and C are all
// at the positive level),
// checked for all eight input rows in both signal directions. Levels are
// written 1 for the positive level and 0 for 0 V; in positive direction a
// logic value is its level, in negative direction its complement.
module tb_sc1173_gate;
  logic [2:0] lvl;                     // input levels {A, B, C}
  logic a_p, b_p, c_p, y_p;            // positive direction
  logic a_n, b_n, c_n, y_n;            // negative direction
  int checks = 0, failures = 0;
  // output level for rows ABC = 000, 001, ..., 111
  localparam logic OUT_LEVEL [8] = '{1,1,1,1,1,1,1,0};

  sc1173_gate #(.DIR(cu_pkg::DIR_POSITIVE)) dut_p (.a(a_p), .b(b_p), .c(c_p), .y(y_p));
  sc1173_gate #(.DIR(cu_pkg::DIR_NEGATIVE)) dut_n (.a(a_n), .b(b_n), .c(c_n), .y(y_n));

  assign {a_p, b_p, c_p} = lvl;
  assign {a_n, b_n, c_n} = ~lvl;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      lvl = 3'(r);
      #1;
      checks += 2;
      if (y_p !== OUT_LEVEL[r]) begin
        failures++; $display("FAIL positive row %03b gives %b", lvl, y_p);
      end
      if (y_n !== !OUT_LEVEL[r]) begin
        failures++; $display("FAIL negative row %03b gives %b", lvl, y_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
