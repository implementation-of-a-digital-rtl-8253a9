// Testbench of the word multiplexer: random words, every select value, for
// the default eight words and for a five-word variant (padded tree).
module tb_multiplexer;
  logic [7:0][3:0] w8;
  logic [4:0][3:0] w5;
  logic [2:0] s8, s5;
  logic [3:0] y8, y5;
  int checks = 0, failures = 0;

  multiplexer u8 (.words(w8), .sel(s8), .y(y8));
  multiplexer #(.N_WORDS(5)) u5 (.words(w5), .sel(s5), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      w8 = {$urandom, $urandom} ; w5 = 20'($urandom);
      for (int s = 0; s < 8; s++) begin
        s8 = 3'(s); s5 = 3'(s);
        #1;
        checks += 2;
        if (y8 != w8[s]) begin failures++; $display("FAIL 8-word sel %0d", s); end
        if (y5 != (s < 5 ? w5[s] : 4'h0)) begin failures++; $display("FAIL 5-word sel %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
