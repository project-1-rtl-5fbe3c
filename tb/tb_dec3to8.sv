// tb_dec3to8: exhaustive check of the 3-to-8 decoder with enable.
// All 16 input combinations are applied; the expected output is a one-hot
// code 1 << b when enabled and zero when disabled.
module tb_dec3to8;
  logic [2:0] b;
  logic       en;
  logic [7:0] s;
  int checks = 0, failures = 0;

  dec3to8 dut (.b(b), .en(en), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 8; i++) begin
        logic [7:0] exp;
        b  = 3'(i);
        en = e[0];
        #1;
        exp = e[0] ? (8'd1 << i) : 8'd0;
        checks++;
        if (s !== exp) begin
          failures++;
          $display("FAIL en=%0d b=%0d s=%b expected %b", en, b, s, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
