// tb_mux2: checks the 2-to-1 multiplexer at its default width (1 bit,
// exhaustively) and at 8 bits (random operands, both selects).
module tb_mux2;
  logic       a1, b1, s1, z1;
  logic [7:0] a8, b8, z8;
  logic       s8;
  int checks = 0, failures = 0;

  mux2 dut1 (.a(a1), .b(b1), .s0(s1), .z(z1));
  mux2 #(.W(8)) dut8 (.a(a8), .b(b8), .s0(s8), .z(z8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a1, b1, s1} = 3'(i);
      #1;
      checks++;
      if (z1 !== (s1 ? b1 : a1)) begin
        failures++;
        $display("FAIL a=%b b=%b s0=%b z=%b", a1, b1, s1, z1);
      end
    end
    for (int i = 0; i < 200; i++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      s8 = i[0];
      #1;
      checks++;
      if (z8 !== (s8 ? b8 : a8)) begin
        failures++;
        $display("FAIL a=%h b=%h s0=%b z=%h", a8, b8, s8, z8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
