// tb_log_setba_clrba: applies all 256 op-codes; the output must be 1 for
// C2h and D2h only.
module tb_log_setba_clrba;
  logic [7:0] ir;
  logic       y;
  int checks = 0, failures = 0;

  log_setba_clrba dut (.ir(ir), .log_bit_a(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      ir = 8'(i);
      #1;
      checks++;
      if (y !== (i == 'hC2 || i == 'hD2)) begin
        failures++;
        $display("FAIL ir=%h log_bit_a=%b", ir, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
