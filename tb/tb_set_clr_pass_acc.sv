// tb_set_clr_pass_acc: for every bit position and both CLRB (C2h) and SETB
// (D2h), with random accumulator values, checks that exactly the chosen bit
// becomes 0 or 1; for all other op-codes the accumulator must pass through.
module tb_set_clr_pass_acc;
  logic [7:0] acc, ir, acc_out;
  logic [2:0] bit_sel;
  int checks = 0, failures = 0;

  set_clr_pass_acc dut (.acc(acc), .ir(ir), .bit_sel(bit_sel), .acc_out(acc_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp);
    #1;
    checks++;
    if (acc_out !== exp) begin
      failures++;
      $display("FAIL ir=%h acc=%h bit=%0d out=%h expected %h", ir, acc, bit_sel, acc_out, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int b = 0; b < 8; b++) begin
        acc = 8'($urandom);
        bit_sel = 3'(b);
        ir = 8'hC2;
        check(acc & ~(8'd1 << b));
        ir = 8'hD2;
        check(acc | (8'd1 << b));
      end
    end
    for (int i = 0; i < 256; i++) begin
      if (i == 'hC2 || i == 'hD2) continue;
      ir = 8'(i);
      acc = 8'($urandom);
      bit_sel = 3'($urandom);
      check(acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
