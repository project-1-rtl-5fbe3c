// tb_alu: drives the ALU with random operands for each instruction class
// (MOV A,#dd, ADDC A,Rn, SWAP A, CLRB, SETB, other op-codes) and compares
// the result and the carry with values computed in the testbench.
module tb_alu;
  logic [7:0] ir, acc, aux, rn, result;
  logic       cy_in, cy_out;
  int checks = 0, failures = 0;

  alu dut (.ir(ir), .acc(acc), .aux(aux), .rn(rn), .cy_in(cy_in),
           .result(result), .cy_out(cy_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input logic chk_cy, input logic exp_cy);
    #1;
    checks++;
    if (result !== exp || (chk_cy && cy_out !== exp_cy)) begin
      failures++;
      $display("FAIL ir=%h acc=%h aux=%h rn=%h cy=%b -> %h/%b expected %h/%b",
               ir, acc, aux, rn, cy_in, result, cy_out, exp, exp_cy);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      int unsigned s;
      acc = 8'($urandom); aux = 8'($urandom); rn = 8'($urandom); cy_in = 1'($urandom);
      // MOV A,#dd
      ir = 8'h74; check(aux, 1'b0, 1'b0);
      // ADDC A,Rn
      ir = {5'b00111, 3'($urandom)};
      s = 32'(acc) + 32'(rn) + 32'(cy_in);
      check(8'(s), 1'b1, s[8]);
      // SWAP A
      ir = 8'hC4; check({acc[3:0], acc[7:4]}, 1'b0, 1'b0);
      // CLRB / SETB, bit given by AUX[2:0]
      ir = 8'hC2; check(acc & ~(8'd1 << aux[2:0]), 1'b0, 1'b0);
      ir = 8'hD2; check(acc | (8'd1 << aux[2:0]), 1'b0, 1'b0);
      // MOV Rn,A and SJMP leave the accumulator value unchanged
      ir = {5'b11111, 3'($urandom)}; check(acc, 1'b0, 1'b0);
      ir = 8'h80; check(acc, 1'b0, 1'b0);
    end
    // Document example: ACC=01, R0=01, C=0 -> 02
    acc = 8'h01; rn = 8'h01; cy_in = 1'b0; ir = 8'h38; check(8'h02, 1'b1, 1'b0);
    // Carry out: FF + 01 + 0 -> 00, C=1
    acc = 8'hFF; rn = 8'h01; cy_in = 1'b0; ir = 8'h3B; check(8'h00, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
