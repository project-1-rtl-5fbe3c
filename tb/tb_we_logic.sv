// tb_we_logic: applies all 256 op-codes in each of the three machine cycles
// and compares the six write enables with a reference decode written
// independently in the testbench.
module tb_we_logic;
  logic       fetch, decode, execute;
  logic [7:0] ir;
  logic       ir_we, aux_we, pc_we, acc_we, reg_we, cy_we;
  int checks = 0, failures = 0;

  we_logic dut (.fetch(fetch), .decode(decode), .execute(execute), .ir(ir),
                .ir_we(ir_we), .aux_we(aux_we), .pc_we(pc_we), .acc_we(acc_we),
                .reg_we(reg_we), .cy_we(cy_we));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++) begin
      for (int i = 0; i < 256; i++) begin
        logic bitop, two_byte, e_ir, e_aux, e_pc, e_acc, e_reg, e_cy;
        fetch = (c == 0); decode = (c == 1); execute = (c == 2);
        ir = 8'(i);
        bitop    = (i == 'hC2 || i == 'hD2);
        two_byte = (i == 'h74 || i == 'h80 || bitop);
        e_ir  = (c == 0);
        e_aux = (c == 1) && ((i / 32) != 6 || bitop);
        e_pc  = (c == 1) || ((c == 2) && two_byte);
        e_acc = (c == 2) && (i == 'h74 || (i >= 'h38 && i <= 'h3F) || i == 'hC4 || bitop);
        e_reg = (c == 2) && (i >= 'hF8);
        e_cy  = (c == 2) && (i >= 'h38 && i <= 'h3F);
        #1;
        checks++;
        if ({ir_we, aux_we, pc_we, acc_we, reg_we, cy_we} !==
            {e_ir, e_aux, e_pc, e_acc, e_reg, e_cy}) begin
          failures++;
          $display("FAIL cyc=%0d ir=%h got %b%b%b%b%b%b expected %b%b%b%b%b%b", c, ir,
                   ir_we, aux_we, pc_we, acc_we, reg_we, cy_we,
                   e_ir, e_aux, e_pc, e_acc, e_reg, e_cy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
