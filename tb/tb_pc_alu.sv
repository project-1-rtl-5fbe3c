// tb_pc_alu: for every machine cycle and a set of op-codes, with random PC
// and AUX, checks the selected next-PC source and its value: hold in fetch,
// PC+1 in decode, PC+1 in execute of 74h/C2h/D2h, PC+1+rel for SJMP, hold
// in execute of one-byte instructions.
module tb_pc_alu;
  import wimp51_pkg::*;
  logic       q1, q0;
  logic [7:0] ir, pc, aux, pc_next;
  pc_sel_e    sel;
  int checks = 0, failures = 0;

  pc_alu dut (.q1(q1), .q0(q0), .ir(ir), .pc(pc), .aux(aux), .sel(sel), .pc_next(pc_next));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] OPS [9] = '{8'h74, 8'h80, 8'hC2, 8'hD2, 8'hC4, 8'h38, 8'hFA, 8'h00, 8'hE8};

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int c = 0; c < 3; c++) begin
        for (int k = 0; k < 9; k++) begin
          logic [7:0] exp;
          pc_sel_e    exp_sel;
          {q1, q0} = 2'(c);
          ir  = OPS[k];
          pc  = 8'($urandom);
          aux = 8'($urandom);
          if (c == 1) exp_sel = PC_INC;
          else if (c == 2 && ir == 8'h80) exp_sel = PC_BRANCH;
          else if (c == 2 && (ir == 8'h74 || ir == 8'hC2 || ir == 8'hD2)) exp_sel = PC_INC;
          else exp_sel = PC_HOLD;
          case (exp_sel)
            PC_INC:    exp = pc + 8'd1;
            PC_BRANCH: exp = pc + 8'd1 + aux;
            default:   exp = pc;
          endcase
          #1;
          checks++;
          if (sel !== exp_sel || pc_next !== exp) begin
            failures++;
            $display("FAIL cyc=%0d ir=%h pc=%h aux=%h -> %h (%0d) expected %h (%0d)",
                     c, ir, pc, aux, pc_next, sel, exp, exp_sel);
          end
        end
      end
    end
    // Document example: SJMP at 12h with rel FEh; in execute PC=13h -> 12h
    {q1, q0} = 2'b10; ir = 8'h80; pc = 8'h13; aux = 8'hFE; #1;
    checks++;
    if (pc_next !== 8'h12) begin failures++; $display("FAIL SJMP self-loop: %h", pc_next); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
