// tb_wimp51: end-to-end test of the processor with three programs run side
// by side on three instances:
//   0  CLRB A test  (default program image): ACC = FF, then bits 0..7
//      cleared one by one down to 00, then SJMP to itself
//   1  SETB A test: ACC = 00, then bits 0..7 set one by one up to FF
//   2  mixed test: MOV A,#01; MOV R0,A; ADDC A,R0; SETB A,#3; MOV R1,A;
//      SWAP A; CLRB A,#5; MOV R2,A; SJMP to itself
// At every instruction boundary (every third clock after reset) ACC and PC
// are compared with the expected values from the program listings, so the
// three-clock instruction time is checked too. Afterwards R0..R2 and the
// carry are checked. Each mechanism of the design is counted and must occur:
// every instruction type, AUX loading the bit number for C2/D2, the extra
// PC increment in execute, and the taken relative branch.
module tb_wimp51;
  import wimp51_pkg::*;

  logic clk = 0, rst_n = 0;

  logic [7:0]      pc [3], ir [3], aux [3], acc [3];
  logic            cy [3];
  logic [7:0][7:0] regs [3];
  cycle_e          cyc [3];
  logic            ir_we [3], aux_we [3], pc_we [3], acc_we [3], reg_we [3];
  pc_sel_e         pc_sel [3];

  wimp51 u_clrb (
    .clk(clk), .rst_n(rst_n), .pc(pc[0]), .ir(ir[0]), .aux(aux[0]), .acc(acc[0]),
    .cy(cy[0]), .regs(regs[0]), .cyc(cyc[0]), .ir_we(ir_we[0]), .aux_we(aux_we[0]),
    .pc_we(pc_we[0]), .acc_we(acc_we[0]), .reg_we(reg_we[0]), .pc_sel(pc_sel[0]));
  wimp51 #(.INIT_FILE("tb/prog_setb.hex")) u_setb (
    .clk(clk), .rst_n(rst_n), .pc(pc[1]), .ir(ir[1]), .aux(aux[1]), .acc(acc[1]),
    .cy(cy[1]), .regs(regs[1]), .cyc(cyc[1]), .ir_we(ir_we[1]), .aux_we(aux_we[1]),
    .pc_we(pc_we[1]), .acc_we(acc_we[1]), .reg_we(reg_we[1]), .pc_sel(pc_sel[1]));
  wimp51 #(.INIT_FILE("tb/prog_mixed.hex")) u_mixed (
    .clk(clk), .rst_n(rst_n), .pc(pc[2]), .ir(ir[2]), .aux(aux[2]), .acc(acc[2]),
    .cy(cy[2]), .regs(regs[2]), .cyc(cyc[2]), .ir_we(ir_we[2]), .aux_we(aux_we[2]),
    .pc_we(pc_we[2]), .acc_we(acc_we[2]), .reg_we(reg_we[2]), .pc_sel(pc_sel[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Mechanism counters
  int n_mov_imm = 0, n_clrb = 0, n_setb = 0, n_mov_rn = 0, n_addc = 0, n_swap = 0;
  int n_sjmp_taken = 0, n_aux_bitnum = 0, n_exec_inc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        if (cyc[i] == CYC_EXECUTE) begin
          if (ir[i] == 8'h74) n_mov_imm++;
          if (ir[i] == 8'hC2) n_clrb++;
          if (ir[i] == 8'hD2) n_setb++;
          if (ir[i][7:3] == 5'b11111 && reg_we[i]) n_mov_rn++;
          if (ir[i][7:3] == 5'b00111) n_addc++;
          if (ir[i] == 8'hC4) n_swap++;
          if (pc_sel[i] == PC_BRANCH && pc_we[i]) n_sjmp_taken++;
          if (pc_sel[i] == PC_INC && pc_we[i]) n_exec_inc++;
        end
        if (cyc[i] == CYC_DECODE && aux_we[i] && (ir[i] == 8'hC2 || ir[i] == 8'hD2))
          n_aux_bitnum++;
      end
    end
  end

  // Expected ACC and PC after each instruction (listing order)
  logic [7:0] exp_acc [3][10];
  logic [7:0] exp_pc  [3][10];
  int         n_instr [3];
  logic [7:0] loop_pc [3];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // CLRB program
    exp_acc[0][0] = 8'hFF; exp_pc[0][0] = 8'h02;
    for (int k = 1; k <= 8; k++) begin
      exp_acc[0][k] = 8'hFF << k;
      exp_pc[0][k]  = 8'(2 + 2*k);
    end
    exp_acc[0][9] = 8'h00; exp_pc[0][9] = 8'h12;
    n_instr[0] = 10; loop_pc[0] = 8'h12;
    // SETB program
    exp_acc[1][0] = 8'h00; exp_pc[1][0] = 8'h02;
    for (int k = 1; k <= 8; k++) begin
      exp_acc[1][k] = 8'((32'h1 << k) - 32'h1);
      exp_pc[1][k]  = 8'(2 + 2*k);
    end
    exp_acc[1][9] = 8'hFF; exp_pc[1][9] = 8'h12;
    n_instr[1] = 10; loop_pc[1] = 8'h12;
    // Mixed program
    exp_acc[2] = '{8'h01, 8'h01, 8'h02, 8'h0A, 8'h0A, 8'hA0, 8'h80, 8'h80, 8'h80, 8'h80};
    exp_pc[2]  = '{8'h02, 8'h03, 8'h04, 8'h06, 8'h07, 8'h08, 8'h0A, 8'h0B, 8'h0B, 8'h0B};
    n_instr[2] = 9; loop_pc[2] = 8'h0B;

    @(negedge clk); @(negedge clk);
    for (int i = 0; i < 3; i++)
      chk(pc[i] == 0 && acc[i] == 0 && cyc[i] == CYC_FETCH, $sformatf("reset state, program %0d", i));
    rst_n = 1;

    // 12 instruction times: all programs reach their SJMP loop and iterate
    for (int k = 0; k < 12; k++) begin
      repeat (3) @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        logic [7:0] ea, ep;
        ea = (k < n_instr[i]) ? exp_acc[i][k] : exp_acc[i][n_instr[i]-1];
        ep = (k < n_instr[i]) ? exp_pc[i][k]  : loop_pc[i];
        chk(cyc[i] == CYC_FETCH && acc[i] == ea && pc[i] == ep,
            $sformatf("program %0d after instruction %0d: cyc=%0d ACC=%h PC=%h expected ACC=%h PC=%h",
                      i, k + 1, cyc[i], acc[i], pc[i], ea, ep));
      end
    end

    // Registers written by the mixed program; carry stays clear
    chk(regs[2][0] == 8'h01, $sformatf("R0=%h expected 01", regs[2][0]));
    chk(regs[2][1] == 8'h0A, $sformatf("R1=%h expected 0A", regs[2][1]));
    chk(regs[2][2] == 8'h80, $sformatf("R2=%h expected 80", regs[2][2]));
    chk(cy[2] == 1'b0, "carry after ADDC 01+01 must be 0");

    // Every mechanism must have occurred
    chk(n_mov_imm    > 0, "MOV A,#dd never executed");
    chk(n_clrb       > 0, "CLRB A never executed");
    chk(n_setb       > 0, "SETB A never executed");
    chk(n_mov_rn     > 0, "MOV Rn,A never executed");
    chk(n_addc       > 0, "ADDC A,Rn never executed");
    chk(n_swap       > 0, "SWAP A never executed");
    chk(n_sjmp_taken > 0, "SJMP never taken");
    chk(n_aux_bitnum > 0, "AUX never loaded a bit number");
    chk(n_exec_inc   > 0, "PC never incremented in execute");
    chk(n_clrb == 9 && n_setb == 9, $sformatf("CLRB/SETB counts %0d/%0d expected 9/9", n_clrb, n_setb));
    $display("mechanisms: MOV_A_IMM=%0d CLRB=%0d SETB=%0d MOV_RN_A=%0d ADDC=%0d SWAP=%0d SJMP=%0d AUX_BITNUM=%0d EXEC_INC=%0d",
             n_mov_imm, n_clrb, n_setb, n_mov_rn, n_addc, n_swap, n_sjmp_taken, n_aux_bitnum, n_exec_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
