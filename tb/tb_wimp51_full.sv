// tb_wimp51_full: the processor with all parameters at their defaults (the
// default program image is the CLRB A test). Runs the program to its final
// SJMP loop and checks ACC and PC after every instruction: FF, FE, FC, F8,
// F0, E0, C0, 80, 00 at three clocks per instruction, then PC held at 12h.
module tb_wimp51_full;
  import wimp51_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic [7:0]      pc, ir, aux, acc;
  logic            cy;
  logic [7:0][7:0] regs;
  cycle_e          cyc;
  logic            ir_we, aux_we, pc_we, acc_we, reg_we;
  pc_sel_e         pc_sel;
  int checks = 0, failures = 0;

  wimp51 dut (.clk(clk), .rst_n(rst_n), .pc(pc), .ir(ir), .aux(aux), .acc(acc), .cy(cy),
              .regs(regs), .cyc(cyc), .ir_we(ir_we), .aux_we(aux_we), .pc_we(pc_we),
              .acc_we(acc_we), .reg_we(reg_we), .pc_sel(pc_sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, ep;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 13; k++) begin
      repeat (3) @(negedge clk);
      if (k <= 8) begin
        ea = 8'hFF << k;
        ep = 8'(2 + 2*k);
      end else begin
        ea = 8'h00;
        ep = 8'h12;
      end
      checks++;
      if (cyc != CYC_FETCH || acc !== ea || pc !== ep) begin
        failures++;
        $display("FAIL after instruction %0d: ACC=%h PC=%h expected ACC=%h PC=%h", k + 1, acc, pc, ea, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
