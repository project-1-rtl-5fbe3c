// wimp51: an 8-bit, 8051-subset teaching processor with the added
// accumulator bit instructions CLRB A,#b (C2h) and SETB A,#b (D2h).
//
// Datapath: program memory, instruction register IR, auxiliary register AUX
// (second instruction byte), program counter PC with its next-value unit
// PC_ALU, register file R0..R7 (REG_TOP), accumulator ACC, carry flag CY and
// the ALU. Control: a three-state cycle counter and the write-enable logic.
//
// Each instruction takes three clocks:
//   fetch    IR  <- mem[PC]
//   decode   AUX <- mem[PC+1], PC <- PC+1
//   execute  ACC / Rn / CY written; PC <- PC+1 for two-byte data
//            instructions, PC <- PC+1+rel for SJMP
// Program memory is addressed with PC_ALU's output (the value PC is about to
// take), which is what makes the decode-cycle read return the second byte.
// Instructions executed: MOV A,#dd (74), ADDC A,Rn (38-3F), MOV Rn,A (F8-FF),
// SWAP A (C4), SJMP rel (80), CLRB A,#b (C2), SETB A,#b (D2); every other
// op-code is a one-byte no-operation. The register arrangement, cycle
// pattern and the C2/D2 changes follow the design; memory addressing, the
// carry flag and the treatment of other op-codes are this design's choices.
//
// Interface: clk, rst_n (synchronous, active low; PC, ACC, registers and
// flags clear and the cycle counter starts at fetch). The outputs expose the
// architectural state and the write enables for observation.
module wimp51
  import wimp51_pkg::*;
#(
  parameter string INIT_FILE = "rtl/prog_clrb.hex"
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [7:0]      pc,
  output logic [7:0]      ir,
  output logic [7:0]      aux,
  output logic [7:0]      acc,
  output logic            cy,
  output logic [7:0][7:0] regs,
  output cycle_e          cyc,
  output logic            ir_we,
  output logic            aux_we,
  output logic            pc_we,
  output logic            acc_we,
  output logic            reg_we,
  output pc_sel_e         pc_sel
);

  logic       q1, q0, fetch, decode, execute;
  logic       cy_we;
  logic [7:0] pc_next;
  logic [7:0] mem_data;
  logic [7:0] rn;
  logic [7:0] alu_result;
  logic       alu_cy;

  cycle_counter u_cyc (
    .clk     (clk),
    .rst_n   (rst_n),
    .cyc     (cyc),
    .q1      (q1),
    .q0      (q0),
    .fetch   (fetch),
    .decode  (decode),
    .execute (execute)
  );

  we_logic u_we (
    .fetch   (fetch),
    .decode  (decode),
    .execute (execute),
    .ir      (ir),
    .ir_we   (ir_we),
    .aux_we  (aux_we),
    .pc_we   (pc_we),
    .acc_we  (acc_we),
    .reg_we  (reg_we),
    .cy_we   (cy_we)
  );

  pc_alu u_pc_alu (
    .q1      (q1),
    .q0      (q0),
    .ir      (ir),
    .pc      (pc),
    .aux     (aux),
    .sel     (pc_sel),
    .pc_next (pc_next)
  );

  prog_rom #(.AW(8), .INIT_FILE(INIT_FILE)) u_rom (
    .addr (pc_next),
    .data (mem_data)
  );

  we_reg #(.W(8)) u_pc  (.clk(clk), .rst_n(rst_n), .we(pc_we),  .d(pc_next),    .q(pc));
  we_reg #(.W(8)) u_ir  (.clk(clk), .rst_n(rst_n), .we(ir_we),  .d(mem_data),   .q(ir));
  we_reg #(.W(8)) u_aux (.clk(clk), .rst_n(rst_n), .we(aux_we), .d(mem_data),   .q(aux));
  we_reg #(.W(8)) u_acc (.clk(clk), .rst_n(rst_n), .we(acc_we), .d(alu_result), .q(acc));
  we_reg #(.W(1)) u_cy  (.clk(clk), .rst_n(rst_n), .we(cy_we),  .d(alu_cy),     .q(cy));

  reg_top u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (reg_we),
    .waddr (ir[2:0]),
    .wdata (acc),
    .raddr (ir[2:0]),
    .rdata (rn),
    .regs  (regs)
  );

  alu u_alu (
    .ir     (ir),
    .acc    (acc),
    .aux    (aux),
    .rn     (rn),
    .cy_in  (cy),
    .result (alu_result),
    .cy_out (alu_cy)
  );

endmodule
