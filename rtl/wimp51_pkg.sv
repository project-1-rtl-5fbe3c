// wimp51_pkg: types and constants shared by the WIMP51 blocks.
//
// The processor runs every instruction in three machine cycles, fetch,
// decode and execute, held in a two-bit state Q1:Q0. The op-codes below are
// the 8051 encodings of the instructions this core executes. CLRB A,#b (C2)
// and SETB A,#b (D2) are the two added bit-manipulation instructions; they
// differ only in op-code bit 4, which gives the value written into the
// chosen accumulator bit. The two-bit state encoding is this design's own
// choice, picked to match the Q1/Q0 terms of the program-counter logic
// (decode = !Q1 & Q0, execute = Q1 & !Q0).
package wimp51_pkg;

  typedef enum logic [1:0] {
    CYC_FETCH   = 2'b00,
    CYC_DECODE  = 2'b01,
    CYC_EXECUTE = 2'b10
  } cycle_e;

  // Op-codes (8051 encoding)
  localparam logic [7:0] OP_MOV_A_IMM = 8'h74;  // MOV A,#dd   (2 bytes)
  localparam logic [7:0] OP_SJMP      = 8'h80;  // SJMP rel    (2 bytes)
  localparam logic [7:0] OP_SWAP_A    = 8'hC4;  // SWAP A      (1 byte)
  localparam logic [7:0] OP_CLRB_A    = 8'hC2;  // CLRB A,#b   (2 bytes)
  localparam logic [7:0] OP_SETB_A    = 8'hD2;  // SETB A,#b   (2 bytes)
  localparam logic [4:0] OP_ADDC_A_RN = 5'b00111; // 38..3F ADDC A,Rn
  localparam logic [4:0] OP_MOV_RN_A  = 5'b11111; // F8..FF MOV Rn,A

  // Next-PC selection produced by the PC_ALU priority encoder
  typedef enum logic [1:0] {
    PC_HOLD   = 2'd0,  // keep PC
    PC_INC    = 2'd1,  // PC + 1
    PC_BRANCH = 2'd2   // PC + 1 + rel (rel held in AUX)
  } pc_sel_e;

endpackage
