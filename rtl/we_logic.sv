// we_logic: write-enable logic of the WIMP51 registers.
//
// Combinational decode of the machine cycle and the op-code in IR:
//   IR_WE  = fetch
//   AUX_WE = decode & (!(IR7..5 = 110) | op is C2h/D2h)
//   PC_WE  = decode | execute & (op is 74h, 80h, C2h or D2h)
//   ACC_WE = execute & (op is 74h, 38h..3Fh, C4h, C2h or D2h)
//   REG_WE = execute & (op is F8h..FFh, MOV Rn,A)
//   CY_WE  = execute & (op is 38h..3Fh, ADDC A,Rn)
// The AUX_WE form, and adding C2h/D2h to AUX_WE, PC_WE and ACC_WE, follow
// the design. The instruction lists of PC_WE, ACC_WE and REG_WE cover the
// instructions this core executes; CY_WE (carry flag for ADDC) is this
// design's addition. Any other op-code writes nothing and acts as a
// one-byte no-operation.
module we_logic
  import wimp51_pkg::*;
(
  input  logic       fetch,
  input  logic       decode,
  input  logic       execute,
  input  logic [7:0] ir,
  output logic       ir_we,
  output logic       aux_we,
  output logic       pc_we,
  output logic       acc_we,
  output logic       reg_we,
  output logic       cy_we
);

  logic [7:0] grp;     // op-code group, one-hot on IR7..5
  logic       is_bit;  // C2h or D2h
  logic       is_mov_imm, is_sjmp, is_swap, is_addc, is_mov_rn;

  dec3to8 u_grp (
    .b  (ir[7:5]),
    .en (1'b1),
    .s  (grp)
  );

  assign is_bit     = grp[6] & ~ir[3] & ~ir[2] & ir[1] & ~ir[0];
  assign is_mov_imm = (ir == OP_MOV_A_IMM);
  assign is_sjmp    = (ir == OP_SJMP);
  assign is_swap    = (ir == OP_SWAP_A);
  assign is_addc    = (ir[7:3] == OP_ADDC_A_RN);
  assign is_mov_rn  = (ir[7:3] == OP_MOV_RN_A);

  assign ir_we  = fetch;
  assign aux_we = decode & (~grp[6] | is_bit);
  assign pc_we  = decode | (execute & (is_mov_imm | is_sjmp | is_bit));
  assign acc_we = execute & (is_mov_imm | is_addc | is_swap | is_bit);
  assign reg_we = execute & is_mov_rn;
  assign cy_we  = execute & is_addc;

endmodule
