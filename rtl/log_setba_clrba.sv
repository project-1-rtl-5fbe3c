// log_setba_clrba: recognises the two bit-manipulation op-codes.
//
// log_bit_a is 1 for CLRB A (C2h = 1100_0010) and SETB A (D2h = 1101_0010):
//   LOG_BIT_A = IR7 & IR6 & !IR5 & !IR3 & !IR2 & IR1 & !IR0
// Bit 4 is left out because it is the only bit in which the two op-codes
// differ. The ALU uses this signal to pass the result of the bit set/clear
// unit instead of its original result. Purely combinational.
module log_setba_clrba (
  input  logic [7:0] ir,
  output logic       log_bit_a
);

  assign log_bit_a = ir[7] & ir[6] & ~ir[5] & ~ir[3] & ~ir[2] & ir[1] & ~ir[0];

endmodule
