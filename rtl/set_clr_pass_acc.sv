// set_clr_pass_acc: sets, clears or passes one accumulator bit.
//
// Made of an enable term, a 3-to-8 decoder and eight one-bit 2-to-1 muxes.
// The enable is 1 for op-codes C2h/D2h (IR7 & IR6 & !IR5 & !IR3 & !IR2 & IR1
// & !IR0). While enabled, the decoder drives the select of the one mux chosen
// by bit_sel (AUX bits 2..0, the second byte of the instruction); that mux
// outputs IR4, which is 0 for CLRB and 1 for SETB. Every other mux, and all
// of them while disabled, passes its accumulator bit unchanged.
// Purely combinational: acc_out = acc with bit bit_sel replaced by ir[4].
module set_clr_pass_acc (
  input  logic [7:0] acc,
  input  logic [7:0] ir,
  input  logic [2:0] bit_sel,
  output logic [7:0] acc_out
);

  logic       enable;
  logic [7:0] s;

  assign enable = ir[7] & ir[6] & ~ir[5] & ~ir[3] & ~ir[2] & ir[1] & ~ir[0];

  dec3to8 u_dec (
    .b  (bit_sel),
    .en (enable),
    .s  (s)
  );

  for (genvar i = 0; i < 8; i++) begin : g_bit
    mux2 #(.W(1)) u_mux (
      .a  (acc[i]),
      .b  (ir[4]),
      .s0 (s[i]),
      .z  (acc_out[i])
    );
  end

endmodule
