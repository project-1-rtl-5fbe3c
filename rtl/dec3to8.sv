// dec3to8: 3-to-8 line decoder with enable.
//
// When en is 1, output s[b] is 1 and all other outputs are 0; when en is 0,
// all outputs are 0. Each output is the AND of the enable with the three
// select bits in true or inverted form, as in the gate-level decoder of the
// bit set/clear unit. The same decoder, with en tied high, splits op-code
// bits 7..5 into eight groups for the write-enable logic. Purely
// combinational.
module dec3to8 (
  input  logic [2:0] b,
  input  logic       en,
  output logic [7:0] s
);

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      s[i] = en
           && (b[2] == i[2])
           && (b[1] == i[1])
           && (b[0] == i[0]);
    end
  end

endmodule
