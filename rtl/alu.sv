// alu: the WIMP51 arithmetic-logic unit, extended with bit set/clear.
//
// The original part chooses one of four results with a two-bit select
// (L1:L0) decoded from op-code bits 7..4:
//   7x  MOV A,#dd   -> aux (the immediate byte)
//   3x  ADDC A,Rn   -> acc + rn + cy_in, carry out on cy_out
//   Cx  SWAP A      -> acc with its nibbles exchanged
//   other           -> acc unchanged
// The added part is the bit set/clear unit (set_clr_pass_acc), fed by the
// accumulator, the op-code and AUX bits 2..0, and an 8-bit 2-to-1 mux steered
// by log_setba_clrba that replaces the original result for C2h/D2h. The mux
// is needed because C2h falls in the Cx group and would otherwise swap.
// Only the instructions exercised by the design's test programs are decoded;
// the group encoding of L1:L0 is this design's own choice.
// Purely combinational.
module alu (
  input  logic [7:0] ir,
  input  logic [7:0] acc,
  input  logic [7:0] aux,
  input  logic [7:0] rn,
  input  logic       cy_in,
  output logic [7:0] result,
  output logic       cy_out
);

  logic [1:0] l_sel;
  logic [7:0] old_result;
  logic [8:0] sum;
  logic [7:0] bit_result;
  logic       log_bit_a;

  // A_SEL: op-code high nibble to result select
  always_comb begin
    unique case (ir[7:4])
      4'h7:    l_sel = 2'd1;
      4'h3:    l_sel = 2'd2;
      4'hC:    l_sel = 2'd3;
      default: l_sel = 2'd0;
    endcase
  end

  assign sum = {1'b0, acc} + {1'b0, rn} + {8'd0, cy_in};

  always_comb begin
    unique case (l_sel)
      2'd1:    old_result = aux;
      2'd2:    old_result = sum[7:0];
      2'd3:    old_result = {acc[3:0], acc[7:4]};
      default: old_result = acc;
    endcase
  end

  assign cy_out = sum[8];

  set_clr_pass_acc u_scp (
    .acc     (acc),
    .ir      (ir),
    .bit_sel (aux[2:0]),
    .acc_out (bit_result)
  );

  log_setba_clrba u_log (
    .ir        (ir),
    .log_bit_a (log_bit_a)
  );

  mux2 #(.W(8)) u_out_mux (
    .a  (old_result),
    .b  (bit_result),
    .s0 (log_bit_a),
    .z  (result)
  );

endmodule
