// mux2: 2-to-1 multiplexer, W bits wide.
//
// z = a when s0 is 0, z = b when s0 is 1, written as the sum of products
// Z = A & !S0 | B & S0 of the design's one-bit "SET PASS" mux, applied to
// every bit. Width W is a parameter (default 1, the one-bit cell);
// the ALU uses an 8-bit instance to choose between the original ALU result
// and the bit set/clear result. Purely combinational.
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         s0,
  output logic [W-1:0] z
);

  assign z = (a & {W{!s0}}) | (b & {W{s0}});

endmodule
