// we_reg: W-bit register with write enable and synchronous reset.
//
// q takes d on the rising clock edge when we is 1, and RESET_VALUE when
// rst_n is 0 (reset wins). Used for IR, AUX, PC, ACC and the carry flag.
// The reset value (default 0) is this design's choice.
module we_reg #(
  parameter int unsigned   W           = 8,
  parameter logic [W-1:0]  RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
