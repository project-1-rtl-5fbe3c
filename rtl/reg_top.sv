// reg_top: the eight working registers R0..R7.
//
// One write port and one read port, both addressed by op-code bits 2..0.
// A write (we = 1) takes effect on the rising clock edge; the read is
// combinational (rdata = R[raddr]), so a register written in one execute
// cycle is visible to the next instruction. All eight registers are also
// brought out on regs for observation. Registers clear on reset, which is
// this design's choice.
module reg_top (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [2:0]      waddr,
  input  logic [7:0]      wdata,
  input  logic [2:0]      raddr,
  output logic [7:0]      rdata,
  output logic [7:0][7:0] regs
);

  always_ff @(posedge clk) begin
    if (!rst_n)  regs <= '0;
    else if (we) regs[waddr] <= wdata;
  end

  assign rdata = regs[raddr];

endmodule
