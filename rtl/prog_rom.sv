// prog_rom: program memory, 2**AW bytes, read combinationally.
//
// data = mem[addr] with no clock. The contents come from the hex file named
// by INIT_FILE (one byte per line, $readmemh format); locations the file
// does not cover read as 00h. The default image is the CLRB A test program.
// Size (256 bytes, the reach of the 8-bit PC) and the asynchronous read are
// this design's choices. The image is loaded by $readmemh in an initial
// block, the usual way to preload FPGA block RAM; a synthesis front end that
// ignores $readmemh sees an all-zero memory and folds it to constants.
module prog_rom #(
  parameter int unsigned AW        = 8,
  parameter string       INIT_FILE = "rtl/prog_clrb.hex"
) (
  input  logic [AW-1:0] addr,
  output logic [7:0]    data
);

  logic [7:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;
    $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

endmodule
