// tb_prog_rom: reads the whole default image (the CLRB A test program) and
// compares it with the program listing: 74 FF, then C2 n for n = 0..7,
// then 80 FE; all further locations read 00.
module tb_prog_rom;
  logic [7:0] addr, data;
  logic [7:0] exp [256];
  int checks = 0, failures = 0;

  prog_rom dut (.addr(addr), .data(data));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) exp[i] = 8'h00;
    exp[0] = 8'h74; exp[1] = 8'hFF;
    for (int n = 0; n < 8; n++) begin
      exp[2 + 2*n] = 8'hC2;
      exp[3 + 2*n] = 8'(n);
    end
    exp[18] = 8'h80; exp[19] = 8'hFE;
    #1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (data !== exp[i]) begin
        failures++;
        $display("FAIL addr=%h data=%h expected %h", addr, data, exp[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
