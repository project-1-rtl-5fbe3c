// tb_reg_top: random writes and reads of R0..R7 against an array model;
// checks the combinational read port and the observation outputs.
module tb_reg_top;
  logic            clk = 0, rst_n = 0;
  logic            we;
  logic [2:0]      waddr, raddr;
  logic [7:0]      wdata, rdata;
  logic [7:0][7:0] regs;
  logic [7:0]      model [8];
  int checks = 0, failures = 0;

  reg_top dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
               .raddr(raddr), .rdata(rdata), .regs(regs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) model[i] = 8'h00;
    for (int i = 0; i < 800; i++) begin
      we = 1'($urandom); waddr = 3'($urandom); wdata = 8'($urandom);
      @(negedge clk);
      if (we) model[waddr] = wdata;
      raddr = 3'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr] || regs[waddr] !== model[waddr]) begin
        failures++;
        $display("FAIL i=%0d raddr=%0d rdata=%h expected %h", i, raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
