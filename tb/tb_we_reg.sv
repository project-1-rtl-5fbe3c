// tb_we_reg: random write-enable and data sequence against a model;
// also checks reset to the reset value, at 8 bits and at 1 bit.
module tb_we_reg;
  logic       clk = 0, rst_n = 0;
  logic       we;
  logic [7:0] d, q;
  logic       d1, q1;
  logic [7:0] model;
  logic       model1;
  int checks = 0, failures = 0;

  we_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));
  we_reg #(.W(1)) dut1 (.clk(clk), .rst_n(rst_n), .we(we), .d(d1), .q(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; d = 8'hA5; d1 = 1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (q !== 8'h00 || q1 !== 1'b0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    model = 8'h00; model1 = 1'b0;
    for (int i = 0; i < 500; i++) begin
      we = 1'($urandom); d = 8'($urandom); d1 = 1'($urandom);
      @(negedge clk);
      if (we) begin model = d; model1 = d1; end
      checks++;
      if (q !== model || q1 !== model1) begin
        failures++;
        $display("FAIL i=%0d we=%b q=%h expected %h", i, we, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
