// tb_cycle_counter: checks reset to fetch, the fetch -> decode -> execute
// order with a period of exactly three clocks, the one-hot decodes and the
// Q1/Q0 bits, and a reset in the middle of an instruction.
module tb_cycle_counter;
  import wimp51_pkg::*;
  logic   clk = 0, rst_n = 0;
  cycle_e cyc;
  logic   q1, q0, fetch, decode, execute;
  int checks = 0, failures = 0;

  cycle_counter dut (.clk(clk), .rst_n(rst_n), .cyc(cyc), .q1(q1), .q0(q0),
                     .fetch(fetch), .decode(decode), .execute(execute));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cyc(input int c);
    checks++;
    if ({q1, q0} !== 2'(c) || fetch !== (c == 0) || decode !== (c == 1) || execute !== (c == 2)) begin
      failures++;
      $display("FAIL q1q0=%b%b f/d/e=%b%b%b expected cycle %0d", q1, q0, fetch, decode, execute, c);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    expect_cyc(0);
    rst_n = 1;
    for (int i = 1; i <= 30; i++) begin
      @(negedge clk);
      expect_cyc(i % 3);
    end
    // now in cycle 0 (30 % 3); step into decode, then reset
    @(negedge clk);
    expect_cyc(1);
    rst_n = 0;
    @(negedge clk);
    expect_cyc(0);
    rst_n = 1;
    @(negedge clk);
    expect_cyc(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
