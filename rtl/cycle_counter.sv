// cycle_counter: machine-cycle sequencer of the WIMP51.
//
// Every instruction takes exactly three clock cycles: fetch (the op-code is
// written into IR), decode (PC advances and the byte after the op-code is
// written into AUX) and execute (the result is written). The counter is the
// two flip-flops Q1:Q0 that the write-enable and PC_ALU equations read:
// fetch = 00, decode = 01, execute = 10, then back to fetch. The code 11 is
// never entered. The three-cycle pattern follows the register tables of the
// design; the encoding and the synchronous active-low reset to fetch are this
// design's choices.
//
// Interface: clk, rst_n (synchronous, active low); cyc is the current cycle,
// q1/q0 its two bits, fetch/decode/execute one-hot decodes of it.
module cycle_counter
  import wimp51_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output cycle_e cyc,
  output logic   q1,
  output logic   q0,
  output logic   fetch,
  output logic   decode,
  output logic   execute
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= CYC_FETCH;
    end else begin
      unique case (cyc)
        CYC_FETCH:   cyc <= CYC_DECODE;
        CYC_DECODE:  cyc <= CYC_EXECUTE;
        default:     cyc <= CYC_FETCH;
      endcase
    end
  end

  assign q1      = cyc[1];
  assign q0      = cyc[0];
  assign fetch   = !q1 && !q0;
  assign decode  = !q1 &&  q0;
  assign execute =  q1 && !q0;

  // The unused code 11 must never be reached.
  a_no_illegal_cycle: assert property (@(posedge clk) disable iff (!rst_n) !(q1 && q0));

endmodule
