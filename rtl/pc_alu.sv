// pc_alu: next-program-counter unit.
//
// Three candidate values are formed with one 8-bit adder, PC + B + CI:
// hold (B = 0, CI = 0), increment (B = 0, CI = 1) and relative branch
// (B = AUX, CI = 1, so the target is PC + 1 + rel, counted from the byte
// after the two-byte jump). A priority encoder picks the request: branch
// over increment over hold. The increment request is
//   A = decode | execute & (op = 74h | C2h | D2h)
// i.e. PC steps to the second byte in decode and past it in execute for the
// two-byte data instructions; the branch request is execute & (op = 80h,
// SJMP). The added C2h/D2h terms follow the design; the request for SJMP
// and the adder/encoder arrangement are this design's reading of it.
// The output pc_next is combinational; it is written into PC when PC_WE is
// 1, and it also addresses program memory so that the byte read in a cycle
// is the one PC will point at after that cycle.
module pc_alu
  import wimp51_pkg::*;
(
  input  logic       q1,
  input  logic       q0,
  input  logic [7:0] ir,
  input  logic [7:0] pc,
  input  logic [7:0] aux,
  output pc_sel_e    sel,
  output logic [7:0] pc_next
);

  logic       decode, execute;
  logic       req_inc, req_branch;
  logic [7:0] addend;
  logic       ci;

  assign decode  = !q1 &&  q0;
  assign execute =  q1 && !q0;

  assign req_inc    = decode
                   || (execute && (ir == OP_MOV_A_IMM || ir == OP_CLRB_A || ir == OP_SETB_A));
  assign req_branch = execute && (ir == OP_SJMP);

  // Priority encoder
  always_comb begin
    if (req_branch)   sel = PC_BRANCH;
    else if (req_inc) sel = PC_INC;
    else              sel = PC_HOLD;
  end

  assign addend  = (sel == PC_BRANCH) ? aux : 8'd0;
  assign ci      = (sel != PC_HOLD);
  assign pc_next = pc + addend + {7'd0, ci};

endmodule
