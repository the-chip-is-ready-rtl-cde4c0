// Assertion chain at the top level of the 8051 ALU.
//
// The chain enters the ALU top level through ei/esci, passes the checker
// "always1" (the ALU always receives a valid opcode), continues as
// eo_t1/esco_t1 into the divider's own chain (alu_divide_chain) and leaves
// the ALU through eo/esco. Scanned from esco, the four ALU flags come out as
// u_flow, frame, always2, always1: sequence numbers 1 to 4. The chain ports
// are added to every level of the hierarchy it passes through. Structure and
// scan order follow the source; the watched signal names are this design's
// choice. Timing: see chain_cell.
module alu_top_chain (
  input  logic       reset_n,
  input  logic       clk,
  input  logic       opcode_valid,
  input  logic       div_ok,
  input  logic       div_en,
  input  logic       div_done,
  input  logic [7:0] div_cnt,
  input  logic       ei,
  input  logic       esci,
  input  logic       esclck,
  input  logic       escen_n,
  output logic       eo,
  output logic       esco
);

  logic eo_t1, esco_t1;  // always1 -> divider

  assert_always u_always1 (
    .reset_n, .clk, .test_expr(opcode_valid),
    .ei, .esci, .esclck, .escen_n, .eo(eo_t1), .esco(esco_t1)
  );

  alu_divide_chain u_alu_divide (
    .reset_n, .clk, .div_ok, .div_en, .div_done, .div_cnt,
    .ei(eo_t1), .esci(esco_t1), .esclck, .escen_n, .eo, .esco
  );

endmodule
