// Assertion chain inside the divider of the 8051 ALU.
//
// The divider's three chained checkers, in chain order: "always2" (div_ok,
// divider internal consistency), "frame" (div_done follows a rising div_en
// after 2 to 8 clocks) and "u_flow" (the iteration counter div_cnt, legal
// range 1..8, does not underflow). The chain enters through ei/esci and
// leaves through eo/esco, so that scanned from esco the divider's flags come
// out as u_flow, frame, always2. This is the part of the chain that lives in
// the divider's level of the design hierarchy: the divider's interface gains
// the chain ports. Checker order follows the source; the watched signals and
// bounds are this design's choice. Timing: see chain_cell.
module alu_divide_chain
  import c8051_pkg::*;
(
  input  logic       reset_n,
  input  logic       clk,
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

  logic eo_t1, esco_t1;  // always2 -> frame
  logic eo_t2, esco_t2;  // frame   -> u_flow

  assert_always u_always2 (
    .reset_n, .clk, .test_expr(div_ok),
    .ei, .esci, .esclck, .escen_n, .eo(eo_t1), .esco(esco_t1)
  );

  assert_frame #(.MIN_CKS(C8051_DIV_MIN_CKS), .MAX_CKS(C8051_DIV_MAX_CKS)) u_frame (
    .reset_n, .clk, .start_event(div_en), .test_expr(div_done),
    .ei(eo_t1), .esci(esco_t1), .esclck, .escen_n, .eo(eo_t2), .esco(esco_t2)
  );

  assert_no_underflow #(
    .WIDTH(8), .MIN(C8051_DIV_CNT_MIN), .MAX(C8051_DIV_CNT_MAX)
  ) u_uflow (
    .reset_n, .clk, .test_expr(div_cnt),
    .ei(eo_t2), .esci(esco_t2), .esclck, .escen_n, .eo, .esco
  );

endmodule
