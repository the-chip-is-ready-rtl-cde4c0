// Chained "always" assertion checker.
//
// The property: test_expr is true at every rising clock edge while reset_n is
// high. A false sample sets the checker's error flag, which joins the error
// chain (eo) and the error scan chain (esco) through chain_cell; see that
// module for the chain protocol. The checker is combinational in front of the
// flag, so a violation sampled at edge k shows on eo right after edge k.
// The property follows the "always" checker of the Open Verification Library;
// the chain ports are those of the scan-chain version of that library.
module assert_always (
  input  logic reset_n,
  input  logic clk,
  input  logic test_expr,
  input  logic ei,
  input  logic esci,
  input  logic esclck,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic fail;
  assign fail = !test_expr;

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
