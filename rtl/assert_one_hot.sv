// Chained "one_hot" assertion checker.
//
// The property: exactly one bit of the WIDTH-bit test_expr is set at every
// rising clock edge while reset_n is high (typical use: the state register of
// a one-hot state machine). No bit or more than one bit sets the error flag
// of the checker's chain_cell, which drives the error chain (eo) and the
// error scan chain (esco). The one-hot test is v != 0 && (v & (v-1)) == 0.
// The property follows the "one_hot" checker of the Open Verification
// Library; WIDTH has no value in the source and defaults to 4 here.
module assert_one_hot #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             reset_n,
  input  logic             clk,
  input  logic [WIDTH-1:0] test_expr,
  input  logic             ei,
  input  logic             esci,
  input  logic             esclck,
  input  logic             escen_n,
  output logic             eo,
  output logic             esco
);

  logic fail;
  assign fail = (test_expr == '0) || ((test_expr & (test_expr - 1'b1)) != '0);

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
