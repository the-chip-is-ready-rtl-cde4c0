// Chained "never" assertion checker.
//
// The property: test_expr is never true at a rising clock edge while reset_n
// is high. A true sample sets the error flag of the checker's chain_cell,
// which reports it on the error chain (eo) and holds it for the error scan
// chain (esco). Violations show on eo right after the clock edge that sampled
// them. The property follows the "never" checker of the Open Verification
// Library; the chain ports are those of its scan-chain version.
module assert_never (
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
  assign fail = test_expr;

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
