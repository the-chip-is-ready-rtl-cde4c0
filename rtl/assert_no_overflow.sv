// Chained "no_overflow" assertion checker.
//
// The property: when the WIDTH-bit test_expr was equal to MAX at the previous
// clock edge, its new value must be neither above MAX nor at or below MIN
// (that is, it may not step past the top or wrap around). The previous value
// is kept in a register, valid from the second edge after reset. A violation
// sets the error flag of the checker's chain_cell (error chain eo, error scan
// chain esco). Used on the 8051 stack pointer. The property follows the
// "no_overflow" checker of the Open Verification Library; the defaults (0 and
// 7Fh, the top of 128 bytes of 8051 data memory) are this design's choice.
module assert_no_overflow #(
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] MIN = '0,
  parameter logic [WIDTH-1:0] MAX = 8'h7F
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

  logic [WIDTH-1:0] prev_q;
  logic             valid_q;
  logic             fail;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      prev_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      prev_q  <= test_expr;
      valid_q <= 1'b1;
    end
  end

  assign fail = valid_q && (prev_q == MAX) && ((test_expr > MAX) || (test_expr <= MIN));

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
