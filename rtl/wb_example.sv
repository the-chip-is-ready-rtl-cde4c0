// Small sequential circuit used to contrast black-box and white-box
// verification, with its white-box assertion.
//
// Inputs a, b and c are registered; the combinational logic between the two
// register stages is an OR gate X (xz = a | b), an AND gate Y (yz = a & c)
// and an AND gate Z (d = xz & yz); d is registered again at the output, so
// d_q follows the inputs two clock edges later. Its truth table reduces to
// d = a & c, which is why a stuck-at-0 fault on b never reaches the output.
// The two internal nets are the probes f1 (= xz) and f2 (= yz); a chained
// "never" checker flags the condition f1 + f2 > 1, sampled at the same edge
// as the output register, and reports it on the error chain (eo) and the
// error scan chain (esco), see chain_cell.
// The gates, their connections and the asserted condition follow the
// source; the register widths, clock and reset are this design's choice.
module wb_example (
  input  logic reset_n,
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic d_q,
  input  logic ei,
  input  logic esci,
  input  logic esclck,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic a_q, b_q, c_q;
  logic xz, yz, d;
  logic [1:0] f_sum;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      a_q <= 1'b0;
      b_q <= 1'b0;
      c_q <= 1'b0;
      d_q <= 1'b0;
    end else begin
      a_q <= a;
      b_q <= b;
      c_q <= c;
      d_q <= d;
    end
  end

  assign xz = a_q | b_q;   // gate X
  assign yz = a_q & c_q;   // gate Y
  assign d  = xz & yz;     // gate Z

  assign f_sum = {1'b0, xz} + {1'b0, yz};

  assert_never u_assert (
    .reset_n, .clk, .test_expr(f_sum > 2'd1),
    .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
