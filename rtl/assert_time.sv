// Chained "time" assertion checker.
//
// The property: after start_event is seen (while no check is running),
// test_expr must be true at each of the next NUM_CKS clock edges. A down
// counter loaded with NUM_CKS on start_event marks the checked edges; a false
// test_expr while it is non-zero sets the error flag of the checker's
// chain_cell (error chain eo, error scan chain esco). start_event is ignored
// while a check runs. Used on the 8051 interrupt logic, where a trigger must
// be answered by an acknowledge lasting four clock cycles, hence the default
// NUM_CKS = 4. The property follows the "time" checker of the Open
// Verification Library.
module assert_time #(
  parameter int unsigned NUM_CKS = 4
) (
  input  logic reset_n,
  input  logic clk,
  input  logic start_event,
  input  logic test_expr,
  input  logic ei,
  input  logic esci,
  input  logic esclck,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  localparam int unsigned CW = $clog2(NUM_CKS + 1);

  logic [CW-1:0] cnt_q;
  logic          fail;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)          cnt_q <= '0;
    else if (cnt_q != '0)  cnt_q <= cnt_q - 1'b1;
    else if (start_event)  cnt_q <= CW'(NUM_CKS);
  end

  assign fail = (cnt_q != '0) && !test_expr;

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
