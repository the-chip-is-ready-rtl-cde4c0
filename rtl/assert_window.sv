// Chained "window" assertion checker.
//
// The property: once start_event is seen, test_expr must be true at every
// clock edge from the next edge on, up to and including the edge at which
// end_event is seen. A window flag opens on start_event (when no window is
// open) and closes on end_event; a false test_expr inside the window sets
// the error flag of the checker's chain_cell (error chain eo, error scan
// chain esco). Used on the 8051 divider: after a divide enable, no new
// enable may arrive before the divide has completed.
// The property follows the "window" checker of the Open Verification
// Library; whether the end_event edge itself is checked is this design's
// choice.
module assert_window (
  input  logic reset_n,
  input  logic clk,
  input  logic start_event,
  input  logic test_expr,
  input  logic end_event,
  input  logic ei,
  input  logic esci,
  input  logic esclck,
  input  logic escen_n,
  output logic eo,
  output logic esco
);

  logic open_q;
  logic fail;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)     open_q <= 1'b0;
    else if (!open_q) open_q <= start_event;
    else if (end_event) open_q <= 1'b0;
  end

  assign fail = open_q && !test_expr;

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
