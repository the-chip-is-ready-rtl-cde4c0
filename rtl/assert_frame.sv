// Chained "frame" assertion checker.
//
// The property: after a rising edge of start_event, test_expr must become
// true no earlier than MIN_CKS and no later than MAX_CKS clock edges later
// (the first edge after the start edge counts as 1; MAX_CKS = 0 means no
// upper bound). A counter runs from the start edge until test_expr is seen
// or the limit is reached; test_expr too early, or not at all by MAX_CKS,
// sets the error flag of the checker's chain_cell (error chain eo, error
// scan chain esco). Start edges during a running check are ignored.
// The property follows the "frame" checker of the Open Verification Library;
// the default bounds (2 and 8) are this design's choice, the source gives
// none.
module assert_frame #(
  parameter int unsigned MIN_CKS = 2,
  parameter int unsigned MAX_CKS = 8
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

  localparam int unsigned LIM = (MAX_CKS > MIN_CKS) ? MAX_CKS : MIN_CKS;
  localparam int unsigned CW  = $clog2(LIM + 2);

  logic          start_q;
  logic          active_q;
  logic [CW-1:0] cnt_q;
  logic          early, late, fail;

  assign early = active_q && test_expr && (cnt_q < CW'(MIN_CKS));
  assign late  = active_q && !test_expr && (MAX_CKS != 0) && (cnt_q == CW'(MAX_CKS));
  assign fail  = early || late;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      start_q  <= 1'b0;
      active_q <= 1'b0;
      cnt_q    <= '0;
    end else begin
      start_q <= start_event;
      if (!active_q) begin
        if (start_event && !start_q) begin
          active_q <= 1'b1;
          cnt_q    <= CW'(1);
        end
      end else if (test_expr || late) begin
        active_q <= 1'b0;
      end else if (cnt_q < CW'(LIM)) begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  chain_cell u_cell (
    .reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

endmodule
