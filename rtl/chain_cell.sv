// Error flag and scan stage shared by every chained assertion checker.
//
// An assertion checker only decides, each clock, whether its property has
// failed ("fail"). This cell turns that into the two chains that connect all
// checkers of a chip to the assertion processor:
//  * error chain: eo = ei | flag. The OR of all flags reaches the processor
//    and tells it that some assertion has failed.
//  * error scan chain: the flag is also one stage of a shift register,
//    esci -> flag -> esco. While escen_n is low the flag stops recording
//    failures and shifts one place per esclck pulse, so the processor can
//    read all flags one after another and tell which assertion failed.
//    Shifting in zeros clears the flags as they are read.
// A single flip-flop per checker serves as flag and as scan stage.
//
// Timing: everything is clocked by clk. esclck is the scan clock; here it is
// realised as an enable of clk (a shift happens at a clk edge where esclck
// and not escen_n are high), so the scan master must produce esclck as pulses
// synchronous to clk. Failures that occur while escen_n is low are not
// recorded. reset_n is asynchronous and active low. The port set follows the
// modified assertion interface (reset_n, clk, ei, esci, esclck, escen_n, eo,
// esco); the one-flop structure and the enable form of esclck are choices of
// this design.
module chain_cell (
  input  logic reset_n,
  input  logic clk,
  input  logic fail,     // property violated in this cycle
  input  logic ei,       // error input, from the previous checker
  input  logic esci,     // error scan input, from the previous checker
  input  logic esclck,   // error scan clock (pulse, synchronous to clk)
  input  logic escen_n,  // error scan enable, active low
  output logic eo,       // error output, to the next checker
  output logic esco      // error scan output, to the next checker
);

  logic flag_q;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)      flag_q <= 1'b0;
    else if (!escen_n) begin
      if (esclck)      flag_q <= esci;
    end
    else if (fail)     flag_q <= 1'b1;
  end

  assign eo   = ei | flag_q;
  assign esco = flag_q;

endmodule
