// Assertion chain of an 8051 core.
//
// Seven chained checkers watch the core through the c8051_mon_t bundle. The
// last four form the chain of the ALU hierarchy (alu_top_chain): the chain
// enters the ALU top level, passes "always1" (the ALU always receives a valid
// opcode), then enters the divider (alu_divide_chain) and passes "always2",
// "frame" (a divide completes 2 to 8 cycles after its enable) and "u_flow"
// (the divider counter does not underflow), and leaves through the ALU top
// level. Ahead of them in the
// chain sit three checks of the rest of the core: "window" (no new divide
// enable before the divide in progress has completed), "time" (an interrupt
// trigger is answered by a four-cycle acknowledge) and "overflow" (the stack
// pointer does not run past the top of the 128-byte data memory).
//
// Scanned from esco, the flags come out in the order u_flow, frame, always2,
// always1, window, time, overflow: sequence numbers 1 to 7. ei and esci
// enter the first checker; eo and esco leave the last. All checkers share
// clk, reset_n, esclck and escen_n (see chain_cell for the timing).
// The ALU part and its scan order follow the source; the three other checks
// are named there by type and purpose, and their signals, bounds and place
// in the chain are this design's choice. The core itself is not included.
module c8051_assert_chain
  import c8051_pkg::*;
(
  input  logic       reset_n,
  input  logic       clk,
  input  c8051_mon_t mon,
  input  logic       ei,
  input  logic       esci,
  input  logic       esclck,
  input  logic       escen_n,
  output logic       eo,
  output logic       esco
);

  // Links between consecutive checkers, from the chain input onward.
  logic eo_ovf, esco_ovf, eo_time, esco_time, eo_win, esco_win;

  assert_no_overflow #(
    .WIDTH(8), .MIN(C8051_SP_MIN), .MAX(C8051_SP_MAX)
  ) u_overflow (
    .reset_n, .clk, .test_expr(mon.sp),
    .ei, .esci, .esclck, .escen_n, .eo(eo_ovf), .esco(esco_ovf)
  );

  assert_time #(.NUM_CKS(C8051_ACK_CKS)) u_time (
    .reset_n, .clk, .start_event(mon.int_trig), .test_expr(mon.int_ack),
    .ei(eo_ovf), .esci(esco_ovf), .esclck, .escen_n, .eo(eo_time), .esco(esco_time)
  );

  assert_window u_window (
    .reset_n, .clk, .start_event(mon.div_en), .test_expr(!mon.div_en),
    .end_event(mon.div_done),
    .ei(eo_time), .esci(esco_time), .esclck, .escen_n, .eo(eo_win), .esco(esco_win)
  );

  // ALU: always1 at its top level, always2, frame and u_flow in the divider
  alu_top_chain u_alu_top (
    .reset_n, .clk, .opcode_valid(mon.opcode_valid), .div_ok(mon.div_ok),
    .div_en(mon.div_en), .div_done(mon.div_done), .div_cnt(mon.div_cnt),
    .ei(eo_win), .esci(esco_win), .esclck, .escen_n, .eo, .esco
  );

endmodule
