// Constants and signal bundle of the assertion chain of an 8051 core.
//
// c8051_mon_t bundles the core signals that the chain watches. The action
// table gives each assertion, by its sequence number on the scan chain, the
// action the assertion processor takes; it is derived from the severity
// chosen for each assertion. Signal names, bounds and severities are choices
// of this design: the source names the checks but not the core's signals.
package c8051_pkg;

  import ap_pkg::*;

  typedef struct packed {
    logic       opcode_valid; // ALU receives a valid opcode (always1)
    logic       div_ok;       // divider internal consistency (always2)
    logic       div_en;       // divide enable (frame and window start)
    logic       div_done;     // divide completed
    logic [7:0] div_cnt;      // divider iteration counter (no_underflow)
    logic       int_trig;     // interrupt trigger
    logic       int_ack;      // interrupt acknowledge
    logic [7:0] sp;           // stack pointer (no_overflow)
  } c8051_mon_t;

  // Chain of the 8051, by sequence number as scanned out (1 is nearest to
  // the assertion processor): 1 divider underflow, 2 divider frame,
  // 3 divider always, 4 ALU opcode always, 5 divider window,
  // 6 interrupt acknowledge time, 7 stack overflow.
  localparam int unsigned C8051_N = 7;

  localparam action_t [C8051_N:1] C8051_ACTIONS = {
    sev2act(SEV_FATAL),    // 7 stack overflow
    sev2act(SEV_WARNING),  // 6 interrupt acknowledge timing
    sev2act(SEV_WARNING),  // 5 divide enable while dividing
    sev2act(SEV_FATAL),    // 4 invalid ALU opcode
    sev2act(SEV_ERROR),    // 3 divider consistency
    sev2act(SEV_ERROR),    // 2 divider completion time
    sev2act(SEV_ERROR)     // 1 divider counter underflow
  };

  // 8051 stack: 128 bytes of internal RAM, stack pointer resets to 07h.
  localparam logic [7:0] C8051_SP_MIN = 8'h07;
  localparam logic [7:0] C8051_SP_MAX = 8'h7F;
  // Divider completion window (cycles after enable) and interrupt
  // acknowledge length.
  localparam int unsigned C8051_DIV_MIN_CKS = 2;
  localparam int unsigned C8051_DIV_MAX_CKS = 8;
  localparam int unsigned C8051_ACK_CKS     = 4;
  // Divider iteration counter: legal values 1 to 8, reloaded with 8.
  localparam logic [7:0] C8051_DIV_CNT_MIN = 8'h01;
  localparam logic [7:0] C8051_DIV_CNT_MAX = 8'h09;

endpackage
