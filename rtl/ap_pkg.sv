// Shared types and constants of the on-chip assertion framework.
//
// An assertion processor reacts to a failed assertion with one of three
// actions. They are coded as a 3-bit vector in the order of the processor's
// priority decoder: bit 0 halts the chip, bit 1 resets it, bit 2 raises a
// software interrupt. When several bits are set the lowest one wins, so halt
// outranks reset and reset outranks the interrupt. The action of each
// assertion is derived from the severity level that an OVL-style assertion
// carries (fatal, error, warning, info); that mapping, and the numeric codes
// of the severity levels, are this design's own choice.
package ap_pkg;

  // Action vector, bit 0 = halt, bit 1 = hardware reset, bit 2 = software
  // interrupt (the order of the priority decoder).
  typedef struct packed {
    logic sw_irq;
    logic hw_reset;
    logic halt;
  } action_t;

  localparam action_t ACT_NONE   = 3'b000;
  localparam action_t ACT_HALT   = 3'b001;
  localparam action_t ACT_RESET  = 3'b010;
  localparam action_t ACT_IRQ    = 3'b100;

  // OVL severity levels.
  typedef enum logic [1:0] {
    SEV_FATAL   = 2'd0,
    SEV_ERROR   = 2'd1,
    SEV_WARNING = 2'd2,
    SEV_INFO    = 2'd3
  } severity_t;

  // Severity to action: a fatal failure stops the chip, an error resets it,
  // a warning hands the problem to software, an info is only logged.
  function automatic action_t sev2act(severity_t sev);
    case (sev)
      SEV_FATAL:   return ACT_HALT;
      SEV_ERROR:   return ACT_RESET;
      SEV_WARNING: return ACT_IRQ;
      default:     return ACT_NONE;
    endcase
  endfunction

  // What an assertion processor reports to the rest of the chip.
  typedef struct packed {
    logic       halt;          // chip halted
    logic       chip_reset_n;  // hardware reset of the monitored logic
    logic       sw_irq;        // software interrupt request
    logic       error_valid;   // error_no / error_priority valid
    action_t    error_priority;
    logic [9:0] error_no;      // sequence number of the failing assertion
  } ap_status_t;

endpackage
