// Constants and signal bundle of the assertion chain of an I2C controller.
//
// i2c_mon_t bundles the controller signals that the chain watches: the
// interrupt check, the read and write commands, and three one-hot state
// registers. The action table gives each assertion, by its sequence number
// on the scan chain, the action of the assertion processor. Signal names,
// widths and severities are choices of this design.
package i2c_pkg;

  import ap_pkg::*;

  typedef struct packed {
    logic       irq_ok;   // interrupt output matches flag and enable
    logic       rd;       // read command
    logic       wr;       // write command
    logic [5:0] byte_fsm; // byte controller state, one-hot
    logic [4:0] bit_fsm;  // bit controller state, one-hot
    logic [3:0] cmd_fsm;  // command sequencer state, one-hot
  } i2c_mon_t;

  // Chain of the I2C controller, by sequence number: 1 command sequencer
  // one-hot, 2 bit controller one-hot, 3 byte controller one-hot,
  // 4 read/write never, 5 interrupt always.
  localparam int unsigned I2C_N = 5;

  localparam action_t [I2C_N:1] I2C_ACTIONS = {
    sev2act(SEV_WARNING),  // 5 interrupt request
    sev2act(SEV_ERROR),    // 4 concurrent read and write
    sev2act(SEV_FATAL),    // 3 byte controller state
    sev2act(SEV_FATAL),    // 2 bit controller state
    sev2act(SEV_ERROR)     // 1 command sequencer state
  };

endpackage
