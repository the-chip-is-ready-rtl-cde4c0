// Assertion chain of an I2C controller.
//
// Five chained checkers watch the controller through the i2c_mon_t bundle:
// "always" checks the interrupt request (irq_ok, the interrupt output agrees
// with its flag and enable), "never" checks that read and write commands are
// not given together, and three "one_hot" checkers check the state registers
// of the byte controller, the bit controller and the command sequencer.
// Scanned from esco, the flags come out as: 1 command sequencer, 2 bit
// controller, 3 byte controller, 4 read/write, 5 interrupt. ei and esci enter
// the interrupt checker; eo and esco leave the command sequencer checker.
// The checker types, their purposes and their number (five) follow the
// source; which state machines are checked, the signal widths and the chain
// order are this design's choice. The controller itself is not included.
module i2c_assert_chain
  import i2c_pkg::*;
(
  input  logic     reset_n,
  input  logic     clk,
  input  i2c_mon_t mon,
  input  logic     ei,
  input  logic     esci,
  input  logic     esclck,
  input  logic     escen_n,
  output logic     eo,
  output logic     esco
);

  logic eo_irq, esco_irq, eo_rw, esco_rw, eo_byte, esco_byte, eo_bit, esco_bit;

  assert_always u_irq (
    .reset_n, .clk, .test_expr(mon.irq_ok),
    .ei, .esci, .esclck, .escen_n, .eo(eo_irq), .esco(esco_irq)
  );

  assert_never u_rdwr (
    .reset_n, .clk, .test_expr(mon.rd && mon.wr),
    .ei(eo_irq), .esci(esco_irq), .esclck, .escen_n, .eo(eo_rw), .esco(esco_rw)
  );

  assert_one_hot #(.WIDTH($bits(mon.byte_fsm))) u_byte_fsm (
    .reset_n, .clk, .test_expr(mon.byte_fsm),
    .ei(eo_rw), .esci(esco_rw), .esclck, .escen_n, .eo(eo_byte), .esco(esco_byte)
  );

  assert_one_hot #(.WIDTH($bits(mon.bit_fsm))) u_bit_fsm (
    .reset_n, .clk, .test_expr(mon.bit_fsm),
    .ei(eo_byte), .esci(esco_byte), .esclck, .escen_n, .eo(eo_bit), .esco(esco_bit)
  );

  assert_one_hot #(.WIDTH($bits(mon.cmd_fsm))) u_cmd_fsm (
    .reset_n, .clk, .test_expr(mon.cmd_fsm),
    .ei(eo_bit), .esci(esco_bit), .esclck, .escen_n, .eo, .esco
  );

endmodule
