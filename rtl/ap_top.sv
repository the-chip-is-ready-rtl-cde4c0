// On-chip assertion monitoring for an 8051 core and an I2C controller.
//
// Synthesised assertion checkers stay in the shipped chip. Each monitored
// core has a chain of them (c8051_assert_chain, i2c_assert_chain) and an
// assertion processor at the end of the chain. When a checker fails, the
// processor sees the chain's eo go high, scans the chain's error flags out
// through esco to find the failing assertion's number, looks up the action
// for that number, and halts the chip, resets the core or interrupts the
// software. A third, one-assertion chain sits on the small example circuit
// wb_example and has a processor of its own.
//
// The cores are not part of this design: the signals their checkers watch
// are input ports (c8051_mon, i2c_mon), and each processor's outputs come
// out as an ap_status_t (halt, chip_reset_n for the core, sw_irq with its
// acknowledge input, the failing assertion's number and action). A
// processor's hardware reset also clears the checkers of its own chain; the
// processors themselves are reset only by reset_n. The first checker of
// every chain gets ei = esci = 0, so a scan shifts zeros in and leaves the
// chain cleared. Timing: one clock, clk; a failure sampled at one edge is on
// eo after that edge, and a chain of N checkers is acted on 2N + 2 clocks
// after eo rose. The chain-plus-processor structure follows the source; the
// per-core action tables and the sharing of one processor per chain are this
// design's choices.
module ap_top
  import ap_pkg::*;
  import c8051_pkg::*;
  import i2c_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  // 8051 core
  input  c8051_mon_t c8051_mon,
  input  logic       c8051_irq_ack,
  output ap_status_t c8051_status,
  // I2C controller
  input  i2c_mon_t   i2c_mon,
  input  logic       i2c_irq_ack,
  output ap_status_t i2c_status,
  // example circuit
  input  logic       wb_a,
  input  logic       wb_b,
  input  logic       wb_c,
  output logic       wb_d,
  input  logic       wb_irq_ack,
  output ap_status_t wb_status
);

  localparam action_t [1:1] WB_ACTIONS = {sev2act(SEV_WARNING)};

  // ---------------------------------------------------------------- 8051
  logic c8051_eo, c8051_esco, c8051_escen_n, c8051_esclck, c8051_chk_rst_n;
  logic [$clog2(C8051_N + 1)-1:0] c8051_no;

  assign c8051_chk_rst_n = reset_n & c8051_status.chip_reset_n;

  c8051_assert_chain u_c8051_chain (
    .reset_n(c8051_chk_rst_n), .clk, .mon(c8051_mon),
    .ei(1'b0), .esci(1'b0), .esclck(c8051_esclck), .escen_n(c8051_escen_n),
    .eo(c8051_eo), .esco(c8051_esco)
  );

  assertion_processor #(.N_ASSERT(C8051_N), .ACTION_TABLE(C8051_ACTIONS)) u_c8051_ap (
    .clk, .reset_n, .eo(c8051_eo), .esci(c8051_esco),
    .escen_n(c8051_escen_n), .esclck(c8051_esclck),
    .error_no(c8051_no), .error_priority(c8051_status.error_priority),
    .error_valid(c8051_status.error_valid), .halt(c8051_status.halt),
    .chip_reset_n(c8051_status.chip_reset_n), .sw_irq(c8051_status.sw_irq),
    .irq_ack(c8051_irq_ack)
  );
  assign c8051_status.error_no = 10'(c8051_no);

  // ----------------------------------------------------------------- I2C
  logic i2c_eo, i2c_esco, i2c_escen_n, i2c_esclck, i2c_chk_rst_n;
  logic [$clog2(I2C_N + 1)-1:0] i2c_no;

  assign i2c_chk_rst_n = reset_n & i2c_status.chip_reset_n;

  i2c_assert_chain u_i2c_chain (
    .reset_n(i2c_chk_rst_n), .clk, .mon(i2c_mon),
    .ei(1'b0), .esci(1'b0), .esclck(i2c_esclck), .escen_n(i2c_escen_n),
    .eo(i2c_eo), .esco(i2c_esco)
  );

  assertion_processor #(.N_ASSERT(I2C_N), .ACTION_TABLE(I2C_ACTIONS)) u_i2c_ap (
    .clk, .reset_n, .eo(i2c_eo), .esci(i2c_esco),
    .escen_n(i2c_escen_n), .esclck(i2c_esclck),
    .error_no(i2c_no), .error_priority(i2c_status.error_priority),
    .error_valid(i2c_status.error_valid), .halt(i2c_status.halt),
    .chip_reset_n(i2c_status.chip_reset_n), .sw_irq(i2c_status.sw_irq),
    .irq_ack(i2c_irq_ack)
  );
  assign i2c_status.error_no = 10'(i2c_no);

  // ------------------------------------------------------ example circuit
  logic wb_eo, wb_esco, wb_escen_n, wb_esclck, wb_chk_rst_n;
  logic wb_no;

  assign wb_chk_rst_n = reset_n & wb_status.chip_reset_n;

  wb_example u_wb (
    .reset_n(wb_chk_rst_n), .clk, .a(wb_a), .b(wb_b), .c(wb_c), .d_q(wb_d),
    .ei(1'b0), .esci(1'b0), .esclck(wb_esclck), .escen_n(wb_escen_n),
    .eo(wb_eo), .esco(wb_esco)
  );

  assertion_processor #(.N_ASSERT(1), .ACTION_TABLE(WB_ACTIONS)) u_wb_ap (
    .clk, .reset_n, .eo(wb_eo), .esci(wb_esco),
    .escen_n(wb_escen_n), .esclck(wb_esclck),
    .error_no(wb_no), .error_priority(wb_status.error_priority),
    .error_valid(wb_status.error_valid), .halt(wb_status.halt),
    .chip_reset_n(wb_status.chip_reset_n), .sw_irq(wb_status.sw_irq),
    .irq_ack(wb_irq_ack)
  );
  assign wb_status.error_no = 10'(wb_no);

endmodule
