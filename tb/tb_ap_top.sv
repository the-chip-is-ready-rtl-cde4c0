// End-to-end testbench of ap_top at its default parameters.
//
// The 8051 core, the I2C controller and the example circuit are played by
// the testbench: it drives legal activity on their monitored signals and, in
// turn, breaks every one of the thirteen assertions (seven on the 8051 chain,
// five on the I2C chain, one on the example circuit). For each failure it
// checks the whole path: eo of the chain rises, the chain's assertion
// processor scans it (escen_n low, one esclck pulse per assertion), reports
// the expected sequence number and action, and acts 2N+2 clocks after the
// clock edge at which eo rose, N being the chain length. A halt is checked
// to persist and is cleared with reset_n; a hardware reset must last four
// clocks; an interrupt must stay up until acknowledged.
// Two failures at once must report the higher sequence number. Counts every
// mechanism (scan, halt, reset, interrupt, double failure, legal idle
// periods) and fails if one never happened.
module tb_ap_top;
  import ap_pkg::*;
  import c8051_pkg::*;
  import i2c_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  c8051_mon_t c8051_mon;
  i2c_mon_t   i2c_mon;
  logic c8051_irq_ack = 1'b0, i2c_irq_ack = 1'b0, wb_irq_ack = 1'b0;
  logic wb_a = 1'b0, wb_b = 1'b0, wb_c = 1'b0, wb_d;
  ap_status_t c8051_status, i2c_status, wb_status;

  ap_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_scan = 0, n_halt = 0, n_reset = 0, n_irq = 0, n_double = 0, n_quiet = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // count scans by the falling edges of the scan enables
  always @(negedge dut.c8051_escen_n) n_scan++;
  always @(negedge dut.i2c_escen_n)   n_scan++;
  always @(negedge dut.wb_escen_n)    n_scan++;

  // time at which each chain's eo rose and each processor first acted
  realtime t_eo [3];
  realtime t_act [3];
  always @(posedge dut.c8051_eo) t_eo[0] = $realtime;
  always @(posedge dut.i2c_eo)   t_eo[1] = $realtime;
  always @(posedge dut.wb_eo)    t_eo[2] = $realtime;
  always @(posedge c8051_status.halt or negedge c8051_status.chip_reset_n or posedge c8051_status.sw_irq)
    t_act[0] = $realtime;
  always @(posedge i2c_status.halt or negedge i2c_status.chip_reset_n or posedge i2c_status.sw_irq)
    t_act[1] = $realtime;
  always @(posedge wb_status.halt or negedge wb_status.chip_reset_n or posedge wb_status.sw_irq)
    t_act[2] = $realtime;

  task automatic legal_c8051();
    c8051_mon.opcode_valid = 1'b1;
    c8051_mon.div_ok       = 1'b1;
    c8051_mon.div_en       = 1'b0;
    c8051_mon.div_done     = 1'b0;
    c8051_mon.div_cnt      = 8'd5;
    c8051_mon.int_trig     = 1'b0;
    c8051_mon.int_ack      = 1'b0;
    c8051_mon.sp           = 8'h30;
  endtask

  task automatic legal_i2c();
    i2c_mon.irq_ok   = 1'b1;
    i2c_mon.rd       = 1'b0;
    i2c_mon.wr       = 1'b1;
    i2c_mon.byte_fsm = 6'b000100;
    i2c_mon.bit_fsm  = 5'b00010;
    i2c_mon.cmd_fsm  = 4'b1000;
  endtask

  function automatic ap_status_t status(input int sys);
    case (sys)
      0: return c8051_status;
      1: return i2c_status;
      default: return wb_status;
    endcase
  endfunction

  function automatic logic chain_eo(input int sys);
    case (sys)
      0: return dut.c8051_eo;
      1: return dut.i2c_eo;
      default: return dut.wb_eo;
    endcase
  endfunction

  task automatic ack(input int sys, input logic v);
    case (sys)
      0: c8051_irq_ack = v;
      1: i2c_irq_ack = v;
      default: wb_irq_ack = v;
    endcase
  endtask

  task automatic full_reset();
    @(negedge clk) reset_n = 1'b0;
    legal_c8051();
    legal_i2c();
    {wb_a, wb_b, wb_c} = 3'b000;
    @(negedge clk) reset_n = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  // Wait for eo of chain sys, then for the processor's action, and check it.
  task automatic expect_action(input int sys, input int n, input int seq,
                               input action_t act, input string name);
    ap_status_t s;
    int edges;
    bit acted;
    edges = 0;
    while (!chain_eo(sys) && edges < 30) begin
      @(posedge clk);
      edges++;
      #1;
    end
    check(chain_eo(sys), {name, ": eo never rose"});
    edges = 0;
    acted = 1'b0;
    while (!acted && edges < 4 * n + 10) begin
      @(posedge clk);
      edges++;
      #1;
      s = status(sys);
      acted = s.halt || !s.chip_reset_n || s.sw_irq;
    end
    edges = int'((t_act[sys] - t_eo[sys]) / 10.0);
    check(edges == 2 * n + 2, $sformatf("%s: acted %0d clocks after eo rose, expected %0d", name, edges, 2 * n + 2));
    check(s.error_valid && int'(s.error_no) == seq,
          $sformatf("%s: error_no %0d, expected %0d", name, s.error_no, seq));
    check(s.error_priority == act, $sformatf("%s: action %b, expected %b", name, s.error_priority, act));
    check(!chain_eo(sys), {name, ": chain not empty after the scan"});
    if (act[0]) begin
      n_halt++;
      check(s.halt, {name, ": halt expected"});
      repeat (10) @(posedge clk);
      #1 s = status(sys);
      check(s.halt, {name, ": halt did not persist"});
      full_reset();
      s = status(sys);
      check(!s.halt, {name, ": halt not cleared by reset_n"});
    end else if (act[1]) begin
      n_reset++;
      check(!s.chip_reset_n && !s.halt, {name, ": hardware reset expected"});
      edges = 0;
      while (!s.chip_reset_n && edges < 20) begin
        @(posedge clk);
        edges++;
        #1 s = status(sys);
      end
      check(edges == 4, $sformatf("%s: reset pulse of %0d clocks, expected 4", name, edges));
    end else if (act[2]) begin
      n_irq++;
      check(s.sw_irq && !s.halt && s.chip_reset_n, {name, ": interrupt expected"});
      repeat (5) @(posedge clk);
      #1 s = status(sys);
      check(s.sw_irq, {name, ": interrupt dropped before the acknowledge"});
      @(negedge clk) ack(sys, 1'b1);
      @(negedge clk) ack(sys, 1'b0);
      s = status(sys);
      check(!s.sw_irq, {name, ": interrupt not cleared by the acknowledge"});
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic quiet(input int cyc);
    ap_status_t s0, s1, s2;
    repeat (cyc) @(negedge clk);
    s0 = c8051_status; s1 = i2c_status; s2 = wb_status;
    check(!dut.c8051_eo && !dut.i2c_eo && !dut.wb_eo, "eo raised without a failure");
    check(!s0.halt && !s1.halt && !s2.halt && !s0.sw_irq && !s1.sw_irq && !s2.sw_irq &&
          s0.chip_reset_n && s1.chip_reset_n && s2.chip_reset_n, "action taken without a failure");
    n_quiet++;
  endtask

  initial begin
    legal_c8051();
    legal_i2c();
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;

    // legal activity on all three
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) c8051_mon.div_en = 1'b1;
      @(negedge clk) c8051_mon.div_en = 1'b0;
      repeat (3) @(negedge clk);
      c8051_mon.div_done = 1'b1;
      @(negedge clk) c8051_mon.div_done = 1'b0;
      c8051_mon.int_trig = 1'b1;
      @(negedge clk) begin c8051_mon.int_trig = 1'b0; c8051_mon.int_ack = 1'b1; end
      repeat (4) @(negedge clk);
      c8051_mon.int_ack = 1'b0;
      i2c_mon.byte_fsm = 6'b1 << ($urandom % 6);
      {wb_a, wb_b, wb_c} = {1'b0, 2'($urandom)};
      quiet(2);
    end
    check(wb_d == 1'b0, "example output with a = 0");

    // ---- 8051 chain, N = 7
    @(negedge clk) c8051_mon.div_cnt = 8'd1;
    @(negedge clk) c8051_mon.div_cnt = 8'd0;
    @(negedge clk) legal_c8051();
    expect_action(0, C8051_N, 1, C8051_ACTIONS[1], "8051 u_flow");
    @(negedge clk) c8051_mon.div_en = 1'b1;
    @(negedge clk) c8051_mon.div_en = 1'b0;
    expect_action(0, C8051_N, 2, C8051_ACTIONS[2], "8051 frame");
    @(negedge clk) c8051_mon.div_ok = 1'b0;
    @(negedge clk) legal_c8051();
    expect_action(0, C8051_N, 3, C8051_ACTIONS[3], "8051 always2");
    @(negedge clk) c8051_mon.opcode_valid = 1'b0;
    @(negedge clk) legal_c8051();
    expect_action(0, C8051_N, 4, C8051_ACTIONS[4], "8051 always1");
    quiet(3);
    @(negedge clk) c8051_mon.div_en = 1'b1;
    @(negedge clk) c8051_mon.div_en = 1'b0;
    @(negedge clk) c8051_mon.div_en = 1'b1;
    @(negedge clk) c8051_mon.div_en = 1'b0;
    @(negedge clk) c8051_mon.div_done = 1'b1;
    @(negedge clk) c8051_mon.div_done = 1'b0;
    expect_action(0, C8051_N, 5, C8051_ACTIONS[5], "8051 window");
    @(negedge clk) c8051_mon.int_trig = 1'b1;
    @(negedge clk) begin c8051_mon.int_trig = 1'b0; c8051_mon.int_ack = 1'b1; end
    @(negedge clk) c8051_mon.int_ack = 1'b0;
    expect_action(0, C8051_N, 6, C8051_ACTIONS[6], "8051 time");
    @(negedge clk) c8051_mon.sp = 8'h7F;
    @(negedge clk) c8051_mon.sp = 8'h80;
    @(negedge clk) c8051_mon.sp = 8'h30;
    expect_action(0, C8051_N, 7, C8051_ACTIONS[7], "8051 overflow");
    // two failures at once: the higher sequence number is reported
    @(negedge clk) begin c8051_mon.div_ok = 1'b0; c8051_mon.opcode_valid = 1'b0; end
    @(negedge clk) legal_c8051();
    n_double++;
    expect_action(0, C8051_N, 4, C8051_ACTIONS[4], "8051 always1+always2");

    // ---- I2C chain, N = 5
    @(negedge clk) i2c_mon.cmd_fsm = 4'b0000;
    @(negedge clk) legal_i2c();
    expect_action(1, I2C_N, 1, I2C_ACTIONS[1], "I2C command state");
    @(negedge clk) i2c_mon.bit_fsm = 5'b00110;
    @(negedge clk) legal_i2c();
    expect_action(1, I2C_N, 2, I2C_ACTIONS[2], "I2C bit state");
    @(negedge clk) i2c_mon.byte_fsm = 6'b000000;
    @(negedge clk) legal_i2c();
    expect_action(1, I2C_N, 3, I2C_ACTIONS[3], "I2C byte state");
    @(negedge clk) i2c_mon.rd = 1'b1;
    @(negedge clk) legal_i2c();
    expect_action(1, I2C_N, 4, I2C_ACTIONS[4], "I2C read/write");
    @(negedge clk) i2c_mon.irq_ok = 1'b0;
    @(negedge clk) legal_i2c();
    expect_action(1, I2C_N, 5, I2C_ACTIONS[5], "I2C interrupt");

    // ---- example circuit, N = 1: a = c = 1 drives both probes high
    @(negedge clk) {wb_a, wb_b, wb_c} = 3'b101;
    @(negedge clk) {wb_a, wb_b, wb_c} = 3'b000;
    @(posedge clk) #1 check(wb_d == 1'b1, "example output for abc = 101");
    expect_action(2, 1, 1, WB_ACTIONS_TB, "example f1 + f2 > 1");
    quiet(5);

    check(n_scan == 14, $sformatf("%0d scans, expected 14", n_scan));
    check(n_halt > 0, "no halt happened");
    check(n_reset > 0, "no hardware reset happened");
    check(n_irq > 0, "no software interrupt happened");
    check(n_double > 0, "no double failure happened");
    check(n_quiet > 0, "no failure-free period checked");
    $display("scans %0d halt %0d reset %0d irq %0d double %0d quiet %0d",
             n_scan, n_halt, n_reset, n_irq, n_double, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam action_t WB_ACTIONS_TB = ACT_IRQ;
endmodule
