// Self-checking testbench of c8051_assert_chain.
//
// Plays legal 8051 activity on the monitored signals (divides that complete
// after three cycles, interrupts acknowledged for four cycles, a stack
// pointer moving inside 07h..7Eh) and checks that no flag is raised. Then it
// breaks each of the seven properties in turn, checks that eo rises, scans
// the chain by hand (escen_n low, one esclck pulse per flag) and checks that
// exactly the flag of the expected sequence number is set: 1 u_flow,
// 2 frame, 3 always2, 4 always1, 5 window, 6 time, 7 overflow. After the
// scan the chain must be empty again.
module tb_c8051_assert_chain;
  import c8051_pkg::*;

  localparam int N = C8051_N;

  logic clk = 1'b0, reset_n = 1'b0;
  logic esclck = 1'b0, escen_n = 1'b1;
  logic eo, esco;
  c8051_mon_t mon;

  c8051_assert_chain dut (
    .reset_n, .clk, .mon, .ei(1'b0), .esci(1'b0), .esclck, .escen_n, .eo, .esco
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic idle_mon();
    mon.opcode_valid = 1'b1;
    mon.div_ok       = 1'b1;
    mon.div_en       = 1'b0;
    mon.div_done     = 1'b0;
    mon.div_cnt      = 8'd5;
    mon.int_trig     = 1'b0;
    mon.int_ack      = 1'b0;
  endtask

  task automatic cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  // A legal divide: enable for one cycle, done three cycles later.
  task automatic legal_divide();
    @(negedge clk) mon.div_en = 1'b1;
    @(negedge clk) mon.div_en = 1'b0;
    cycles(2);
    @(negedge clk) mon.div_done = 1'b1;
    @(negedge clk) mon.div_done = 1'b0;
  endtask

  // Interrupt trigger followed by an acknowledge of ack_len cycles.
  task automatic interrupt(input int ack_len);
    @(negedge clk) mon.int_trig = 1'b1;
    @(negedge clk) mon.int_trig = 1'b0; mon.int_ack = (ack_len > 0);
    for (int i = 1; i < ack_len; i++) @(negedge clk);
    @(negedge clk) mon.int_ack = 1'b0;
  endtask

  // Read all flags through esco, flag k is read after k-1 shifts.
  task automatic scan(output logic [N:1] bits);
    @(negedge clk) escen_n = 1'b0;
    for (int k = 1; k <= N; k++) begin
      @(negedge clk);
      bits[k] = esco;
      esclck = 1'b1;
      @(negedge clk) esclck = 1'b0;
    end
    @(negedge clk) escen_n = 1'b1;
  endtask

  task automatic expect_flag(input int seq, input string name);
    logic [N:1] bits;
    cycles(2);
    check(eo == 1'b1, {name, ": eo did not rise"});
    idle_mon();
    scan(bits);
    check(bits == (N'(1) << (seq - 1)),
          $sformatf("%s: scanned flags %b, expected sequence number %0d", name, bits, seq));
    #1 check(eo == 1'b0, {name, ": chain not empty after the scan"});
  endtask

  initial begin
    logic [N:1] bits;
    idle_mon();
    mon.sp = C8051_SP_MIN;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    // legal activity
    for (int i = 0; i < 20; i++) begin
      legal_divide();
      interrupt(4);
      mon.sp = 8'(8'h07 + $urandom % 8'h78);
      cycles(1);
      check(eo == 1'b0, "flag raised during legal activity");
    end
    mon.sp = 8'h7F; cycles(1);
    mon.sp = 8'h7E; cycles(2);
    mon.div_cnt = 8'd1; cycles(1);
    mon.div_cnt = 8'd8; cycles(2);
    check(eo == 1'b0, "flag raised at legal boundary values");
    scan(bits);
    check(bits == '0, "flags set after legal activity");

    // 1: divider counter underflow
    mon.div_cnt = 8'd1; cycles(1);
    mon.div_cnt = 8'd0; cycles(1);
    expect_flag(1, "u_flow");
    // 2: divide that does not complete within 8 cycles
    @(negedge clk) mon.div_en = 1'b1;
    @(negedge clk) mon.div_en = 1'b0;
    cycles(10);
    @(negedge clk) mon.div_done = 1'b1;
    @(negedge clk) mon.div_done = 1'b0;
    expect_flag(2, "frame");
    // 3: divider consistency
    @(negedge clk) mon.div_ok = 1'b0;
    expect_flag(3, "always2");
    // 4: invalid opcode
    @(negedge clk) mon.opcode_valid = 1'b0;
    expect_flag(4, "always1");
    // 5: new enable before the divide completed
    @(negedge clk) mon.div_en = 1'b1;
    @(negedge clk) mon.div_en = 1'b0;
    @(negedge clk) mon.div_en = 1'b1;
    @(negedge clk) mon.div_en = 1'b0;
    @(negedge clk) mon.div_done = 1'b1;
    @(negedge clk) mon.div_done = 1'b0;
    expect_flag(5, "window");
    // 6: acknowledge too short
    interrupt(2);
    expect_flag(6, "time");
    // 7: stack pointer past the top
    mon.sp = 8'h7F; cycles(1);
    mon.sp = 8'h80; cycles(1);
    mon.sp = 8'h40;
    expect_flag(7, "overflow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
