// Self-checking testbench of assertion_processor.
//
// The processor scans a behavioural model of a chain of N = 6 error flags
// (eo = OR of the flags, esco = flag 1, one shift towards flag 1 per esclck
// pulse while escen_n is low, zeros shifted in). Each trial sets a random
// non-empty set of flags and checks: the scan gives exactly N esclck pulses
// and leaves the chain empty; error_no is the highest-numbered set flag;
// error_priority is the table entry of that number; the action (halt first,
// then reset, then interrupt) appears 2N+2 clocks after the first edge that
// sees eo; the reset pulse lasts RESET_CYCLES clocks; the interrupt stays up
// until irq_ack; halt stays until reset_n. Each action, the no-action case,
// multiple flags and an error arriving while the processor is busy are
// counted and must all occur.
module tb_assertion_processor;
  import ap_pkg::*;

  localparam int N  = 6;
  localparam int RC = 3;
  localparam int NW = $clog2(N + 1);
  // 1: halt, 2: halt+irq (halt wins), 3: reset, 4: irq,
  // 5: reset+irq (reset wins), 6: none
  localparam action_t [N:1] TABLE = {3'b000, 3'b110, 3'b100, 3'b010, 3'b101, 3'b001};

  logic clk = 1'b0, reset_n = 1'b0;
  logic eo, esci, escen_n, esclck, error_valid, halt, chip_reset_n, sw_irq;
  logic irq_ack = 1'b0;
  logic [NW-1:0] error_no;
  action_t error_priority;

  // behavioural chain, flags[1] is nearest to the processor
  logic [N:1] flags = '0;
  int esclck_pulses = 0;

  assign eo   = |flags;
  assign esci = flags[1];

  always @(posedge clk) begin
    if (!escen_n && esclck) begin
      flags <= {1'b0, flags[N:2]};
      esclck_pulses <= esclck_pulses + 1;
    end else if (!chip_reset_n) begin
      flags <= '0;
    end
  end

  assertion_processor #(.N_ASSERT(N), .RESET_CYCLES(RC), .ACTION_TABLE(TABLE)) dut (
    .clk, .reset_n, .eo, .esci, .escen_n, .esclck, .error_no, .error_priority,
    .error_valid, .halt, .chip_reset_n, .sw_irq, .irq_ack
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_halt = 0, n_reset = 0, n_irq = 0, n_none = 0, n_multi = 0, n_busy = 0;

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
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic int highest(input logic [N:1] f);
    for (int k = N; k >= 1; k--) if (f[k]) return k;
    return 0;
  endfunction

  task automatic do_reset();
    @(negedge clk) reset_n = 1'b0;
    flags = '0;
    @(negedge clk) reset_n = 1'b1;
  endtask

  // One trial with the given flags; checks detection, timing and action.
  task automatic trial(input logic [N:1] f, input bit busy_error);
    int exp_no, edges, p0;
    action_t act;
    bit acted;
    exp_no = highest(f);
    act = TABLE[exp_no];
    p0 = esclck_pulses;
    @(negedge clk) flags = f;
    if ($countones(f) > 1) n_multi++;
    edges = 0;
    acted = 1'b0;
    while (!acted && edges < 4 * N + 10) begin
      @(posedge clk);
      edges++;
      #1;
      acted = error_valid || halt || !chip_reset_n || sw_irq;
    end
    check(edges == 2 * N + 2, $sformatf("action after %0d clocks, expected %0d", edges, 2 * N + 2));
    check(error_valid, "error_valid not set");
    check(int'(error_no) == exp_no, $sformatf("error_no %0d, expected %0d", error_no, exp_no));
    check(error_priority == act, "error_priority is not the table entry");
    check(esclck_pulses - p0 == N, $sformatf("%0d esclck pulses, expected %0d", esclck_pulses - p0, N));
    check(flags == '0 && escen_n, "chain not empty or scan still enabled after the scan");
    if (act[0]) begin
      n_halt++;
      check(halt && chip_reset_n && !sw_irq, "halt expected");
      repeat (20) @(posedge clk);
      #1 check(halt, "halt did not persist");
      do_reset();
      #1 check(!halt, "halt not cleared by reset_n");
    end else if (act[1]) begin
      n_reset++;
      check(!chip_reset_n && !halt && !sw_irq, "hardware reset expected");
      edges = 0;
      while (!chip_reset_n && edges < 50) begin
        @(posedge clk);
        edges++;
        #1;
      end
      check(edges == RC, $sformatf("reset pulse of %0d clocks, expected %0d", edges, RC));
    end else if (act[2]) begin
      n_irq++;
      check(sw_irq && !halt && chip_reset_n, "software interrupt expected");
      if (busy_error) begin
        // a new failure while the interrupt is pending waits for the ack
        @(negedge clk) flags[2] = 1'b1;
        n_busy++;
      end
      repeat (7) @(posedge clk);
      #1 check(sw_irq, "sw_irq dropped before irq_ack");
      check(escen_n, "scan started while the interrupt was pending");
      @(negedge clk) irq_ack = 1'b1;
      @(negedge clk) irq_ack = 1'b0;
      check(!sw_irq, "sw_irq not cleared by irq_ack");
      if (busy_error) begin
        // flag 2 -> halt after a second scan
        edges = 0;
        while (!halt && edges < 4 * N + 10) begin
          @(posedge clk);
          edges++;
          #1;
        end
        check(halt && int'(error_no) == 2, "pending failure not handled after the ack");
        do_reset();
      end
    end else begin
      n_none++;
      check(!halt && chip_reset_n && !sw_irq, "no action expected");
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    logic [N:1] f;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(escen_n && !esclck && !error_valid && !halt && chip_reset_n && !sw_irq,
             "outputs not idle after reset");
    // every single flag once
    for (int k = 1; k <= N; k++) trial(N'(1) << (k - 1), 1'b0);
    // interrupt with a failure arriving while busy
    trial(N'(1) << 3, 1'b1);
    // random flag sets
    for (int t = 0; t < 60; t++) begin
      f = N'($urandom);
      if (f == '0) f = N'(1) << ($urandom % N);
      trial(f, 1'b0);
    end
    check(n_halt > 0 && n_reset > 0 && n_irq > 0 && n_none > 0 && n_multi > 0 && n_busy > 0,
          "an action or case was never exercised");
    $display("halt %0d reset %0d irq %0d none %0d multi %0d busy %0d",
             n_halt, n_reset, n_irq, n_none, n_multi, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
