// Self-checking testbench of assert_frame.
//
// Drives random stimuli biased so that the property fails now and then,
// computes the expected error flag with an independent reference model of
// the property, and compares it with eo and esco after every clock edge. A
// short reset every RST_EVERY cycles clears the flag so that many separate
// failures are observed. It then checks the chain behaviour: ei is ORed into
// eo, and with escen_n low the flag shifts esci to esco once per esclck
// pulse and ignores failures. Counts that failures and passes were both seen.
module tb_assert_frame;
  localparam int N_CYC     = 3000;
  localparam int RST_EVERY = 23;

  logic clk = 1'b0;
  logic reset_n = 1'b0;
  logic ei = 1'b0, esci = 1'b0, esclck = 1'b0, escen_n = 1'b1;
  logic eo, esco;
  logic start_event, test_expr;

  int checks = 0, failures = 0;
  int n_fail_events = 0, n_pass_periods = 0;
  bit exp_flag = 1'b0;
  bit period_failed = 1'b0;
  int cyc = 0;

  assert_frame #(.MIN_CKS(2), .MAX_CKS(5)) dut (.start_event, .test_expr, .reset_n, .clk, .ei, .esci, .esclck, .escen_n, .eo, .esco);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_CYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  bit prev_start, armed;
  int since;  // edges since the start edge
  function automatic void model_reset();
    prev_start = 1'b0; armed = 1'b0; since = 0;
  endfunction
  function automatic bit model_step();
    bit f = 1'b0;
    if (armed) begin
      since++;
      if (test_expr) begin
        f = since < 2;
        armed = 1'b0;
      end else if (since == 5) begin
        f = 1'b1;
        armed = 1'b0;
      end
    end else if (start_event && !prev_start) begin
      armed = 1'b1;
      since = 0;
    end
    prev_start = start_event;
    return f;
  endfunction

  initial begin
    bit f;
    start_event = 1'b0; test_expr = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    model_reset();
    for (cyc = 0; cyc < N_CYC; cyc++) begin
      @(negedge clk);
      if (cyc % RST_EVERY == RST_EVERY - 1) begin
        if (!period_failed) n_pass_periods++;
        period_failed = 1'b0;
        reset_n = 1'b0;
        #1;
        check(eo == 1'b0 && esco == 1'b0, "flag not cleared by reset");
        @(negedge clk) reset_n = 1'b1;
        model_reset();
        exp_flag = 1'b0;
      end
      start_event = ($urandom % 4) == 0;
      test_expr   = ($urandom % 4) == 0;
      @(posedge clk);
      f = model_step();
      if (f) begin
        if (!exp_flag) n_fail_events++;
        exp_flag = 1'b1;
        period_failed = 1'b1;
      end
      #1;
      check(eo == exp_flag, "eo differs from the reference");
      check(esco == exp_flag, "esco differs from the reference");
    end
    // ei is ORed into eo
    @(negedge clk) reset_n = 1'b0;
    @(negedge clk) reset_n = 1'b1; model_reset();
    ei = 1'b1; #1 check(eo == 1'b1, "ei not passed to eo");
    ei = 1'b0; #1 check(eo == 1'b0, "eo set without ei or error");
    // scan: escen_n low, esclck pulses shift esci into the flag
    escen_n = 1'b0;
    for (int i = 0; i < 16; i++) begin
      bit v;
      v = 1'($urandom);
      @(negedge clk) esci = v; esclck = 1'b1;
      start_event = 1'b1; test_expr = 1'b1;
      @(negedge clk) esclck = 1'b0;
      check(esco == v, "scan shift did not load esci");
      @(negedge clk);
      check(esco == v, "flag changed without esclck or by a failure during scan");
    end
    @(negedge clk) escen_n = 1'b1; esci = 1'b0;
    check(n_fail_events > 5, "too few property failures exercised");
    check(n_pass_periods > 5, "too few failure-free periods exercised");
    $display("failures seen %0d, clean periods %0d", n_fail_events, n_pass_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
