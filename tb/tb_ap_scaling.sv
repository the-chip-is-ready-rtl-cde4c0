// Assertion processors scanning chains of 5, 8, 11, 32, 64, 128, 256 and 512
// checkers: the chain sizes of the I2C controller (5) and the 8051 core (11)
// and the sizes of the processor area sweep. For each size a random
// assertion fails (sometimes two); the processor must report the higher
// number, halt, and do so 2N+2 clocks after eo rose; the chain must be empty
// afterwards. Runs several trials per size.
module tb_ap_scaling;
  import ap_pkg::*;

  localparam int NS = 8;
  localparam int SIZES [NS] = '{5, 8, 11, 32, 64, 128, 256, 512};
  localparam int TRIALS = 6;

  logic clk = 1'b0, reset_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  logic [NS-1:0] eo_v, halt_v, valid_v;
  int            no_v [NS];
  int            fail_at [NS];   // single failing assertion, 0 = none
  int            fail_at2 [NS];  // second failing assertion, 0 = none

  for (genvar i = 0; i < NS; i++) begin : g_size
    localparam int N = SIZES[i];
    localparam int NW = $clog2(N + 1);
    logic [N:1] test_vec;
    logic esclck, escen_n, eo, esco, halt, chip_reset_n, sw_irq, error_valid;
    logic [NW-1:0] error_no;
    action_t error_priority;

    always_comb begin
      test_vec = '1;
      if (fail_at[i] != 0)  test_vec[fail_at[i]]  = 1'b0;
      if (fail_at2[i] != 0) test_vec[fail_at2[i]] = 1'b0;
    end

    always_chain #(.N(N)) u_chain (
      .reset_n, .clk, .test_vec, .esclck, .escen_n, .eo, .esco
    );

    assertion_processor #(.N_ASSERT(N)) u_ap (
      .clk, .reset_n, .eo, .esci(esco), .escen_n, .esclck, .error_no,
      .error_priority, .error_valid, .halt, .chip_reset_n, .sw_irq,
      .irq_ack(1'b0)
    );

    assign eo_v[i]    = eo;
    assign halt_v[i]  = halt;
    assign valid_v[i] = error_valid;
    assign no_v[i]    = int'(error_no);
  end

  initial begin
    foreach (fail_at[i]) begin fail_at[i] = 0; fail_at2[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      for (int t = 0; t < TRIALS; t++) begin
        int a, b, exp_no, edges;
        a = 1 + int'($urandom % SIZES[i]);
        b = (t % 2 == 1) ? 1 + int'($urandom % SIZES[i]) : 0;
        exp_no = (a > b) ? a : b;
        @(negedge clk) begin fail_at[i] = a; fail_at2[i] = b; end
        @(negedge clk) begin fail_at[i] = 0; fail_at2[i] = 0; end
        // eo rose at the edge between the two negedges above; count from it
        edges = 0;
        while (!halt_v[i] && edges < 2 * SIZES[i] + 20) begin
          @(posedge clk);
          edges++;
          #1;
        end
        check(edges == 2 * SIZES[i] + 2,
              $sformatf("N=%0d: halted %0d clocks after eo, expected %0d", SIZES[i], edges, 2 * SIZES[i] + 2));
        check(valid_v[i] && no_v[i] == exp_no,
              $sformatf("N=%0d: error_no %0d, expected %0d", SIZES[i], no_v[i], exp_no));
        check(!eo_v[i], $sformatf("N=%0d: chain not empty after the scan", SIZES[i]));
        @(negedge clk) reset_n = 1'b0;
        @(negedge clk) reset_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
