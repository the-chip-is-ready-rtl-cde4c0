// Self-checking testbench of alu_top_chain (and the alu_divide_chain inside).
//
// Plays legal divides and a valid opcode and checks that no flag is raised.
// Then it breaks each ALU property in turn, scans the four flags by hand
// (escen_n low, one esclck pulse per flag) and checks the scan order of the
// ALU hierarchy: 1 assert_uflow, 2 assert_frame, 3 assert_always2,
// 4 assert_always1. It also checks that ei entering the ALU reaches eo and
// that one shift loads esci into always1, the first checker of the chain.
module tb_alu_top_chain;
  localparam int N = 4;

  logic clk = 1'b0, reset_n = 1'b0;
  logic ei = 1'b0, esci = 1'b0, esclck = 1'b0, escen_n = 1'b1;
  logic eo, esco;
  logic opcode_valid, div_ok, div_en, div_done;
  logic [7:0] div_cnt;

  alu_top_chain dut (
    .reset_n, .clk, .opcode_valid, .div_ok, .div_en, .div_done, .div_cnt,
    .ei, .esci, .esclck, .escen_n, .eo, .esco
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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

  task automatic legal();
    opcode_valid = 1'b1;
    div_ok = 1'b1;
    div_en = 1'b0;
    div_done = 1'b0;
    div_cnt = 8'd4;
  endtask

  // Read n flags through esco; flag k is read after k-1 shifts.
  task automatic scan(input int n, output logic [7:0] bits);
    bits = '0;
    @(negedge clk) escen_n = 1'b0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      bits[k] = esco;
      esclck = 1'b1;
      @(negedge clk) esclck = 1'b0;
    end
    @(negedge clk) escen_n = 1'b1;
  endtask

  task automatic expect_seq(input int seq, input string name);
    logic [7:0] bits;
    @(negedge clk);
    legal();
    check(eo == 1'b1, {name, ": eo did not rise"});
    scan(N, bits);
    check(bits == 8'(1 << (seq - 1)), $sformatf("%s: flags %b, expected number %0d", name, bits[3:0], seq));
    #1 check(eo == 1'b0, {name, ": chain not empty"});
  endtask

  initial begin
    logic [7:0] bits;
    legal();
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) div_en = 1'b1;
      @(negedge clk) div_en = 1'b0;
      repeat (i % 6 + 1) @(negedge clk);
      div_done = 1'b1;
      @(negedge clk) div_done = 1'b0;
      div_cnt = 8'(1 + $urandom % 8);
    end
    @(negedge clk);
    check(eo == 1'b0, "flag raised during legal activity");

    @(negedge clk) div_cnt = 8'd1;
    @(negedge clk) div_cnt = 8'd0;
    expect_seq(1, "uflow");
    @(negedge clk) div_en = 1'b1;
    @(negedge clk) begin div_en = 1'b0; div_done = 1'b1; end
    expect_seq(2, "frame (too early)");
    @(negedge clk) div_ok = 1'b0;
    expect_seq(3, "always2");
    @(negedge clk) opcode_valid = 1'b0;
    expect_seq(4, "always1");

    // ei reaches eo through the whole hierarchy
    ei = 1'b1; #1 check(eo == 1'b1, "ei not forwarded to eo");
    ei = 1'b0; #1 check(eo == 1'b0, "eo high without error");
    // one shift loads esci into the first checker (always1, number 4)
    @(negedge clk) begin escen_n = 1'b0; esci = 1'b1; esclck = 1'b1; end
    @(negedge clk) begin esci = 1'b0; esclck = 1'b0; escen_n = 1'b1; end
    scan(N + 1, bits);
    check(bits[4:0] == 5'b01000, $sformatf("esci flag came out as %b", bits[4:0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
