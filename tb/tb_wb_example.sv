// Self-checking testbench of wb_example.
//
// Applies all eight input combinations many times in random order and
// checks the registered output against the truth table d = (a | b) & (a & c),
// two clock edges after the inputs were applied. It also checks the
// white-box assertion: the flag must be raised exactly when a vector with
// both internal nets high (a = 1 and c = 1) has been sampled, and must stay
// clear for all other vectors. The flag is read on eo and esco and cleared
// with a scan (escen_n low, one esclck pulse shifting in esci = 0).
module tb_wb_example;
  logic clk = 1'b0, reset_n = 1'b0;
  logic a = 1'b0, b = 1'b0, c = 1'b0;
  logic d_q, eo, esco;
  logic esclck = 1'b0, escen_n = 1'b1;

  wb_example dut (
    .reset_n, .clk, .a, .b, .c, .d_q,
    .ei(1'b0), .esci(1'b0), .esclck, .escen_n, .eo, .esco
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_assert = 0, n_quiet = 0;

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

  // truth table of the example, row index {a, b, c}
  localparam bit [7:0] D_TABLE = 8'b1010_0000;

  initial begin
    bit [2:0] v;
    bit exp_flag = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      v = 3'($urandom);
      @(negedge clk) {a, b, c} = v;
      @(posedge clk);  // inputs captured
      @(posedge clk);  // logic result captured
      #1;
      check(d_q == D_TABLE[v], $sformatf("d for abc=%b", v));
      exp_flag = v[2] && v[0];
      check(eo == exp_flag && esco == exp_flag, $sformatf("assertion flag for abc=%b", v));
      if (exp_flag) n_assert++; else n_quiet++;
      // clear the flag by shifting a zero in
      @(negedge clk) begin {a, b, c} = 3'b000; escen_n = 1'b0; esclck = 1'b1; end
      @(negedge clk) begin escen_n = 1'b1; esclck = 1'b0; end
      check(eo == 1'b0, "flag not cleared by the scan");
    end
    check(n_assert > 20 && n_quiet > 20, "assertion cases not both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
