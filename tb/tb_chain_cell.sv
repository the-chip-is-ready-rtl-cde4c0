// Self-checking testbench of chain_cell.
//
// Drives fail, ei, esci, esclck and escen_n at random and compares eo and
// esco with a reference model of the flag after every clock edge: outside a
// scan a failure sets the flag and it stays set; during a scan (escen_n low)
// the flag loads esci at each esclck pulse and keeps its value otherwise; an
// asynchronous reset clears it. Also checks eo = ei | flag between edges.
module tb_chain_cell;
  localparam int N_CYC = 4000;

  logic clk = 1'b0, reset_n = 1'b0;
  logic fail = 1'b0, ei = 1'b0, esci = 1'b0, esclck = 1'b0, escen_n = 1'b1;
  logic eo, esco;
  int checks = 0, failures = 0;
  int n_set = 0, n_shift = 0, n_hold = 0;
  bit flag = 1'b0;

  chain_cell dut (.reset_n, .clk, .fail, .ei, .esci, .esclck, .escen_n, .eo, .esco);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_CYC + 100) @(posedge clk);
    failures++;
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

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < N_CYC; i++) begin
      @(negedge clk);
      fail    = ($urandom % 8) == 0;
      ei      = ($urandom % 4) == 0;
      esci    = 1'($urandom);
      escen_n = ($urandom % 3) != 0;
      esclck  = 1'($urandom);
      if (i % 97 == 50) begin
        // asynchronous reset in the middle of the low clock phase
        reset_n = 1'b0;
        #1 check(esco == 1'b0, "asynchronous reset did not clear the flag");
        flag = 1'b0;
        #1 reset_n = 1'b1;
      end
      #1 check(eo == (ei | flag), "eo is not ei | flag");
      @(posedge clk);
      if (!escen_n) begin
        if (esclck) begin flag = esci; n_shift++; end
        else n_hold++;
      end else if (fail) begin
        if (!flag) n_set++;
        flag = 1'b1;
      end
      #1;
      check(esco == flag, "esco differs from the reference flag");
    end
    check(n_set > 10 && n_shift > 10 && n_hold > 10, "a mode was not exercised");
    $display("set %0d shift %0d hold %0d", n_set, n_shift, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
