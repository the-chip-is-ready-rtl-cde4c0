// Self-checking testbench of i2c_assert_chain.
//
// Walks the three state registers through random one-hot states with legal
// read/write commands and a correct interrupt, and checks that no flag is
// raised. Then it breaks each of the five properties in turn (interrupt
// check false, read and write together, an invalid state in each of the
// three state registers: no bit or two bits), scans the chain by hand and
// checks that only the flag of the expected sequence number is set:
// 1 command sequencer, 2 bit controller, 3 byte controller, 4 read/write,
// 5 interrupt. Also checks that several simultaneous failures are all found.
module tb_i2c_assert_chain;
  import i2c_pkg::*;

  localparam int N = I2C_N;

  logic clk = 1'b0, reset_n = 1'b0;
  logic esclck = 1'b0, escen_n = 1'b1;
  logic eo, esco;
  i2c_mon_t mon;

  i2c_assert_chain dut (
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

  task automatic legal_mon();
    mon.irq_ok   = 1'b1;
    mon.rd       = 1'b0;
    mon.wr       = 1'b0;
    case ($urandom % 3)
      0: mon.rd = 1'b1;
      1: mon.wr = 1'b1;
      default: ;
    endcase
    mon.byte_fsm = 6'b1 << ($urandom % 6);
    mon.bit_fsm  = 5'b1 << ($urandom % 5);
    mon.cmd_fsm  = 4'b1 << ($urandom % 4);
  endtask

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

  task automatic expect_flags(input logic [N:1] exp, input string name);
    logic [N:1] bits;
    @(negedge clk);
    check(eo == 1'b1, {name, ": eo did not rise"});
    legal_mon();
    scan(bits);
    check(bits == exp, $sformatf("%s: scanned flags %b, expected %b", name, bits, exp));
    #1 check(eo == 1'b0, {name, ": chain not empty after the scan"});
  endtask

  initial begin
    logic [N:1] bits;
    legal_mon();
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) legal_mon();
    end
    @(negedge clk);
    check(eo == 1'b0, "flag raised during legal activity");
    scan(bits);
    check(bits == '0, "flags set after legal activity");

    @(negedge clk) mon.irq_ok = 1'b0;
    expect_flags(5'b10000, "interrupt");
    @(negedge clk) begin mon.rd = 1'b1; mon.wr = 1'b1; end
    expect_flags(5'b01000, "read/write");
    @(negedge clk) mon.byte_fsm = 6'b000000;
    expect_flags(5'b00100, "byte state empty");
    @(negedge clk) mon.byte_fsm = 6'b100100;
    expect_flags(5'b00100, "byte state two bits");
    @(negedge clk) mon.bit_fsm = 5'b00011;
    expect_flags(5'b00010, "bit state");
    @(negedge clk) mon.cmd_fsm = 4'b0000;
    expect_flags(5'b00001, "command state");
    @(negedge clk) begin mon.cmd_fsm = 4'b1111; mon.irq_ok = 1'b0; end
    expect_flags(5'b10001, "two failures");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
