// Assertion processor: finds out which assertion of a chain has failed and
// reacts to it.
//
// All assertion checkers of a chip are daisy-chained (see chain_cell). Their
// error chain ends in "eo", which is high when any checker holds an error;
// their error scan chain ends in "esci" here. The processor has three parts:
//  1. Scan detection. When eo goes high the processor pulls escen_n low and
//     reads the chain one flag at a time: it samples esci, counts the flag,
//     and gives one esclck pulse to shift the next flag into place. Flag k
//     read (k = 1 for the checker nearest to the processor) belongs to
//     assertion number k; if it is set, error_no becomes k. After N_ASSERT
//     flags escen_n returns high; the chain has been shifted empty. If
//     several flags were set, the last one read (highest number) is kept.
//  2. Priority encoding. ACTION_TABLE gives each assertion number a 3-bit
//     action vector (ap_pkg::action_t), typically derived from the
//     assertion's severity level.
//  3. Error handling. The action is decoded with halt first, then hardware
//     reset, then software interrupt: halt sets "halt" until reset_n; reset
//     drives chip_reset_n low for RESET_CYCLES clocks and then resumes
//     monitoring; the interrupt holds sw_irq high until irq_ack. An all-zero
//     action only reports error_no.
//
// Timing: esclck and escen_n are registered. Reading N_ASSERT flags takes
// 2*N_ASSERT clocks (sample, then shift), plus one clock to start and one to
// decode, so an error found by an idle processor is acted on
// 2*N_ASSERT + 2 clocks after eo rose. error_no and error_priority stay
// valid (error_valid high) from the decode until the next scan starts.
// The three parts, the counting scan and the halt / reset / interrupt
// decoder follow the source; the handshake with software (irq_ack), the
// reset pulse length and the handling of a scan that finds no flag are this
// design's choices. reset_n is asynchronous and active low and must not be
// driven by chip_reset_n.
module assertion_processor #(
  parameter int unsigned N_ASSERT     = 4,
  parameter int unsigned RESET_CYCLES = 4,
  parameter ap_pkg::action_t [N_ASSERT:1] ACTION_TABLE = {N_ASSERT{ap_pkg::ACT_HALT}},
  localparam int unsigned NW = $clog2(N_ASSERT + 1)
) (
  input  logic            clk,
  input  logic            reset_n,
  // assertion chain
  input  logic            eo,            // error chain output of the last checker
  input  logic            esci,          // error scan chain output of the last checker
  output logic            escen_n,       // error scan enable, active low
  output logic            esclck,        // error scan clock pulses
  // report
  output logic [NW-1:0]   error_no,      // number of the failing assertion
  output ap_pkg::action_t error_priority,// its action vector
  output logic            error_valid,
  // actions
  output logic            halt,
  output logic            chip_reset_n,
  output logic            sw_irq,
  input  logic            irq_ack
);

  typedef enum logic [2:0] {
    S_IDLE, S_SAMPLE, S_SHIFT, S_DECODE, S_RESET, S_IRQ, S_HALT
  } state_t;

  localparam int unsigned RW = $clog2(RESET_CYCLES + 1);

  state_t        state_q;
  logic [NW-1:0] count_q;
  logic [RW-1:0] rst_cnt_q;

  // Priority encoding of the error condition.
  function automatic ap_pkg::action_t encode(logic [NW-1:0] num);
    if (num == '0) return ap_pkg::ACT_NONE;
    return ACTION_TABLE[num];
  endfunction

  assign error_priority = encode(error_no);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state_q      <= S_IDLE;
      count_q      <= '0;
      rst_cnt_q    <= '0;
      escen_n      <= 1'b1;
      esclck       <= 1'b0;
      error_no     <= '0;
      error_valid  <= 1'b0;
      halt         <= 1'b0;
      chip_reset_n <= 1'b1;
      sw_irq       <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (eo) begin
            escen_n     <= 1'b0;
            count_q     <= '0;
            error_no    <= '0;
            error_valid <= 1'b0;
            state_q     <= S_SAMPLE;
          end
        end
        // Scan detection: read one flag, then shift the next one in.
        S_SAMPLE: begin
          count_q <= count_q + 1'b1;
          if (esci) error_no <= count_q + 1'b1;
          esclck  <= 1'b1;
          state_q <= S_SHIFT;
        end
        S_SHIFT: begin
          esclck <= 1'b0;
          if (count_q == NW'(N_ASSERT)) begin
            escen_n <= 1'b1;
            state_q <= S_DECODE;
          end else begin
            state_q <= S_SAMPLE;
          end
        end
        // Error correction, halt first, then reset, then interrupt.
        S_DECODE: begin
          error_valid <= (error_no != '0);
          priority casez (error_priority)
            3'b??1: begin
              halt    <= 1'b1;
              state_q <= S_HALT;
            end
            3'b?1?: begin
              chip_reset_n <= 1'b0;
              rst_cnt_q    <= RW'(RESET_CYCLES - 1);
              state_q      <= S_RESET;
            end
            3'b1??: begin
              sw_irq  <= 1'b1;
              state_q <= S_IRQ;
            end
            default: state_q <= S_IDLE;
          endcase
        end
        S_RESET: begin
          if (rst_cnt_q == '0) begin
            chip_reset_n <= 1'b1;
            state_q      <= S_IDLE;
          end else begin
            rst_cnt_q <= rst_cnt_q - 1'b1;
          end
        end
        S_IRQ: begin
          if (irq_ack) begin
            sw_irq  <= 1'b0;
            state_q <= S_IDLE;
          end
        end
        S_HALT: ;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Scan protocol: the scan clock only pulses while the scan is enabled.
  a_esclck_in_scan: assert property (@(posedge clk) disable iff (!reset_n)
    esclck |-> !escen_n);
  // A scan always reads exactly N_ASSERT flags.
  a_scan_length: assert property (@(posedge clk) disable iff (!reset_n)
    (state_q == S_SHIFT && count_q == NW'(N_ASSERT)) |=> escen_n);

endmodule
