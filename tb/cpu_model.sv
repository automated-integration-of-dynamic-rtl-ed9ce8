// Behavioural stand-in for the 8-bit processor of the case-study system.
//
// It runs the demonstration program in its own clock domain (cpu_clk): it
// prints MESSAGE over the UART one character at a time, waiting DELAY of
// its own cycles between characters (a software delay loop, so the text
// comes out faster or slower as the PMU changes this domain's frequency).
// A received key '0'..'3' is a command to the PMU: it sets the processor's
// own domain (clock_pd2) to that frequency level (0 stopped, 1 1.2 kHz,
// 2 12 MHz, 3 48 MHz). Other keys are ignored. Each strobe is held back
// while the matching synchronizer is busy, and the two strobes never share
// a cycle because they share data_out. Counters report what it did.
//
// The program's behaviour (text over the UART, a key press changing the
// processor's own clock frequency) is that of the original demonstration;
// the message, the key codes, the delay and the pacing on the busy flags are
// this model's own. It is not a processor: it has no instruction set, no
// memory and no address bus.
module cpu_model
  import dpm_pkg::*;
#(
  parameter int unsigned DELAY   = 4200,
  parameter string       MESSAGE = "HELLO\r\n"
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_in,
  input  logic       rx_full,
  input  logic       tx_busy,
  input  logic       pmu_busy,
  output logic [7:0] data_out,
  output logic       tx_valid,
  output logic       pmu_changer,
  output int         chars_sent,
  output int         keys_seen,
  output int         pmu_commands,
  output logic [7:0] last_key
);

  int   delay_cnt;
  int   msg_idx;
  logic key_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out     <= '0;
      tx_valid     <= 1'b0;
      pmu_changer  <= 1'b0;
      chars_sent   <= 0;
      keys_seen    <= 0;
      pmu_commands <= 0;
      last_key     <= '0;
      delay_cnt    <= 0;
      msg_idx      <= 0;
      key_pending  <= 1'b0;
    end else begin
      tx_valid    <= 1'b0;
      pmu_changer <= 1'b0;
      if (delay_cnt != 0) delay_cnt <= delay_cnt - 1;
      if (rx_full) begin
        last_key    <= data_in;
        keys_seen   <= keys_seen + 1;
        key_pending <= data_in >= "0" && data_in <= "3";
      end else if (key_pending && !pmu_busy && !tx_valid) begin
        data_out     <= pmu_cmd(4'd2, level_e'(last_key[1:0]));
        pmu_changer  <= 1'b1;
        pmu_commands <= pmu_commands + 1;
        key_pending  <= 1'b0;
      end else if (delay_cnt == 0 && !tx_busy && !pmu_changer) begin
        data_out   <= MESSAGE[msg_idx];
        tx_valid   <= 1'b1;
        chars_sent <= chars_sent + 1;
        msg_idx    <= (msg_idx + 1 == MESSAGE.len()) ? 0 : msg_idx + 1;
        delay_cnt  <= DELAY;
      end
    end
  end

endmodule
