// Case-study system with dynamic power management on a small FPGA.
//
// The system is split into clock domains that the PMU clocks separately:
// the UART runs on clock_pd1, the processor (with its memory) on
// clock_pd2, and clock_pd3 is a third PMU domain with no load in this
// system, brought out as a port. All of them are gated from the 48 MHz
// master clock. The processor is an existing 8-bit core that is not part of
// this RTL: its clock and its UART/PMU signals are ports of this module.
//
// Every signal between two clock domains goes through a synchronizer:
//   * sync_tx  (synchronizer_bus): processor -> UART. cpu_tx_valid with
//     cpu_data_out becomes the UART's transmit strobe and tx_byte.
//   * sync_rx  (synchronizer): UART -> processor. The UART's received
//     event becomes cpu_rx_full; the received byte itself (cpu_data_in) is
//     taken straight from the UART, which holds it stable for a whole
//     character after the event.
//   * sync_pmu (synchronizer_bus): processor -> PMU. cpu_pmu_changer with
//     cpu_data_out becomes the PMU's cs and set_freq, so the program can
//     change the frequency of any domain, its own included.
// The busy outputs of the two processor-side synchronizers are ports, so the
// processor can wait before offering the next word. power_mode goes to the
// PMU, which synchronizes it itself. Reset is one asynchronous active-low
// input for every block.
//
// From the document: the blocks, their port names, the split into a UART
// and a processor domain, the synchronizers on every crossing and the extra
// one from processor to PMU, and the CPU belonging to clock_pd2. The
// assignment of the UART to clock_pd1, the choice of which crossing uses
// which synchronizer kind, the busy ports and the serial pins are this
// design's own.
module dpm_system
  import dpm_pkg::*;
(
  input  logic       clock,            // 48 MHz master clock (PLL output)
  input  logic       rst_n,
  input  logic [1:0] power_mode,
  // serial line
  input  logic       uart_rxd,
  output logic       uart_txd,
  // processor domain (clock_pd2) interface
  output logic       cpu_clk,
  input  logic [7:0] cpu_data_out,
  input  logic       cpu_tx_valid,
  input  logic       cpu_pmu_changer,
  output logic [7:0] cpu_data_in,
  output logic       cpu_rx_full,
  output logic       cpu_tx_busy,      // sync_tx still carrying a byte
  output logic       cpu_pmu_busy,     // sync_pmu still carrying a command
  // unused third domain and status
  output logic       clock_pd3,
  output level_e [NUM_DOMAINS-1:0] level_pd,
  output logic       uart_tx_busy,
  output logic       rx_event_busy     // sync_rx still carrying a received event
);

  logic       clock_pd1, clock_pd2;
  logic       pmu_cs;
  logic [7:0] pmu_set_freq;
  logic       uart_transmit;
  logic [7:0] uart_tx_byte;
  logic       uart_received;

  pmu u_pmu (
    .clock      (clock),
    .rst_n      (rst_n),
    .cs         (pmu_cs),
    .set_freq   (pmu_set_freq),
    .power_mode (power_mode),
    .clock_pd1  (clock_pd1),
    .clock_pd2  (clock_pd2),
    .clock_pd3  (clock_pd3),
    .level_pd   (level_pd)
  );

  assign cpu_clk = clock_pd2;

  uart u_uart (
    .clk      (clock_pd1),
    .rst_n    (rst_n),
    .transmit (uart_transmit),
    .tx_byte  (uart_tx_byte),
    .received (uart_received),
    .rx_byte  (cpu_data_in),
    .tx_busy  (uart_tx_busy),
    .rxd      (uart_rxd),
    .txd      (uart_txd)
  );

  synchronizer_bus #(.WIDTH(8)) sync_tx (
    .clk_a     (clock_pd2),
    .clk_b     (clock_pd1),
    .rst_n     (rst_n),
    .clk_a_in  (cpu_tx_valid),
    .bus_in    (cpu_data_out),
    .busy      (cpu_tx_busy),
    .clk_b_out (uart_transmit),
    .bus_out   (uart_tx_byte)
  );

  // Nothing waits on this one: a new byte cannot arrive before the event
  // of the previous one has crossed, as long as the processor domain runs.
  synchronizer sync_rx (
    .clk_a     (clock_pd1),
    .clk_b     (clock_pd2),
    .rst_n     (rst_n),
    .clk_a_in  (uart_received),
    .busy      (rx_event_busy),
    .clk_b_out (cpu_rx_full)
  );

  synchronizer_bus #(.WIDTH(8)) sync_pmu (
    .clk_a     (clock_pd2),
    .clk_b     (clock),
    .rst_n     (rst_n),
    .clk_a_in  (cpu_pmu_changer),
    .bus_in    (cpu_data_out),
    .busy      (cpu_pmu_busy),
    .clk_b_out (pmu_cs),
    .bus_out   (pmu_set_freq)
  );

endmodule
