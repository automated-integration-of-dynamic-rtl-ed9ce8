// Power-management unit (PMU): clock gating and frequency scaling for three
// clock domains.
//
// One master clock (48 MHz, the PLL output) feeds the PMU. Each non-zero
// frequency level has a free-running divider that produces a one-cycle
// tick every CLOCK_HZ/LEVEL_HZ master cycles (every cycle for 48 MHz, every
// 4th for 12 MHz, every 40000th for 1.2 kHz). Each domain selects the tick
// of its current level; the selection is retimed on the falling master-clock
// edge and ANDed with the master clock, which is the behaviour of a
// latch-based clock-gating cell: the domain clock is a train of full
// master-clock high phases at the level's rate, never a shortened pulse, and
// it stays low when the level is LVL_OFF (clock stopped).
//
// Control, in the master-clock domain:
//   * cs high for one cycle applies set_freq: set_freq[7:4] selects the
//     domain (1..3 for clock_pd1..clock_pd3), set_freq[3:0] the level
//     (0 stopped, 1 1.2 kHz, 2 12 MHz, 3 48 MHz). Other domain or level
//     numbers are ignored.
//   * power_mode passes a two-flop synchronizer; whenever its value changes,
//     the levels of all domains are loaded from row power_mode of
//     MODE_LEVELS. A cs command in the same cycle wins for its domain.
// A new level takes effect at that level's next tick, so the first pulse at
// the new rate follows within one period of the new rate. level_pd reports
// the current level of each domain.
//
// From the document: three domains, the 8-bit command with domain in the
// upper and level in the lower nibble, the set strobe, the port names and
// the measured frequencies 0, 1.2 kHz, 12 MHz and 48 MHz. This design's
// own choices: the level and domain numbering, deriving all clocks from one
// 48 MHz master by gating, reset to 12 MHz (the main frequency), and the
// power-mode table and its change-triggered application.
module pmu
  import dpm_pkg::*;
#(
  parameter int unsigned CLOCK_HZ = 48_000_000,
  parameter int unsigned LEVEL_HZ [NUM_LEVELS] = '{0, 1_200, 12_000_000, 48_000_000},
  parameter level_e      RESET_LEVEL = LVL_NORMAL,
  // MODE_LEVELS[mode][d] is the level of clock_pd(d+1) in that power mode.
  parameter level_e [3:0][NUM_DOMAINS-1:0] MODE_LEVELS = {
    {LVL_OFF,    LVL_OFF,    LVL_OFF   },   // mode 3: everything stopped
    {LVL_FAST,   LVL_FAST,   LVL_FAST  },   // mode 2: all at 48 MHz
    {LVL_OFF,    LVL_OFF,    LVL_NORMAL},   // mode 1: only pd1 running
    {LVL_NORMAL, LVL_NORMAL, LVL_NORMAL}    // mode 0: all at 12 MHz
  }
) (
  input  logic       clock,
  input  logic       rst_n,
  input  logic       cs,
  input  logic [7:0] set_freq,
  input  logic [1:0] power_mode,
  output logic       clock_pd1,
  output logic       clock_pd2,
  output logic       clock_pd3,
  output level_e [NUM_DOMAINS-1:0] level_pd
);

  // ---------------- per-level dividers ----------------
  logic [NUM_LEVELS-1:0] tick;

  assign tick[LVL_OFF] = 1'b0;

  for (genvar l = 1; l < NUM_LEVELS; l++) begin : g_div
    localparam int unsigned DIV = CLOCK_HZ / LEVEL_HZ[l];
    if (DIV <= 1) begin : g_full
      assign tick[l] = 1'b1;
    end else begin : g_cnt
      localparam int unsigned W = $clog2(DIV);
      logic [W-1:0] cnt;
      always_ff @(posedge clock or negedge rst_n) begin
        if (!rst_n)                   cnt <= '0;
        else if (cnt == W'(DIV - 1))  cnt <= '0;
        else                          cnt <= cnt + 1'b1;
      end
      assign tick[l] = cnt == '0;
    end
    initial assert (LEVEL_HZ[l] != 0 && CLOCK_HZ % LEVEL_HZ[l] == 0)
      else $error("pmu: level %0d frequency must divide CLOCK_HZ", l);
  end

  // ---------------- level registers ----------------
  pmu_cmd_t   cmd;
  logic [1:0] pm_sync [2];
  logic [1:0] pm_prev;

  assign cmd = pmu_cmd_t'(set_freq);

  always_ff @(posedge clock or negedge rst_n) begin
    if (!rst_n) begin
      pm_sync  <= '{default: '0};
      pm_prev  <= '0;
      level_pd <= {NUM_DOMAINS{RESET_LEVEL}};
    end else begin
      pm_sync <= '{power_mode, pm_sync[0]};
      pm_prev <= pm_sync[1];
      for (int d = 0; d < NUM_DOMAINS; d++) begin
        if (cs && int'(cmd.domain) == d + 1 && int'(cmd.level) < NUM_LEVELS)
          level_pd[d] <= level_e'(cmd.level[1:0]);
        else if (pm_sync[1] != pm_prev)
          level_pd[d] <= MODE_LEVELS[pm_sync[1]][d];
      end
    end
  end

  // ---------------- clock gating ----------------
  logic [NUM_DOMAINS-1:0] en_q;

  // Retimed on the falling edge: the enable only changes while the master
  // clock is low, so the AND below cannot glitch.
  always_ff @(negedge clock or negedge rst_n) begin
    if (!rst_n) en_q <= '0;
    else for (int d = 0; d < NUM_DOMAINS; d++) en_q[d] <= tick[level_pd[d]];
  end

  assign clock_pd1 = clock & en_q[0];
  assign clock_pd2 = clock & en_q[1];
  assign clock_pd3 = clock & en_q[2];

  initial assert (NUM_DOMAINS == 3) else $error("pmu: three domain clock outputs");

endmodule
