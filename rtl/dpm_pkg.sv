// Shared constants and types of the dynamic-power-management system.
//
// The PMU is driven by an 8-bit command: the upper nibble names a power
// domain, the lower nibble one of the predefined frequency levels. The
// level codes follow the rows of the measured frequency table: stopped,
// 1.2 kHz, 12 MHz and 48 MHz. Numbering the domains from 1 (so that
// domain 1 drives clock_pd1) and the level codes themselves are choices of
// this design.
package dpm_pkg;

  // Number of clock domains the PMU serves.
  localparam int unsigned NUM_DOMAINS = 3;
  // Number of frequency levels, including "stopped".
  localparam int unsigned NUM_LEVELS  = 4;

  typedef enum logic [1:0] {
    LVL_OFF    = 2'd0,   // clock gated, 0 Hz
    LVL_SLOW   = 2'd1,   // 1.2 kHz
    LVL_NORMAL = 2'd2,   // 12 MHz, the board's main frequency
    LVL_FAST   = 2'd3    // 48 MHz, the PLL output
  } level_e;

  // PMU command word: set_freq[7:4] = domain, set_freq[3:0] = level.
  typedef struct packed {
    logic [3:0] domain;
    logic [3:0] level;
  } pmu_cmd_t;

  // Build a command word.
  function automatic logic [7:0] pmu_cmd(input logic [3:0] domain, input level_e level);
    pmu_cmd_t c;
    c.domain = domain;
    c.level  = 4'(level);
    return c;
  endfunction

endpackage
