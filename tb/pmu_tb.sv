// Self-checking testbench of the power-management unit, at its default
// parameters (48 MHz master clock, levels 0 / 1.2 kHz / 12 MHz / 48 MHz).
//
// The bench counts the pulses of each domain clock over windows of master
// cycles and compares them with CLOCK_HZ / level frequency worked out here:
// after reset all three domains run at 12 MHz (one pulse per 4 master
// cycles); set_freq commands then move single domains to 48 MHz, 1.2 kHz
// (one pulse per 40000 cycles) and stopped; commands naming a missing domain
// or level are ignored; each power mode loads its row of levels. Monitors
// check that a domain clock only rises and falls together with the master
// clock (no shortened or glitch pulses), and that the first pulse at a new
// rate comes within one period of the new rate after the command.
module pmu_tb;
  import dpm_pkg::*;

  logic       clock = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
  logic       cs = 1'b0;
  logic [7:0] set_freq = '0;
  logic [1:0] power_mode = '0;
  logic       clock_pd1, clock_pd2, clock_pd3;
  level_e [NUM_DOMAINS-1:0] level_pd;
  int checks = 0, failures = 0;
  int cnt [3] = '{0, 0, 0};
  int glitches = 0;

  always #10 clock = ~clock;   // time unit is arbitrary; only cycles matter

  pmu dut (.*);

  always @(posedge clock_pd1) begin cnt[0]++; if (!clock) glitches++; end
  always @(posedge clock_pd2) begin cnt[1]++; if (!clock) glitches++; end
  always @(posedge clock_pd3) begin cnt[2]++; if (!clock) glitches++; end
  always @(negedge clock_pd1) if (clock) glitches++;
  always @(negedge clock_pd2) if (clock) glitches++;
  always @(negedge clock_pd3) if (clock) glitches++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected master cycles per pulse of a level; 0 = stopped.
  function automatic int period_of(input level_e l);
    case (l)
      LVL_SLOW:   return 48_000_000 / 1_200;
      LVL_NORMAL: return 48_000_000 / 12_000_000;
      LVL_FAST:   return 1;
      default:    return 0;
    endcase
  endfunction

  // Count pulses over n master cycles and compare with the expected levels.
  task automatic measure(input level_e e1, input level_e e2, input level_e e3, input int n,
                         input string tag);
    level_e exp_l [3];
    int c0 [3];
    exp_l = '{e1, e2, e3};
    c0 = cnt;
    repeat (n) @(posedge clock);
    #1;
    for (int d = 0; d < 3; d++) begin
      int p, got, lo, hi;
      p   = period_of(exp_l[d]);
      got = cnt[d] - c0[d];
      lo  = (p == 0) ? 0 : n / p - 1;
      hi  = (p == 0) ? 0 : n / p + 1;
      check(got >= lo && got <= hi,
            $sformatf("%s: pd%0d %0d pulses in %0d cycles, expected %0d..%0d", tag, d + 1, got, n, lo, hi));
      check(level_pd[d] == exp_l[d], $sformatf("%s: pd%0d level %0d", tag, d + 1, level_pd[d]));
    end
  endtask

  task automatic command(input logic [3:0] dom, input logic [3:0] lvl);
    @(negedge clock);
    cs = 1'b1; set_freq = {dom, lvl};
    @(negedge clock);
    cs = 1'b0; set_freq = 8'($urandom);
  endtask

  task automatic set_mode(input logic [1:0] m);
    @(negedge clock);
    power_mode = m;
    repeat (4) @(negedge clock);   // two-flop synchronizer plus edge detect
  endtask

  initial begin
    repeat (3) @(negedge clock);
    check(cnt[0] == 0 && cnt[1] == 0 && cnt[2] == 0, "no clocks in reset");
    rst_n = 1'b1;
    measure(LVL_NORMAL, LVL_NORMAL, LVL_NORMAL, 400, "after reset");

    command(4'd1, 4'(LVL_FAST));
    measure(LVL_FAST, LVL_NORMAL, LVL_NORMAL, 400, "pd1 fast");
    command(4'd3, 4'(LVL_OFF));
    repeat (4) @(negedge clock);
    measure(LVL_FAST, LVL_NORMAL, LVL_OFF, 400, "pd3 off");

    // pd2 to 1.2 kHz: first pulse within one slow period, then one per 40000
    begin
      int c0, waited;
      command(4'd2, 4'(LVL_SLOW));
      repeat (2) @(negedge clock);
      c0 = cnt[1]; waited = 0;
      while (cnt[1] == c0 && waited < 50000) begin @(posedge clock); waited++; end
      check(waited <= 40000, $sformatf("first slow pulse after %0d cycles", waited));
      c0 = cnt[1]; waited = 0;
      while (cnt[1] == c0 && waited < 50000) begin @(posedge clock); waited++; end
      check(waited == 40000, $sformatf("slow period %0d cycles", waited));
    end
    measure(LVL_FAST, LVL_SLOW, LVL_OFF, 120000, "pd2 slow");

    // ignored commands: domain 0, domain 4, level 4, level 15
    command(4'd0, 4'(LVL_OFF));
    command(4'd4, 4'(LVL_OFF));
    command(4'd1, 4'd4);
    command(4'd1, 4'd15);
    measure(LVL_FAST, LVL_SLOW, LVL_OFF, 400, "ignored commands");

    command(4'd2, 4'(LVL_NORMAL));
    command(4'd3, 4'(LVL_NORMAL));
    repeat (4) @(negedge clock);
    measure(LVL_FAST, LVL_NORMAL, LVL_NORMAL, 400, "back to normal");

    // power modes
    set_mode(2'd2); measure(LVL_FAST,   LVL_FAST,   LVL_FAST,   400, "mode 2");
    set_mode(2'd1); measure(LVL_NORMAL, LVL_OFF,    LVL_OFF,    400, "mode 1");
    set_mode(2'd3); measure(LVL_OFF,    LVL_OFF,    LVL_OFF,    400, "mode 3");
    set_mode(2'd0); measure(LVL_NORMAL, LVL_NORMAL, LVL_NORMAL, 400, "mode 0");
    // a command after a mode overrides that domain only
    command(4'd3, 4'(LVL_FAST));
    measure(LVL_NORMAL, LVL_NORMAL, LVL_FAST, 400, "command after mode");

    // reset returns everything to 12 MHz
    @(negedge clock); rst_n = 1'b0;
    @(negedge clock); rst_n = 1'b1;
    measure(LVL_NORMAL, LVL_NORMAL, LVL_NORMAL, 400, "second reset");

    check(glitches == 0, $sformatf("%0d domain-clock edges not aligned with the master clock", glitches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
