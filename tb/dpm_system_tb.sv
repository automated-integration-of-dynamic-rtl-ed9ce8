// End-to-end testbench of the case-study system, at the default sizes.
//
// A behavioural processor (cpu_model) is clocked by the system's processor
// clock and runs the demonstration program: it prints "HELLO\r\n" over the
// UART and turns a received key '0'..'3' into a PMU command that sets its
// own domain to that frequency level. The bench plays the terminal on the
// other end of the serial line: it decodes uart_txd with the nominal bit
// time (104 UART cycles of 4 master cycles each) and types keys on
// uart_rxd. It checks
//   * the text arrives intact, character by character;
//   * the character interval is the program's delay loop in processor
//     cycles, so it shrinks four times when the processor domain goes from
//     12 MHz to 48 MHz (the visible speed-up of the demonstration);
//   * keys reach the processor through the receive synchronizer, commands
//     reach the PMU through the PMU synchronizer, and the processor clock
//     then runs at 48 MHz, 1.2 kHz, 12 MHz or stops, with the expected
//     period in master cycles;
//   * a key that is not a command changes nothing;
//   * power modes switch all domains at once, revive the stopped processor
//     domain and gate the unused third domain.
// Each mechanism is counted; one that never happened is a failure.
// The scenario follows the original demonstration (text printed while a key
// changes the processor clock); the key sequence and the power-mode steps
// are this bench's own. The top runs with all its defaults.
module dpm_system_tb;
  import dpm_pkg::*;

  localparam int unsigned BIT_CYC = 104 * 4;   // master cycles per bit at 12 MHz UART
  localparam int unsigned DELAY   = 4200;
  localparam longint      SPACE_12 = 64'(DELAY + 1) * 64'd4;   // char spacing, processor at 12 MHz
  localparam longint      SPACE_48 = 64'(DELAY + 1);           // char spacing, processor at 48 MHz

  logic       clock = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
  logic [1:0] power_mode = 2'd0;
  logic       uart_rxd = 1'b1;
  logic       uart_txd;
  logic       cpu_clk;
  logic [7:0] cpu_data_out, cpu_data_in;
  logic       cpu_tx_valid, cpu_pmu_changer, cpu_rx_full;
  logic       cpu_tx_busy, cpu_pmu_busy;
  logic       clock_pd3;
  level_e [NUM_DOMAINS-1:0] level_pd;
  logic       uart_tx_busy, rx_event_busy;
  int         chars_sent, keys_seen, pmu_commands;
  logic [7:0] last_key;

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #10 clock = ~clock;
  always @(posedge clock) cycle++;

  dpm_system dut (.*);

  cpu_model #(.DELAY(DELAY)) u_cpu (
    .clk         (cpu_clk),
    .rst_n       (rst_n),
    .data_in     (cpu_data_in),
    .rx_full     (cpu_rx_full),
    .tx_busy     (cpu_tx_busy),
    .pmu_busy    (cpu_pmu_busy),
    .data_out    (cpu_data_out),
    .tx_valid    (cpu_tx_valid),
    .pmu_changer (cpu_pmu_changer),
    .chars_sent  (chars_sent),
    .keys_seen   (keys_seen),
    .pmu_commands(pmu_commands),
    .last_key    (last_key)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_tx_chars = 0, n_keys = 0, n_pmu_cs = 0, n_mode_switch = 0;
  int n_tx_sync_busy = 0, n_pmu_sync_busy = 0, n_rx_sync_busy = 0;
  int n_pd3_gated = 0, n_ignored_key = 0;
  int n_level [4] = '{0, 0, 0, 0};           // pd2 periods measured at each level

  always @(posedge clock) begin
    if (dut.pmu_cs) n_pmu_cs++;
    if (cpu_tx_busy && cpu_clk) n_tx_sync_busy++;
    if (cpu_pmu_busy && cpu_clk) n_pmu_sync_busy++;
    if (rx_event_busy) n_rx_sync_busy++;
  end

  // ---------------- terminal: serial decoder ----------------
  logic [7:0] rx_chars [$];
  longint     rx_times [$];

  initial begin
    forever begin
      logic [7:0] b;
      longint t0;
      @(negedge uart_txd);
      if (!rst_n) continue;
      t0 = cycle;
      repeat (BIT_CYC / 2) @(posedge clock);
      if (uart_txd) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CYC) @(posedge clock);
        b[i] = uart_txd;
      end
      repeat (BIT_CYC) @(posedge clock);
      if (uart_txd) begin
        rx_chars.push_back(b);
        rx_times.push_back(t0);
        n_tx_chars++;
      end
    end
  end

  // ---------------- terminal: typing a key ----------------
  task automatic type_key(input logic [7:0] k);
    logic [9:0] frame;
    frame = {1'b1, k, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = frame[i];
      repeat (BIT_CYC) @(posedge clock);
    end
    uart_rxd = 1'b1;
  endtask

  // Wait until cond-like event: the processor has counted one more key.
  task automatic wait_key(input int n0, input longint limit);
    longint t;
    t = 0;
    while (keys_seen == n0 && t < limit) begin @(posedge clock); t++; end
    check(keys_seen == n0 + 1, "key reached the processor");
    if (keys_seen == n0 + 1) n_keys++;
  endtask

  // Measure the processor clock period in master cycles (0 = no edge seen).
  task automatic cpu_period(output longint p, input longint limit);
    longint t0, waited;
    waited = 0;
    @(posedge clock);
    while (!cpu_clk && waited < limit) begin @(posedge clock); waited++; end
    if (waited >= limit) begin p = 0; return; end
    t0 = cycle;
    @(posedge clock); waited = 0;
    while (!cpu_clk && waited < limit) begin @(posedge clock); waited++; end
    p = (waited >= limit) ? 0 : cycle - t0;
  endtask

  task automatic wait_level(input level_e l, input longint limit);
    longint t;
    t = 0;
    while (level_pd[1] != l && t < limit) begin @(posedge clock); t++; end
    check(level_pd[1] == l, $sformatf("pd2 level %0d reached", l));
  endtask

  // Collect n characters and check them against the message and the spacing.
  task automatic check_text(input int n, input longint spacing, input string tag);
    string msg;
    int first;
    msg = "HELLO\r\n";
    rx_chars.delete(); rx_times.delete();
    while (rx_chars.size() < n + 1) @(posedge clock);
    // the first character may have been cut by the phase change
    first = -1;
    for (int i = 0; i < msg.len(); i++) if (msg[i] == rx_chars[1]) first = i;
    check(first >= 0, $sformatf("%s: character %02x belongs to the message", tag, rx_chars[1]));
    for (int k = 1; k <= n; k++) begin
      check(rx_chars[k] == msg[(first + k - 1) % msg.len()],
            $sformatf("%s: char %0d is %02x", tag, k, rx_chars[k]));
      if (k > 1) begin
        longint d;
        d = rx_times[k] - rx_times[k-1];
        check(d >= spacing - 8 && d <= spacing + 8,
              $sformatf("%s: spacing %0d master cycles, expected %0d", tag, d, spacing));
      end
    end
  endtask

  initial begin
    longint p;
    int n0;
    repeat (5) @(posedge clock);
    rst_n = 1'b1;

    // 1. 12 MHz processor: text every DELAY+1 processor cycles = 4 master cycles each
    check(level_pd == {LVL_NORMAL, LVL_NORMAL, LVL_NORMAL}, "reset levels");
    cpu_period(p, 100); check(p == 4, $sformatf("cpu period %0d at 12 MHz", p));
    if (p == 4) n_level[LVL_NORMAL]++;
    check_text(8, SPACE_12, "12 MHz");

    // 2. key '3': processor domain to 48 MHz; text comes four times faster
    n0 = keys_seen;
    type_key("3");
    wait_key(n0, 20000);
    wait_level(LVL_FAST, 1000);
    cpu_period(p, 100); check(p == 1, $sformatf("cpu period %0d at 48 MHz", p));
    if (p == 1) n_level[LVL_FAST]++;
    check_text(8, SPACE_48, "48 MHz");

    // 3. a key that is not a command changes nothing
    n0 = keys_seen;
    type_key("x");
    wait_key(n0, 20000);
    repeat (200) @(posedge clock);
    check(level_pd[1] == LVL_FAST && last_key == "x", "non-command key ignored");
    if (level_pd[1] == LVL_FAST) n_ignored_key++;

    // 4. key '1': 1.2 kHz, one processor cycle per 40000 master cycles
    n0 = keys_seen;
    type_key("1");
    wait_key(n0, 20000);
    wait_level(LVL_SLOW, 1000);
    cpu_period(p, 100000); check(p == 40000, $sformatf("cpu period %0d at 1.2 kHz", p));
    if (p == 40000) n_level[LVL_SLOW]++;

    // 5. key '2' while slow: back to 12 MHz
    n0 = keys_seen;
    type_key("2");
    wait_key(n0, 400000);
    wait_level(LVL_NORMAL, 400000);
    cpu_period(p, 100); check(p == 4, $sformatf("cpu period %0d back at 12 MHz", p));
    check_text(4, SPACE_12, "12 MHz again");

    // 6. key '0': the processor stops its own clock
    n0 = keys_seen;
    type_key("0");
    wait_key(n0, 20000);
    wait_level(LVL_OFF, 1000);
    n0 = chars_sent;
    cpu_period(p, 50000); check(p == 0, "processor clock stopped");
    check(chars_sent == n0, "stopped processor sends nothing");
    if (p == 0) n_level[LVL_OFF]++;

    // 7. power modes: 2 (all 48 MHz) revives it, 1 gates pd2 and pd3, 0 restores
    power_mode = 2'd2; n_mode_switch++;
    repeat (10) @(posedge clock);
    check(level_pd == {LVL_FAST, LVL_FAST, LVL_FAST}, "mode 2 levels");
    cpu_period(p, 100); check(p == 1, "mode 2 processor at 48 MHz");
    power_mode = 2'd1; n_mode_switch++;
    repeat (10) @(posedge clock);
    check(level_pd == {LVL_OFF, LVL_OFF, LVL_NORMAL}, "mode 1 levels");
    begin
      int e3;
      e3 = 0;
      repeat (1000) @(posedge clock) if (clock_pd3) e3++;
      check(e3 == 0, "pd3 gated in mode 1");
      if (e3 == 0) n_pd3_gated++;
    end
    power_mode = 2'd0; n_mode_switch++;
    repeat (10) @(posedge clock);
    check(level_pd == {LVL_NORMAL, LVL_NORMAL, LVL_NORMAL}, "mode 0 levels");
    check_text(4, SPACE_12, "after modes");

    // mechanism coverage
    check(n_tx_chars > 0,       "mechanism: text sent through sync_tx and UART");
    check(n_keys >= 5,          "mechanism: keys through UART and sync_rx");
    check(n_pmu_cs >= 4,        "mechanism: PMU commands through sync_pmu");
    check(n_level[LVL_FAST] > 0 && n_level[LVL_NORMAL] > 0 && n_level[LVL_SLOW] > 0,
          "mechanism: frequency scaling to 48 MHz, 12 MHz, 1.2 kHz");
    check(n_level[LVL_OFF] > 0, "mechanism: clock gating of the processor domain");
    check(n_mode_switch >= 3,   "mechanism: power-mode switches");
    check(n_pd3_gated > 0,      "mechanism: third domain gated");
    check(n_ignored_key > 0,    "mechanism: non-command key");
    check(n_tx_sync_busy > 0 && n_pmu_sync_busy > 0 && n_rx_sync_busy > 0,
          "mechanism: synchronizers busy during transfers");
    $display("mechanisms: chars=%0d keys=%0d pmu_cs=%0d mode_switches=%0d levels(off,slow,normal,fast)=%0d,%0d,%0d,%0d",
             n_tx_chars, n_keys, n_pmu_cs, n_mode_switch,
             n_level[0], n_level[1], n_level[2], n_level[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
