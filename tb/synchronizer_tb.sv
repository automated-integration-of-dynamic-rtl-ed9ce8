// Self-checking testbench of the event synchronizer.
//
// Two unrelated clocks (period ratio changed between phases, both faster and
// slower destination) carry a series of events. The bench checks that each
// accepted event gives exactly one clk_b_out pulse, that it arrives within
// the expected number of clk_b edges, that busy is high while the event is in
// flight and falls afterwards, and that an event offered while busy is
// ignored. A watchdog ends the run if it hangs.
module synchronizer_tb;

  logic clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
  logic clk_a_in = 1'b0;
  logic busy, clk_b_out;
  int   checks = 0, failures = 0;
  int   ratio = 0;   // 0: clk_b slower, 1: clk_b faster, 2: clk_b much slower
  int   pulses_b = 0;

  always #5 clk_a = ~clk_a;
  always begin
    case (ratio)
      0:       #7;
      1:       #2;
      default: #23;
    endcase
    clk_b = ~clk_b;
  end

  synchronizer dut (.*);

  always @(posedge clk_b) if (rst_n && clk_b_out) pulses_b++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send one event and check its crossing.
  task automatic send_event();
    int n0, edges;
    n0 = pulses_b;
    @(negedge clk_a);
    check(!busy, "idle before the event");
    clk_a_in = 1'b1;
    @(negedge clk_a);
    clk_a_in = 1'b0;
    check(busy, "busy after event");
    edges = 0;
    while (pulses_b == n0 && edges < 20) begin @(negedge clk_b); edges++; end
    check(pulses_b == n0 + 1, "one pulse in domain B");
    check(edges >= 2 && edges <= 5, $sformatf("latency %0d clk_b edges", edges));
    repeat (8) @(negedge clk_b);
    repeat (4) @(negedge clk_a);
    check(!busy, "busy released");
    check(pulses_b == n0 + 1, "no extra pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk_a);
    rst_n = 1'b1;
    check(!busy && !clk_b_out, "reset state");
    repeat (5) send_event();
    // Event offered while busy is dropped.
    begin
      int n0;
      n0 = pulses_b;
      @(negedge clk_a); clk_a_in = 1'b1;
      @(negedge clk_a); check(busy, "busy"); // second cycle of a long strobe: ignored
      @(negedge clk_a); clk_a_in = 1'b0;
      repeat (20) @(negedge clk_b);
      repeat (6) @(negedge clk_a);
      check(pulses_b == n0 + 1, "strobe while busy ignored");
    end
    ratio = 1;           // faster destination
    repeat (5) send_event();
    ratio = 2;           // much slower destination
    repeat (3) send_event();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
