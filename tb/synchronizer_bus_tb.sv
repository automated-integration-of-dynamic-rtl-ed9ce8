// Self-checking testbench of the word synchronizer.
//
// Random 8-bit words are sent from domain A into domain B under three clock
// ratios. A monitor in domain B records every clk_b_out pulse together with
// bus_out in the same cycle; the bench checks each word arrives once and
// unchanged, within the expected number of clk_b edges, that bus_out keeps
// its value between transfers, that busy covers the transfer, and that a
// word offered while busy is dropped. A watchdog ends a hung run.
module synchronizer_bus_tb;

  logic       clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
  logic       clk_a_in = 1'b0;
  logic [7:0] bus_in = '0;
  logic       busy, clk_b_out;
  logic [7:0] bus_out;
  int   checks = 0, failures = 0;
  int   ratio = 0;   // 0: clk_b slower, 1: clk_b faster, 2: clk_b much slower
  int   pulses_b = 0;
  logic [7:0] last_word;

  always #5 clk_a = ~clk_a;
  always begin
    case (ratio)
      0:       #7;
      1:       #2;
      default: #23;
    endcase
    clk_b = ~clk_b;
  end

  synchronizer_bus #(.WIDTH(8)) dut (.*);

  always @(posedge clk_b) if (rst_n && clk_b_out) begin
    pulses_b++;
    last_word = bus_out;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_word(input logic [7:0] w);
    int n0, edges;
    n0 = pulses_b;
    @(negedge clk_a);
    check(!busy, "idle before the word");
    clk_a_in = 1'b1; bus_in = w;
    @(negedge clk_a);
    clk_a_in = 1'b0; bus_in = ~w;          // source may change right after the strobe
    check(busy, "busy after the strobe");
    edges = 0;
    while (pulses_b == n0 && edges < 20) begin @(negedge clk_b); edges++; end
    check(pulses_b == n0 + 1, "one strobe in domain B");
    check(last_word == w, $sformatf("word %02x arrived as %02x", w, last_word));
    check(edges >= 2 && edges <= 5, $sformatf("latency %0d clk_b edges", edges));
    repeat (8) @(negedge clk_b);
    check(bus_out == w, "bus_out holds the word");
    repeat (4) @(negedge clk_a);
    check(!busy, "busy released");
    check(pulses_b == n0 + 1, "no extra strobe");
  endtask

  initial begin
    repeat (3) @(negedge clk_a);
    rst_n = 1'b1;
    check(!busy && !clk_b_out && bus_out == 8'h00, "reset state");
    repeat (10) send_word(8'($urandom));
    // A second word while the first is in flight is dropped.
    begin
      int n0;
      n0 = pulses_b;
      @(negedge clk_a); clk_a_in = 1'b1; bus_in = 8'h5a;
      @(negedge clk_a); bus_in = 8'ha5;
      @(negedge clk_a); clk_a_in = 1'b0;
      repeat (20) @(negedge clk_b);
      repeat (6) @(negedge clk_a);
      check(pulses_b == n0 + 1 && bus_out == 8'h5a, "word while busy dropped");
    end
    ratio = 1;           // faster destination
    repeat (10) send_word(8'($urandom));
    ratio = 2;           // much slower destination
    repeat (5) send_word(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
