// Self-checking testbench of the UART.
//
// The transmitter is checked by a serial decoder in the bench that samples
// txd in the middle of every bit, using the nominal bit time of
// CLKS_PER_BIT cycles: start bit low, eight data bits LSB first, stop bit
// high, and tx_busy lasting exactly 10 bit times. The receiver is driven by
// a serial encoder in the bench, once at the nominal bit time and once 3 %
// slow, and must report each byte with one received pulse; a frame with a
// low stop bit must be discarded. The default bit time (104 cycles) is used.
module uart_tb;

  localparam int unsigned CPB = 104;

  logic       clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
  logic       transmit = 1'b0;
  logic [7:0] tx_byte = '0;
  logic       received;
  logic [7:0] rx_byte;
  logic       tx_busy;
  logic       rxd = 1'b1;
  logic       txd;
  int checks = 0, failures = 0;
  int rx_count = 0;
  logic [7:0] rx_last;

  always #5 clk = ~clk;

  uart #(.CLKS_PER_BIT(CPB)) dut (.*);

  always @(posedge clk) if (rst_n && received) begin rx_count++; rx_last = rx_byte; end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send one byte through the transmitter and decode txd independently.
  task automatic tx_one(input logic [7:0] b);
    logic [7:0] got;
    int busy_cycles;
    @(negedge clk);
    check(!tx_busy && txd, "transmitter idle");
    transmit = 1'b1; tx_byte = b;
    @(negedge clk);
    transmit = 1'b0; tx_byte = 8'hxx;
    busy_cycles = 0;
    // txd went low at the edge that set tx_busy: middle of start bit.
    repeat (CPB / 2 - 1) begin @(negedge clk); busy_cycles++; end
    check(txd == 1'b0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) begin @(negedge clk); busy_cycles++; end
      got[i] = txd;
    end
    repeat (CPB) begin @(negedge clk); busy_cycles++; end
    check(txd == 1'b1, "stop bit");
    check(got == b, $sformatf("sent %02x decoded %02x", b, got));
    while (tx_busy && busy_cycles < 20 * CPB) begin @(negedge clk); busy_cycles++; end
    check(busy_cycles == 10 * CPB, $sformatf("frame length %0d cycles", busy_cycles));
  endtask

  // Drive one frame into rxd with the given bit time (in cycles).
  task automatic rx_one(input logic [7:0] b, input int bit_cycles, input bit stop);
    logic [9:0] frame;
    frame = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = frame[i];
      repeat (bit_cycles) @(negedge clk);
    end
    rxd = 1'b1;
    repeat (bit_cycles) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!tx_busy && txd && !received, "reset state");
    tx_one(8'h55); tx_one(8'h00); tx_one(8'hff);
    repeat (5) tx_one(8'($urandom));
    // transmit while busy is ignored
    @(negedge clk); transmit = 1'b1; tx_byte = 8'h41;
    @(negedge clk); tx_byte = 8'h42;
    @(negedge clk); transmit = 1'b0;
    repeat (10 * CPB) @(negedge clk);
    check(!tx_busy && txd, "transmit while busy did not start a second frame");
    // receiver
    for (int k = 0; k < 8; k++) begin
      logic [7:0] b;
      int n0;
      b = (k == 0) ? 8'h48 : 8'($urandom);
      n0 = rx_count;
      rx_one(b, (k % 2 == 1) ? CPB + CPB * 3 / 100 : CPB, 1'b1);
      check(rx_count == n0 + 1, "one received pulse");
      check(rx_last == b && rx_byte == b, $sformatf("received %02x expected %02x", rx_last, b));
    end
    begin
      int n0;
      n0 = rx_count;
      rx_one(8'h77, CPB, 1'b0);        // framing error
      check(rx_count == n0, "bad stop bit discarded");
    end
    // loopback of the transmitter into the receiver
    begin
      int n0;
      n0 = rx_count;
      fork
        forever @(txd) rxd = txd;
        tx_one(8'hc3);
      join_any
      disable fork;
      repeat (CPB) @(negedge clk);
      check(rx_count == n0 + 1 && rx_last == 8'hc3, "loopback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
