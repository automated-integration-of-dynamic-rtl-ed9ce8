// Word synchronizer between two clock domains.
//
// Carries a WIDTH-bit word together with its strobe from domain A into
// domain B. When clk_a_in is high and the block is idle, bus_in is
// captured into a holding register in A and a request flag toggles. The
// flag crosses into B through a STAGES-deep flip-flop chain; when B sees it
// change, the holding register (stable for the whole transfer, so safe to
// sample) is loaded into bus_out and clk_b_out pulses for one clk_b cycle,
// in the same cycle as the new bus_out. bus_out keeps its value until the
// next transfer. The value B has acted on returns through a second chain as
// acknowledge; busy is high in A until it arrives, and a strobe while busy
// is ignored. Latency from the capture to clk_b_out: STAGES+1 clk_b edges.
//
// Port names follow the synchronizerBus block of the system diagram and
// the 8-bit width is the diagram's; the handshake, reset and stage count
// are this design's choices. rst_n is asynchronous and active low.
module synchronizer_bus #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk_a,
  input  logic             clk_b,
  input  logic             rst_n,
  input  logic             clk_a_in,
  input  logic [WIDTH-1:0] bus_in,
  output logic             busy,
  output logic             clk_b_out,
  output logic [WIDTH-1:0] bus_out
);

  logic              req_a;
  logic [WIDTH-1:0]  hold_a;         // word held stable during the transfer
  logic [STAGES-1:0] req_sync_b;
  logic              req_seen_b;
  logic [STAGES-1:0] ack_sync_a;

  always_ff @(posedge clk_a or negedge rst_n) begin
    if (!rst_n) begin
      req_a      <= 1'b0;
      hold_a     <= '0;
      ack_sync_a <= '0;
    end else begin
      ack_sync_a <= {ack_sync_a[STAGES-2:0], req_seen_b};
      if (clk_a_in && !busy) begin
        req_a  <= ~req_a;
        hold_a <= bus_in;
      end
    end
  end

  assign busy = req_a != ack_sync_a[STAGES-1];

  always_ff @(posedge clk_b or negedge rst_n) begin
    if (!rst_n) begin
      req_sync_b <= '0;
      req_seen_b <= 1'b0;
      clk_b_out  <= 1'b0;
      bus_out    <= '0;
    end else begin
      req_sync_b <= {req_sync_b[STAGES-2:0], req_a};
      req_seen_b <= req_sync_b[STAGES-1];
      clk_b_out  <= req_sync_b[STAGES-1] != req_seen_b;
      if (req_sync_b[STAGES-1] != req_seen_b)
        bus_out <= hold_a;
    end
  end

  a_no_strobe_when_busy: assert property (@(posedge clk_a) disable iff (!rst_n)
    clk_a_in |-> !busy)
    else $warning("synchronizer_bus: word dropped, previous transfer still busy");

  initial assert (STAGES >= 2) else $error("synchronizer_bus: STAGES must be at least 2");

endmodule
