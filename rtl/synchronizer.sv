// Event synchronizer between two clock domains.
//
// A one-cycle pulse on clk_a_in (domain A) is turned into a one-cycle
// pulse on clk_b_out (domain B). The crossing uses a toggle handshake: the
// pulse flips a request flag in A, the flag passes a STAGES-deep flip-flop
// chain into B, where a change of its value makes the output pulse, and the
// value B has seen returns through a second chain to A as acknowledge.
// busy is high in A from the cycle after the pulse until the acknowledge
// has returned; a pulse arriving while busy is ignored (an assertion flags
// it in simulation). Latency: STAGES+1 clk_b edges from the request flip to
// clk_b_out; busy lasts about STAGES+1 clk_b plus STAGES clk_a edges.
//
// The port names follow the block of the same name in the system diagram;
// the handshake, the reset and the stage count are this design's choices.
// rst_n resets both sides asynchronously, so the block can be reset while a
// domain's clock is stopped.
module synchronizer #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk_a,
  input  logic clk_b,
  input  logic rst_n,
  input  logic clk_a_in,
  output logic busy,
  output logic clk_b_out
);

  logic              req_a;          // request toggle, domain A
  logic [STAGES-1:0] req_sync_b;     // request chain into domain B
  logic              req_seen_b;     // last request value acted on in B
  logic [STAGES-1:0] ack_sync_a;     // acknowledge chain back into A

  // Domain A: flip the request when idle.
  always_ff @(posedge clk_a or negedge rst_n) begin
    if (!rst_n) begin
      req_a      <= 1'b0;
      ack_sync_a <= '0;
    end else begin
      ack_sync_a <= {ack_sync_a[STAGES-2:0], req_seen_b};
      if (clk_a_in && !busy)
        req_a <= ~req_a;
    end
  end

  assign busy = req_a != ack_sync_a[STAGES-1];

  // Domain B: a change of the synchronized request is one event.
  always_ff @(posedge clk_b or negedge rst_n) begin
    if (!rst_n) begin
      req_sync_b <= '0;
      req_seen_b <= 1'b0;
      clk_b_out  <= 1'b0;
    end else begin
      req_sync_b <= {req_sync_b[STAGES-2:0], req_a};
      req_seen_b <= req_sync_b[STAGES-1];
      clk_b_out  <= req_sync_b[STAGES-1] != req_seen_b;
    end
  end

  // Events must not be offered while the previous one is still crossing.
  a_no_pulse_when_busy: assert property (@(posedge clk_a) disable iff (!rst_n)
    clk_a_in |-> !busy)
    else $warning("synchronizer: event dropped, previous transfer still busy");

  initial assert (STAGES >= 2) else $error("synchronizer: STAGES must be at least 2");

endmodule
