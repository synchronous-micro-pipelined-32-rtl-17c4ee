// mp_latch_ctrl: micro-pipeline latch controller for one latch row.
//
// Stages talk with two-phase (transition) bundled-data handshakes: a stage
// announces a new data item by toggling req, and the receiver confirms it by
// toggling ack, so every transition is an event and there is no return to
// zero. The latch row itself is driven with a four-phase level: `le` high
// means transparent, low means opaque. This controller converts between the
// two, which is the hybrid two-phase / four-phase scheme of the design.
//
// Timing (synchronous to the global clock): the row may be open only during
// one clock phase, the high phase if OPEN_HIGH else the low phase, so adjacent
// rows open in alternate phases. On the edge that starts that phase the
// controller accepts a token when one is pending (req_in != ack_out) and the
// next stage has acknowledged the previous one (req_out == ack_in). On
// accepting it toggles ack_out and req_out and raises `le` for the phase; the
// row closes on the next clock edge. One token per clock cycle at most.
// The accept decision is held in a small enable latch that is transparent
// while the row is closed and frozen while it is open, as in a clock-gating
// cell, so `le` is glitch-free (an intended latch). `take` is that held decision: it is valid on
// the opening edge and stays stable throughout the open phase.
//
// Reset (n_reset low, asynchronous) clears all toggles: no token pending.
// The clocked two-phase to four-phase conversion is this design's reading of
// the source's latch controller, whose circuit is not given.
module mp_latch_ctrl #(
  parameter bit OPEN_HIGH = 1'b1
) (
  input  logic clk,
  input  logic n_reset,
  input  logic req_in,   // two-phase request from the previous stage
  output logic ack_out,  // two-phase acknowledge to the previous stage
  output logic req_out,  // two-phase request to the next stage
  input  logic ack_in,   // two-phase acknowledge from the next stage
  output logic le,       // four-phase latch enable (high = transparent)
  output logic take      // a token was accepted at the last opening edge
);

  logic accept;   // a token can be accepted at the next opening edge
  logic open_ph;  // the clock phase in which the row may be transparent

  assign accept  = (req_in ^ ack_out) & ~(req_out ^ ack_in);
  assign open_ph = OPEN_HIGH ? clk : ~clk;

  // Enable latch, transparent while the row is closed: `take` is frozen for
  // the whole open phase, so `le` cannot glitch (a clock-gating cell).
  always_latch begin
    if (!n_reset)     take = 1'b0;
    else if (!open_ph) take = accept;
  end

  assign le = open_ph & take;

  // Two-phase toggles, updated on the opening edge of the row.
  if (OPEN_HIGH) begin : g_high
    always_ff @(posedge clk or negedge n_reset) begin
      if (!n_reset) begin
        ack_out <= 1'b0;
        req_out <= 1'b0;
      end else if (take) begin
        ack_out <= req_in;
        req_out <= ~req_out;
      end
    end
  end else begin : g_low
    always_ff @(negedge clk or negedge n_reset) begin
      if (!n_reset) begin
        ack_out <= 1'b0;
        req_out <= 1'b0;
      end else if (take) begin
        ack_out <= req_in;
        req_out <= ~req_out;
      end
    end
  end

endmodule
