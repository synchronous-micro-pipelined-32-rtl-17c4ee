// latch_row: a row of W standard transparent latches (pipeline latch row).
//
// While `le` is high the row is transparent and q follows d; when `le` falls
// the row turns opaque and holds the last value. The latch enables come from a
// micro-pipeline latch controller (mp_latch_ctrl), which opens the row only
// during one clock phase and only when a data token is handed over.
//
// These are intentional level-sensitive latches: the micro-pipeline is built
// from transparent latches rather than edge-triggered registers.
module latch_row #(
  parameter int unsigned W = 8
) (
  input  logic         le,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (le) q = d;
  end

endmodule
