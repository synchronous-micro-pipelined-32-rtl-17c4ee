// csla_multiplier: shift-and-add 32-bit multiplier built on a carry-select adder.
//
// A 2W-bit product register holds the multiplier in its lower half and zeros
// in its upper half at start. Each of W iterations (one per clock) adds the
// multiplicand to the upper half if the product register's least significant
// bit is one, then shifts the register right by one bit, shifting the adder's
// carry-out into the most significant bit. After W iterations the register
// holds the unsigned 2W-bit product. The W-bit addition is a carry-select
// adder (csla).
//
// Interface and timing: when idle, `start` on a rising clock edge loads the
// operands and raises `busy`; W rising edges later `done` rises with the
// product, and both hold until the next start. A start while busy is ignored.
// n_reset is asynchronous and active low. Unsigned operands only.
//
// The algorithm and the carry-select adder follow the source design; the
// handshake (start/busy/done) and the block size are this design's choices.
module csla_multiplier #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic           clk,
  input  logic           n_reset,
  input  logic           start,
  input  logic [W-1:0]   mcand,
  input  logic [W-1:0]   mplier,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]   mcand_q;
  logic [2*W-1:0] prod_q;
  logic [CW-1:0]  cnt_q;
  logic [W-1:0]   addend, hi_sum;
  logic           hi_cout;

  assign addend  = prod_q[0] ? mcand_q : '0;
  assign product = prod_q;

  csla #(.W(W), .BLK(BLK)) u_add (
    .a   (prod_q[2*W-1:W]),
    .b   (addend),
    .cin (1'b0),
    .sum (hi_sum),
    .cout(hi_cout)
  );

  always_ff @(posedge clk or negedge n_reset) begin
    if (!n_reset) begin
      mcand_q <= '0;
      prod_q  <= '0;
      cnt_q   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        mcand_q <= mcand;
        prod_q  <= {{W{1'b0}}, mplier};
        cnt_q   <= '0;
        busy    <= 1'b1;
        done    <= 1'b0;
      end
    end else begin
      prod_q <= {hi_cout, hi_sum, prod_q[W-1:1]};
      cnt_q  <= cnt_q + CW'(1);
      if (cnt_q == CW'(W - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
