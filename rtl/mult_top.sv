// mult_top: the two 32-bit multipliers side by side.
//
// mp_multiplier is the synchronous micro-pipelined Booth multiplier (signed or
// unsigned, NITER + 1 = 6 clock cycles per product at 32 bits);
// csla_multiplier is the shift-and-add multiplier with a carry-select adder
// (unsigned, 32 cycles per product). They share the clock and reset and have
// separate operand, start and result ports, so either can be used alone or
// both compared on the same operands.
module mult_top #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic           clk,
  input  logic           n_reset,
  // micro-pipelined Booth multiplier
  input  logic           mp_start,
  input  logic           mp_tc,
  input  logic [W-1:0]   mp_mcand,
  input  logic [W-1:0]   mp_mplier,
  output logic           mp_busy,
  output logic           mp_done,
  output logic [2*W-1:0] mp_product,
  // carry-select shift-and-add multiplier
  input  logic           cs_start,
  input  logic [W-1:0]   cs_mcand,
  input  logic [W-1:0]   cs_mplier,
  output logic           cs_busy,
  output logic           cs_done,
  output logic [2*W-1:0] cs_product
);

  mp_multiplier #(.W(W), .BLK(BLK)) u_mp (
    .clk, .n_reset,
    .start  (mp_start),
    .tc     (mp_tc),
    .mcand  (mp_mcand),
    .mplier (mp_mplier),
    .busy   (mp_busy),
    .done   (mp_done),
    .product(mp_product)
  );

  csla_multiplier #(.W(W), .BLK(BLK)) u_cs (
    .clk, .n_reset,
    .start  (cs_start),
    .mcand  (cs_mcand),
    .mplier (cs_mplier),
    .busy   (cs_busy),
    .done   (cs_done),
    .product(cs_product)
  );

endmodule
