// booth_mux: Booth partial-product multiplexer for one radix-4 digit.
//
// Selects 0, M or 2M according to the digit's select lines and negates the
// selection for a negative digit, giving the partial product d*M. The
// multiplicand M is a signed MW-bit number (the 32-bit operand sign- or
// zero-extended by one bit), so |d*M| <= 2^MW.
//
// To let every row of the following carry-save tree be a non-negative number,
// the partial product is produced with a constant bias: q = 2^MW + d*M, which
// lies in [0, 2^(MW+1)] and fits MW+2 unsigned bits. The multiplier removes the
// sum of all biases once, in its final addition. The bias is this design's own
// way of handling the sign of Booth partial products.
//
// Combinational. In the source design this multiplexer is a transmission-gate
// circuit; here it is plain logic with the same function.
module booth_mux #(
  parameter int unsigned MW = 33
) (
  input  mp_pkg::booth_sel_t  sel,
  input  logic [MW-1:0]       m,    // signed multiplicand
  output logic [MW+1:0]       q     // biased partial product 2^MW + d*M
);

  localparam logic [MW+1:0] BIAS = (MW+2)'(1) << MW;

  logic [MW+1:0] mag;   // |d| * M, sign-extended to MW+2 bits

  always_comb begin
    if (sel.two)      mag = {m[MW-1], m, 1'b0};
    else if (sel.one) mag = {{2{m[MW-1]}}, m};
    else              mag = '0;
    // one's complement plus one for a negative digit
    q = BIAS + (sel.neg ? ~mag : mag) + (MW+2)'(sel.neg);
  end

endmodule
