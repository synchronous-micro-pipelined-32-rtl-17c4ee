// booth_encoder: radix-4 (modified) Booth recoder for DIGITS digits.
//
// The input window holds 2*DIGITS multiplier bits plus, in bit 0, the bit just
// below them (b[-1], zero for the least significant window). Digit j looks at
// the overlapping triplet {b[2j+1], b[2j], b[2j-1]} = win[2j+2:2j] and
// produces d = -2*b[2j+1] + b[2j] + b[2j-1] as select lines (mp_pkg::booth_sel_t).
// The all-ones triplet gives -0, which is encoded as plain zero (neg = 0) so
// that no +1 correction is injected for it.
//
// Purely combinational. The modified Booth algorithm is the one the multiplier
// is built on; the select-line encoding is this design's choice.
module booth_encoder #(
  parameter int unsigned DIGITS = 4
) (
  input  logic [2*DIGITS:0]                    win,
  output mp_pkg::booth_sel_t [DIGITS-1:0]      sel
);

  always_comb begin
    for (int j = 0; j < DIGITS; j++) begin
      logic hi, mid, lo;
      hi  = win[2*j+2];
      mid = win[2*j+1];
      lo  = win[2*j];
      sel[j].one = mid ^ lo;
      sel[j].two = (hi & ~mid & ~lo) | (~hi & mid & lo);
      sel[j].neg = hi & ~(mid & lo);
    end
  end

endmodule
