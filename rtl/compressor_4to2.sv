// compressor_4to2: one row of W 4:2 compressors.
//
// Reduces four W-bit operands to two (sum and carry) such that
// s + cy == a + b + c + d (mod 2^W). Each bit position is a 4:2 compressor
// cell built from two full adders: the first adds a, b, c and passes its carry
// sideways to the next position (cout -> cin, which never ripples further);
// the second adds the first sum, d and the incoming cin and produces the
// position's sum bit and a carry bit of the next higher weight.
//
// Purely combinational; carries out of the top position are dropped, so the
// caller sizes W to hold the exact sum.
module compressor_4to2 #(
  parameter int unsigned W = 41
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] s1;     // sum of the first full adder
  logic [W:0]   cin;    // sideways carry between neighbouring cells
  logic [W-1:0] cout2;  // carry of the second full adder, weight i+1

  always_comb begin
    cin[0]   = 1'b0;
    cout2[0] = 1'b0;
    for (int i = 0; i < W; i++) begin
      s1[i]      = a[i] ^ b[i] ^ c[i];
      cin[i+1]   = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
      s[i]       = s1[i] ^ d[i] ^ cin[i];
      if (i + 1 < W)
        cout2[i+1] = (s1[i] & d[i]) | (s1[i] & cin[i]) | (d[i] & cin[i]);
    end
    cy = cout2;
  end

endmodule
