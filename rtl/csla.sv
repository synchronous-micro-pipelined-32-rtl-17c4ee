// csla: carry-select adder, sum = a + b + cin.
//
// The operands are cut into blocks of BLK bits. The lowest block is a plain
// ripple-carry adder fed by cin. Every other block holds two ripple-carry
// adders that add the block twice, once assuming a carry-in of 0 and once of
// 1; when the real carry into the block is known, a multiplexer selects the
// matching sum and carry-out:
//   s[k+BLK-1:k] = c_k ? s1 : s0,   c_(k+BLK) = c_k ? c1 : c0.
// So a carry crosses a block through one multiplexer instead of BLK full
// adders. Purely combinational. The block size is this design's choice.
module csla #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = (W + BLK - 1) / BLK;

  // Carry into each block; c[NBLK] is the adder's carry-out.
  logic [NBLK:0] c;

  assign c[0] = cin;
  assign cout = c[NBLK];

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned BW = (LO + BLK <= W) ? BLK : W - LO;

    if (k == 0) begin : g_rca
      // lowest block: single ripple-carry adder on the real carry-in
      always_comb begin
        logic cr;
        cr = c[0];
        for (int i = 0; i < BW; i++) begin
          sum[LO+i] = a[LO+i] ^ b[LO+i] ^ cr;
          cr        = (a[LO+i] & b[LO+i]) | (cr & (a[LO+i] ^ b[LO+i]));
        end
        c[1] = cr;
      end
    end else begin : g_sel
      logic [BW-1:0] s0, s1;
      logic          c0, c1;
      // two ripple-carry adders with assumed carry-in 0 and 1
      always_comb begin
        logic r0, r1;
        r0 = 1'b0;
        r1 = 1'b1;
        for (int i = 0; i < BW; i++) begin
          s0[i] = a[LO+i] ^ b[LO+i] ^ r0;
          s1[i] = a[LO+i] ^ b[LO+i] ^ r1;
          r0    = (a[LO+i] & b[LO+i]) | (r0 & (a[LO+i] ^ b[LO+i]));
          r1    = (a[LO+i] & b[LO+i]) | (r1 & (a[LO+i] ^ b[LO+i]));
        end
        c0 = r0;
        c1 = r1;
      end
      // selection by the real block carry-in
      assign sum[LO+BW-1:LO] = c[k] ? s1 : s0;
      assign c[k+1]          = c[k] ? c1 : c0;
    end
  end

endmodule
