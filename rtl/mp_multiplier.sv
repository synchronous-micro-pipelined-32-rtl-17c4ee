// mp_multiplier: synchronous micro-pipelined iterative Booth multiplier.
//
// Multiplies two W-bit integers, signed (tc = 1) or unsigned (tc = 0), into a
// 2W-bit product. The multiplier operand is radix-4 Booth recoded and consumed
// four digits (eight bits) per iteration by a two-stage pipeline of
// transparent-latch rows:
//
//   stage 1: Booth encoder -> latch row L1 -> Booth multiplexers ->
//            4:2 compressor row (four partial products -> two rows)
//   stage 2: latch row L2 -> 4:2 compressor row (new rows + carry-save
//            accumulator -> two rows) -> shift register row
//
// The shift register row keeps the accumulator in carry-save form and shifts
// it right by eight bits per iteration; the eight bits shifted out are
// resolved by a small adder (with a carry kept to the next iteration) and
// shifted into the low product register. After the last iteration the upper
// carry-save rows, the low bits and a bias correction go through a 4:2
// compressor row and a carry-select adder to give the product.
//
// Control: the two latch rows are opened by micro-pipeline latch controllers
// (mp_latch_ctrl) with two-phase req/ack between the iteration sequencer, L1,
// L2 and the accumulator. L1 opens in the low clock phase, L2 in the high
// phase, the sequencer works on rising edges and the accumulator on falling
// edges, so one iteration enters the pipeline per clock cycle.
//
// Operand extension: the multiplicand is sign- or zero-extended to W+1 bits
// and the multiplier to 8*NITER bits, so unsigned operands need the extra
// Booth digit W/2 and NITER = ceil((W/2+1)/4) iterations (5 for W = 32).
// Partial products carry a bias of 2^(W+1) so that all carry-save rows are
// non-negative; the sum of the biases is subtracted in the final addition.
//
// Interface and timing: when idle, a high `start` on a rising clock edge loads
// mcand, mplier and tc; `busy` is then high. NITER + 1 rising edges later the
// product register is written and `done` rises; `done` and `product` hold
// until the next start. A start while busy is ignored. n_reset is
// asynchronous and active low.
//
// Follows the source design: 32-bit signed/unsigned operation, modified Booth
// recoding, two stages each with a latch row and a 4:2 compressor row, a
// shift register row, micro-pipeline latch control on a global clock, and the
// clk/n_reset/start/mcand/mplier/done/product interface. This design's own
// choices: four digits per iteration, the bias scheme, the carry-save
// accumulator with per-iteration low-bit resolution, the final adder, the
// tc and busy ports, and the exact clock phases.
//
// The latch rows are intended latches; the controllers and the accumulator use
// both clock edges on purpose.
module mp_multiplier #(
  parameter int unsigned W   = mp_pkg::OP_W,
  parameter int unsigned BLK = 4            // carry-select block size
) (
  input  logic           clk,
  input  logic           n_reset,
  input  logic           start,
  input  logic           tc,        // 1: signed operands, 0: unsigned
  input  logic [W-1:0]   mcand,
  input  logic [W-1:0]   mplier,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);

  localparam int unsigned DPI   = mp_pkg::DIGITS_PER_ITER;   // 4
  localparam int unsigned NDIG  = W / 2 + 1;                  // Booth digits needed
  localparam int unsigned NITER = (NDIG + DPI - 1) / DPI;     // iterations
  localparam int unsigned XW    = 2 * DPI * NITER;            // extended multiplier
  localparam int unsigned MW    = W + 1;                      // extended multiplicand
  localparam int unsigned PPW   = MW + 2;                     // biased partial product
  localparam int unsigned TW    = PPW + 2 * (DPI - 1);        // one iteration's sum
  localparam int unsigned AW    = TW + 1;                     // accumulator rows
  localparam int unsigned SH    = 2 * DPI;                    // bits retired per iteration
  localparam int unsigned PW    = 2 * W;                      // product
  localparam int unsigned HW    = PW - XW;                    // product bits from acc
  localparam int unsigned CW    = $clog2(NITER + 1);

  // Sum of all partial-product biases, 2^MW at every digit weight, mod 2^PW.
  function automatic logic [PW-1:0] bias_sum();
    logic [PW-1:0] b;
    b = '0;
    for (int g = 0; g < DPI * NITER; g++)
      if (MW + 2 * g < PW) b[MW+2*g] = 1'b1;
    return b;
  endfunction
  localparam logic [PW-1:0] BIAS_SUM = bias_sum();

  // ---------------------------------------------------------------- sequencer
  logic [MW-1:0]  mcand_q;
  logic [XW-1:0]  x_q;        // multiplier, shifted right SH bits per iteration
  logic           prev_q;     // bit just below the current window
  logic [CW-1:0]  issued_q;
  logic           load_q;     // high for the cycle after a start
  logic           req1_q;     // two-phase request to stage 1
  logic [CW-1:0]  acc_cnt_q;  // iterations accumulated (falling-edge domain)

  logic           ack1, req2, ack2, req3, le1, le2;
  logic           acc_ack_q;

  logic [PW-1:0]  final_sum;

  always_ff @(posedge clk or negedge n_reset) begin
    if (!n_reset) begin
      mcand_q  <= '0;
      x_q      <= '0;
      prev_q   <= 1'b0;
      issued_q <= '0;
      load_q   <= 1'b0;
      req1_q   <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      product  <= '0;
    end else begin
      load_q <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand_q  <= {tc & mcand[W-1], mcand};
          x_q      <= {{(XW-W){tc & mplier[W-1]}}, mplier};
          prev_q   <= 1'b0;
          issued_q <= CW'(1);
          req1_q   <= ~req1_q;            // issue iteration 0
          load_q   <= 1'b1;
          busy     <= 1'b1;
          done     <= 1'b0;
        end
      end else begin
        if (issued_q < CW'(NITER) && ack1 == req1_q) begin
          prev_q   <= x_q[SH-1];
          x_q      <= XW'(x_q >> SH);
          issued_q <= issued_q + CW'(1);
          req1_q   <= ~req1_q;
        end
        if (acc_cnt_q == CW'(NITER)) begin
          product <= final_sum;
          done    <= 1'b1;
          busy    <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------------ stage 1
  mp_pkg::booth_sel_t [DPI-1:0] sel_d, sel_q;

  booth_encoder #(.DIGITS(DPI)) u_enc (
    .win ({x_q[SH-1:0], prev_q}),
    .sel (sel_d)
  );

  mp_latch_ctrl #(.OPEN_HIGH(1'b0)) u_ctl1 (
    .clk, .n_reset,
    .req_in (req1_q), .ack_out (ack1),
    .req_out(req2),   .ack_in  (ack2),
    .le     (le1),    .take    ()
  );

  latch_row #(.W($bits(sel_d))) u_l1 (
    .le (le1),
    .d  (sel_d),
    .q  (sel_q)
  );

  logic [PPW-1:0] pp [DPI];
  logic [TW-1:0]  pp_w [DPI];
  logic [TW-1:0]  s1, c1;

  for (genvar j = 0; j < DPI; j++) begin : g_pp
    booth_mux #(.MW(MW)) u_mux (
      .sel (sel_q[j]),
      .m   (mcand_q),
      .q   (pp[j])
    );
    assign pp_w[j] = TW'(pp[j]) << (2 * j);
  end

  compressor_4to2 #(.W(TW)) u_cmp1 (
    .a (pp_w[0]), .b (pp_w[1]), .c (pp_w[2]), .d (pp_w[3]),
    .s (s1),      .cy(c1)
  );

  // ------------------------------------------------------------------ stage 2
  logic [TW-1:0] s1_q, c1_q;

  mp_latch_ctrl #(.OPEN_HIGH(1'b1)) u_ctl2 (
    .clk, .n_reset,
    .req_in (req2),  .ack_out (ack2),
    .req_out(req3),  .ack_in  (acc_ack_q),
    .le     (le2),   .take    ()
  );

  latch_row #(.W(2 * TW)) u_l2 (
    .le (le2),
    .d  ({s1, c1}),
    .q  ({s1_q, c1_q})
  );

  // shift register row: carry-save accumulator and low product bits
  logic [AW-1:0] acc_s_q, acc_c_q;
  logic [XW-1:0] lo_q;
  logic          lo_c_q;
  logic [AW-1:0] s2, c2;
  logic [SH:0]   lo_add;

  compressor_4to2 #(.W(AW)) u_cmp2 (
    .a (acc_s_q), .b (acc_c_q), .c (AW'(s1_q)), .d (AW'(c1_q)),
    .s (s2),      .cy(c2)
  );

  assign lo_add = (SH+1)'(s2[SH-1:0]) + (SH+1)'(c2[SH-1:0]) + (SH+1)'(lo_c_q);

  always_ff @(negedge clk or negedge n_reset) begin
    if (!n_reset) begin
      acc_s_q   <= '0;
      acc_c_q   <= '0;
      lo_q      <= '0;
      lo_c_q    <= 1'b0;
      acc_cnt_q <= '0;
      acc_ack_q <= 1'b0;
    end else if (load_q) begin
      acc_s_q   <= '0;
      acc_c_q   <= '0;
      lo_c_q    <= 1'b0;
      acc_cnt_q <= '0;
    end else if (req3 != acc_ack_q) begin   // stage 2 handed over a token
      acc_s_q   <= s2 >> SH;
      acc_c_q   <= c2 >> SH;
      lo_q      <= {lo_add[SH-1:0], lo_q[XW-1:SH]};
      lo_c_q    <= lo_add[SH];
      acc_cnt_q <= acc_cnt_q + CW'(1);
      acc_ack_q <= ~acc_ack_q;
    end
  end

  // ------------------------------------------------------- final addition
  // product = {acc_s, lo} + {acc_c, 0} + lo_c * 2^XW - BIAS_SUM  (mod 2^PW)
  logic [PW-1:0] f_s, f_c;

  compressor_4to2 #(.W(PW)) u_cmp3 (
    .a ({acc_s_q[HW-1:0], lo_q}),
    .b ({acc_c_q[HW-1:0], {XW{1'b0}}}),
    .c (PW'(lo_c_q) << XW),
    .d (~BIAS_SUM),
    .s (f_s),
    .cy(f_c)
  );

  csla #(.W(PW), .BLK(BLK)) u_cpa (
    .a   (f_s),
    .b   (f_c),
    .cin (1'b1),
    .sum (final_sum),
    .cout()
  );

  // The handshake must never offer stage 1 a new token before it took the last.
  a_issue_after_ack: assert property (@(posedge clk) disable iff (!n_reset)
    (busy && $changed(req1_q)) |-> $past(ack1 == req1_q));

endmodule
