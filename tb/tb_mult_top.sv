// tb_mult_top: end-to-end test of both multipliers at their default 32-bit
// size. Random and extreme operands are fed to the micro-pipelined Booth
// multiplier (signed and unsigned) and, at the same time, to the carry-select
// shift-and-add multiplier (unsigned); products and cycle counts are compared
// with the simulator's multiplication. The test also counts how often each
// mechanism of the design was exercised and fails if one never was:
// every Booth digit value, signed and unsigned mode, tokens handed through
// both latch rows (NITER per product), the carry kept between the low-bit
// additions, a carry selected into a carry-select block, and a start ignored
// while busy.
module tb_mult_top;
  localparam int unsigned W = 32;
  localparam int unsigned NITER = ((W / 2 + 1) + 3) / 4;
  logic clk = 1'b0, n_reset;
  logic mp_start, mp_tc, mp_busy, mp_done, cs_start, cs_busy, cs_done;
  logic [W-1:0] mp_mcand, mp_mplier, cs_mcand, cs_mplier;
  logic [2*W-1:0] mp_product, cs_product;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_digit [5];        // Booth digit -2..+2 seen in the operands
  int n_signed = 0, n_unsigned = 0;
  int n_l1 = 0, n_l2 = 0;  // latch row openings
  int n_lo_carry = 0, n_sel_carry = 0, n_ignored = 0;

  always #5 clk = ~clk;

  mult_top dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters on internal state
  always @(posedge dut.u_mp.le2) n_l2++;
  always @(posedge dut.u_mp.le1) n_l1++;
  always @(negedge clk) begin
    if (dut.u_mp.lo_c_q) n_lo_carry++;
    if (dut.u_cs.busy && dut.u_cs.u_add.c[W/4-1]) n_sel_carry++;
  end

  task automatic count_digits(input logic [W-1:0] b, input logic s);
    logic [W+1:0] x;
    x = {s & b[W-1], b, 1'b0};
    for (int j = 0; j <= W / 2; j++) begin
      int d;
      d = -2 * int'(x[2*j+2 > W+1 ? W+1 : 2*j+2]) + int'(x[2*j+1]) + int'(x[2*j]);
      if (2*j + 2 > W + 1) d = int'(x[2*j+1]) + int'(x[2*j]) - 2 * int'(x[W+1]);
      n_digit[d+2]++;
    end
  endtask

  task automatic mp_run(input logic [W-1:0] a, input logic [W-1:0] b, input logic s,
                        input bit poke);
    logic [2*W-1:0] expv;
    int lat, l1_0, l2_0;
    l1_0 = n_l1; l2_0 = n_l2;
    @(negedge clk);
    mp_mcand = a; mp_mplier = b; mp_tc = s; mp_start = 1'b1;
    @(negedge clk);
    mp_start = 1'b0;
    lat = 0;
    if (poke) begin
      mp_mcand = ~a; mp_tc = ~s; mp_start = 1'b1;
      @(negedge clk); mp_start = 1'b0; lat++;
    end
    while (!mp_done) begin @(negedge clk); lat++; end
    if (poke && lat > 0) n_ignored++;
    if (s) begin
      expv = (2*W)'($signed({{W{a[W-1]}}, a}) * $signed({{W{b[W-1]}}, b}));
      n_signed++;
    end else begin
      expv = {{W{1'b0}}, a} * {{W{1'b0}}, b};
      n_unsigned++;
    end
    count_digits(b, s);
    checks++;
    if (mp_product != expv || lat != NITER + 1 || n_l1 - l1_0 != NITER ||
        n_l2 - l2_0 != NITER) begin
      failures++;
      $display("FAIL mp tc=%b %h * %h = %h expected %h, latency %0d, L1 %0d L2 %0d",
               s, a, b, mp_product, expv, lat, n_l1 - l1_0, n_l2 - l2_0);
    end
  endtask

  task automatic cs_run(input logic [W-1:0] a, input logic [W-1:0] b, input bit poke);
    logic [2*W-1:0] expv;
    int lat;
    @(negedge clk);
    cs_mcand = a; cs_mplier = b; cs_start = 1'b1;
    @(negedge clk);
    cs_start = 1'b0;
    lat = 0;
    if (poke) begin
      cs_mcand = ~a; cs_start = 1'b1;
      @(negedge clk); cs_start = 1'b0; lat++;
    end
    while (!cs_done) begin @(negedge clk); lat++; end
    if (poke) n_ignored++;
    expv = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (cs_product != expv || lat != W) begin
      failures++;
      $display("FAIL cs %h * %h = %h expected %h, latency %0d", a, b, cs_product, expv, lat);
    end
  endtask

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    mp_start = 1'b0; mp_tc = 1'b0; mp_mcand = '0; mp_mplier = '0;
    cs_start = 1'b0; cs_mcand = '0; cs_mplier = '0;
    n_reset = 1'b0;
    #17 n_reset = 1'b1;
    fork
      begin
        mp_run('1, '1, 1'b0, 0);
        mp_run('1, '1, 1'b1, 0);
        mp_run({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b1, 1);
        mp_run({1'b0, {(W-1){1'b1}}}, {(W/2){2'b10}}, 1'b0, 0);
        for (int r = 0; r < 300; r++)
          mp_run(W'($urandom()), W'($urandom()), 1'($urandom()), r % 9 == 0);
      end
      begin
        cs_run('1, '1, 0);
        cs_run('1, W'(1), 1);
        for (int r = 0; r < 40; r++) cs_run(W'($urandom()), W'($urandom()), r % 9 == 0);
      end
    join
    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d signed:%0d unsigned:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_signed, n_unsigned);
    $display("L1 openings:%0d L2 openings:%0d low carries:%0d select carries:%0d ignored starts:%0d",
             n_l1, n_l2, n_lo_carry, n_sel_carry, n_ignored);
    foreach (n_digit[i]) if (n_digit[i] == 0) begin
      failures++; $display("FAIL Booth digit %0d never used", i - 2);
    end
    if (n_signed == 0 || n_unsigned == 0 || n_l1 == 0 || n_l2 == 0 || n_lo_carry == 0 ||
        n_sel_carry == 0 || n_ignored == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
