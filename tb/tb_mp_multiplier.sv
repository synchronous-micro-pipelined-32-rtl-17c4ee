// tb_mp_multiplier: signed and unsigned products of random and extreme
// operands against the simulator's multiplication. The product must appear
// (done high) exactly NITER + 1 clock edges after the start edge, 6 for
// 32-bit operands; a start while busy must be ignored; and back-to-back
// operations must work.
module tb_mp_multiplier;
  localparam int unsigned W = 32;
  localparam int unsigned LAT = ((W / 2 + 1) + 3) / 4 + 1;
  logic clk = 1'b0, n_reset, start, tc;
  logic [W-1:0] mcand, mplier;
  logic busy, done;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mp_multiplier dut (.clk, .n_reset, .start, .tc, .mcand, .mplier,
                     .busy, .done, .product);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b, input logic s,
                     input bit poke);
    logic [2*W-1:0] expv;
    int lat;
    @(negedge clk);
    mcand = a; mplier = b; tc = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    if (poke) begin
      mcand = ~a; mplier = b ^ 1; tc = ~s; start = 1'b1;
      @(negedge clk); start = 1'b0; lat++;
    end
    while (!done) begin @(negedge clk); lat++; end
    if (s) expv = (2*W)'($signed({{W{a[W-1]}}, a}) * $signed({{W{b[W-1]}}, b}));
    else   expv = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (product != expv || lat - 1 != LAT) begin
      failures++;
      $display("FAIL tc=%b %h * %h = %h expected %h, latency %0d (want %0d)",
               s, a, b, product, expv, lat - 1, LAT);
    end
  endtask

  initial begin
    logic [W-1:0] corner [6];
    start = 1'b0; tc = 1'b0; mcand = '0; mplier = '0;
    corner[0] = '0; corner[1] = '1; corner[2] = W'(1);
    corner[3] = {1'b1, {(W-1){1'b0}}}; corner[4] = {1'b0, {(W-1){1'b1}}};
    corner[5] = {(W/2){2'b10}};
    n_reset = 1'b0;
    #17 n_reset = 1'b1;
    for (int s = 0; s < 2; s++)
      foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j], 1'(s), 0);
    for (int r = 0; r < 400; r++)
      run(W'($urandom()), W'($urandom()), 1'($urandom()), r % 7 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
