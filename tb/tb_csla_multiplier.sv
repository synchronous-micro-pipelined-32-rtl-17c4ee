// tb_csla_multiplier: unsigned products of random and extreme operands against
// the simulator's multiplication; done must rise exactly W clock edges after
// the start edge, and a start while busy must be ignored.
module tb_csla_multiplier;
  localparam int unsigned W = 32;
  logic clk = 1'b0, n_reset, start;
  logic [W-1:0] mcand, mplier;
  logic busy, done;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  csla_multiplier #(.W(W)) dut (.clk, .n_reset, .start, .mcand, .mplier,
                                .busy, .done, .product);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b, input bit poke);
    logic [2*W-1:0] expv;
    int lat;
    @(negedge clk);
    mcand = a; mplier = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    if (poke) begin   // a second start while busy, with other operands
      mcand = ~a; mplier = ~b; start = 1'b1;
      @(negedge clk); start = 1'b0; lat++;
    end
    while (!done) begin @(negedge clk); lat++; end
    expv = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (product != expv || lat - 1 != W) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h, latency %0d", a, b, product, expv, lat - 1);
    end
  endtask

  initial begin
    start = 1'b0; mcand = '0; mplier = '0;
    n_reset = 1'b0;
    #17 n_reset = 1'b1;
    run('1, '1, 0);
    run('0, '1, 0);
    run('1, W'(1), 1);
    run(W'(32'h8000_0000), W'(32'h8000_0000), 0);
    for (int r = 0; r < 60; r++) run(W'($urandom()), W'($urandom()), r % 5 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
