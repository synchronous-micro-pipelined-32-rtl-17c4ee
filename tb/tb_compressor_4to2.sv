// tb_compressor_4to2: random and extreme operands; the two output rows must add
// to the sum of the four inputs modulo 2^W, and the carry row's bit 0 is zero.
module tb_compressor_4to2;
  localparam int unsigned W = 41;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  compressor_4to2 #(.W(W)) dut (.a, .b, .c, .d, .s, .cy);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] expv;
    #1;
    expv = a + b + c + d;
    checks++;
    if (W'(s + cy) != expv || cy[0] != 1'b0) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h d=%h: s=%h cy=%h", a, b, c, d, s, cy);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; d = '1; check();
    a = '0; b = '0; c = '0; d = '0; check();
    a = '1; b = '0; c = '1; d = '0; check();
    for (int r = 0; r < 2000; r++) begin
      a = W'({$urandom(), $urandom()});
      b = W'({$urandom(), $urandom()});
      c = W'({$urandom(), $urandom()});
      d = W'({$urandom(), $urandom()});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
