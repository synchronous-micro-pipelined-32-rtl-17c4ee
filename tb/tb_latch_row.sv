// tb_latch_row: the row must follow d while le is high and hold the last value
// while le is low, whatever d does.
module tb_latch_row;
  localparam int unsigned W = 16;
  logic le;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  latch_row #(.W(W)) dut (.le, .d, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    le = 1'b1;
    d  = '0;
    #1;
    for (int r = 0; r < 200; r++) begin
      // transparent
      le = 1'b1;
      d = W'($urandom());
      #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL transparent: q=%h d=%h", q, d); end
      held = d;
      le = 1'b0;
      #1;
      // opaque: changes on d must not reach q
      repeat (3) begin
        d = W'($urandom());
        #1;
        checks++;
        if (q !== held) begin failures++; $display("FAIL hold: q=%h held=%h", q, held); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
