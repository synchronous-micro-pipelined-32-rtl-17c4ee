// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder.
// Every 9-bit window (four digits) is applied; each digit's select lines are
// turned back into a value and compared with -2*b[2j+1] + b[2j] + b[2j-1].
// The select lines must also be legal: never one and two together, and no
// negative zero.
module tb_booth_encoder;
  localparam int unsigned DIGITS = 4;
  logic [2*DIGITS:0] win;
  mp_pkg::booth_sel_t [DIGITS-1:0] sel;
  int checks = 0, failures = 0;

  booth_encoder #(.DIGITS(DIGITS)) dut (.win, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*DIGITS+1)); v++) begin
      win = (2*DIGITS+1)'(v);
      #1;
      for (int j = 0; j < DIGITS; j++) begin
        int expv, got;
        expv = -2 * int'(win[2*j+2]) + int'(win[2*j+1]) + int'(win[2*j]);
        got  = sel[j].two ? 2 : (sel[j].one ? 1 : 0);
        if (sel[j].neg) got = -got;
        checks++;
        if (got != expv || (sel[j].one && sel[j].two) ||
            (sel[j].neg && !sel[j].one && !sel[j].two)) begin
          failures++;
          $display("FAIL win=%b digit %0d: got %0d (n%0b o%0b t%0b) expected %0d",
                   win, j, got, sel[j].neg, sel[j].one, sel[j].two, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
