// tb_booth_mux: checks the biased Booth partial product q = 2^MW + d*M for all
// five digits {-2,-1,0,+1,+2} and random and extreme signed multiplicands.
module tb_booth_mux;
  localparam int unsigned MW = 33;
  mp_pkg::booth_sel_t sel;
  logic [MW-1:0] m;
  logic [MW+1:0] q;
  int checks = 0, failures = 0;

  booth_mux #(.MW(MW)) dut (.sel, .m, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int d, input logic [MW-1:0] mv);
    longint expv, mval;
    sel.neg = (d < 0);
    sel.one = (d == 1 || d == -1);
    sel.two = (d == 2 || d == -2);
    m = mv;
    #1;
    mval = longint'($signed(mv));
    expv = (longint'(1) << MW) + longint'(d) * mval;
    checks++;
    if (longint'(q) != expv) begin
      failures++;
      $display("FAIL d=%0d m=%0d: q=%0d expected %0d", d, mval, q, expv);
    end
  endtask

  initial begin
    logic [MW-1:0] corner [5];
    corner[0] = '0;
    corner[1] = {1'b0, {(MW-1){1'b1}}};   // largest positive
    corner[2] = {1'b1, {(MW-1){1'b0}}};   // most negative
    corner[3] = '1;                       // -1
    corner[4] = MW'(1);
    for (int d = -2; d <= 2; d++) begin
      foreach (corner[i]) check(d, corner[i]);
      for (int r = 0; r < 200; r++) check(d, {$urandom(), $urandom()});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
