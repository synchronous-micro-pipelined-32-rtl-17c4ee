// tb_csla: carry-select adder against the simulator's own addition, with random
// operands, both carry-in values and carries that run through every block.
module tb_csla;
  localparam int unsigned W = 32;
  localparam int unsigned BLK = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  csla #(.W(W), .BLK(BLK)) dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] expv;
    #1;
    expv = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} != expv) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h expected %h", a, b, cin, cout, sum, expv);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check();          // carry through all blocks
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    a = '1; b = W'(1); cin = 1'b0; check();
    for (int r = 0; r < 3000; r++) begin
      a = W'($urandom()); b = W'($urandom()); cin = 1'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
