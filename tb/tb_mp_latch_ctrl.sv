// tb_mp_latch_ctrl: drives a latch controller of each phase polarity with a
// well-behaved two-phase sender (toggles req only after the last token was
// acknowledged) and a receiver that acknowledges after a random delay, and
// compares every output with a reference model of the handshake. Also checks
// that the latch enable is high only in the controller's own clock phase, that
// a withheld acknowledge stalls the controller, and that back-to-back tokens
// pass one per clock cycle.
module tb_mp_latch_ctrl;
  logic clk = 1'b0, n_reset;
  int checks = 0, failures = 0, stalls = 0, back_to_back = 0;

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // index 0: open in the high phase, index 1: open in the low phase
  logic req_in [2], ack_out [2], req_out [2], ack_in [2], le [2], take [2];

  mp_latch_ctrl #(.OPEN_HIGH(1'b1)) dut_h (
    .clk, .n_reset, .req_in(req_in[0]), .ack_out(ack_out[0]),
    .req_out(req_out[0]), .ack_in(ack_in[0]), .le(le[0]), .take(take[0]));
  mp_latch_ctrl #(.OPEN_HIGH(1'b0)) dut_l (
    .clk, .n_reset, .req_in(req_in[1]), .ack_out(ack_out[1]),
    .req_out(req_out[1]), .ack_in(ack_in[1]), .le(le[1]), .take(take[1]));

  // reference model, updated on each controller's opening edge
  logic m_ack [2], m_req [2], m_take [2];
  int   last_take [2];
  int   cyc = 0;
  bit   greedy = 1'b0;   // receiver acknowledges at once, sender always sends

  always @(posedge clk) cyc++;

  task automatic model_edge(input int i);
    logic acc;
    acc = (req_in[i] ^ m_ack[i]) & ~(m_req[i] ^ ack_in[i]);
    if ((req_in[i] ^ m_ack[i]) && !acc) stalls++;
    m_take[i] = acc;
    if (acc) begin
      if (last_take[i] == cyc - 1) back_to_back++;
      last_take[i] = cyc;
      m_ack[i] = req_in[i];
      m_req[i] = ~m_req[i];
    end
    #1;
    checks++;
    if (take[i] !== m_take[i] || ack_out[i] !== m_ack[i] || req_out[i] !== m_req[i] ||
        le[i] !== m_take[i]) begin
      failures++;
      $display("FAIL ctrl %0d cyc %0d: take=%b/%b ack=%b/%b req=%b/%b le=%b",
               i, cyc, take[i], m_take[i], ack_out[i], m_ack[i], req_out[i], m_req[i], le[i]);
    end
  endtask

  // closing edge: the enable must be low outside the open phase
  task automatic close_edge(input int i);
    #1;
    checks++;
    if (le[i] !== 1'b0) begin
      failures++;
      $display("FAIL ctrl %0d cyc %0d: latch open outside its phase", i, cyc);
    end
  endtask

  always @(posedge clk) if (n_reset) begin model_edge(0); end
  always @(negedge clk) if (n_reset) begin close_edge(0); end
  always @(negedge clk) if (n_reset) begin model_edge(1); end
  always @(posedge clk) if (n_reset) begin close_edge(1); end

  // stimulus: change inputs mid-way through the phase before the opening edge
  task automatic drive(input int i);
    // sender: new token only when the last one was acknowledged
    if (req_in[i] == ack_out[i] && (greedy || $urandom_range(0, 3) != 0))
      req_in[i] = ~req_in[i];
    // receiver: acknowledge an outstanding token, sometimes late
    if (req_out[i] != ack_in[i] && (greedy || $urandom_range(0, 2) == 0))
      ack_in[i] = req_out[i];
  endtask

  always @(negedge clk) if (n_reset) begin #2; drive(0); end
  always @(posedge clk) if (n_reset) begin #2; drive(1); end

  initial begin
    for (int i = 0; i < 2; i++) begin
      req_in[i] = 1'b0; ack_in[i] = 1'b0;
      m_ack[i] = 1'b0; m_req[i] = 1'b0; m_take[i] = 1'b0; last_take[i] = -10;
    end
    n_reset = 1'b0;
    #23 n_reset = 1'b1;
    repeat (400) @(posedge clk);
    greedy = 1'b1;
    repeat (100) @(posedge clk);
    #3;
    if (stalls == 0 || back_to_back < 50) begin
      failures++;
      $display("FAIL coverage: stalls=%0d back_to_back=%0d", stalls, back_to_back);
    end
    $display("stalls=%0d back_to_back=%0d", stalls, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
