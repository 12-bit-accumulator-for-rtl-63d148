// tb_dff: self-check of the rising-edge D flip-flop.
//
// Checks the asynchronous reset, then drives random d values that change
// away from the rising edge and checks that q shows the value d had at the
// last rising edge (and holds it across the falling edge), with q_bar = ~q.
// A watchdog counts a failure after 1000 clock cycles.
module tb_dff;
  logic clk = 1'b0, rst_n, d, q, q_bar;
  logic expected;
  int   checks = 0, failures = 0;

  dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .q_bar(q_bar));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== expected || q_bar !== ~expected) begin
      failures++;
      $display("FAIL %s: q=%b q_bar=%b expected q=%b", what, q, q_bar, expected);
    end
  endtask

  initial begin
    d     = 1'b1;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;          // a falling reset edge, away from the clock edge
    #1;
    expected = 1'b0;
    check("reset");
    @(negedge clk);
    check("reset held over a rising edge");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      // change d in the low phase, sample expectation at the rising edge
      d = 1'($urandom);
      @(posedge clk);
      expected = d;
      #1;
      check("after rising edge");
      d = ~d;                 // change d while clk is high: q must not follow
      @(negedge clk);
      #1;
      check("after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
