// tb_acc4: self-check of the 4-bit accumulator slice.
//
// First the test word 0011 of the original slice test is applied with the
// carry in held low: S must step 0, 3, 6, 9, ... (mod 16) and Cout0 must pulse
// in the cycle after each wrap. Then A and cin are randomised every cycle.
// The expected {Cout0, S} after each rising edge is the 5-bit integer sum of
// the previous S, A and cin. One result per clock is checked (rate 1/cycle).
// A watchdog counts a failure after 5000 clock cycles.
module tb_acc4;
  logic       clk = 1'b0, rst_n;
  logic [3:0] A, S;
  logic       cin, Cout0;
  int unsigned ref_s, ref_c, total;
  int   checks = 0, failures = 0, wraps = 0;

  acc4 dut (.clk(clk), .rst_n(rst_n), .A(A), .cin(cin), .S(S), .Cout0(Cout0));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inputs change on the falling edge; results are checked one falling edge later
  task automatic step(logic [3:0] a, logic c);
    A   = a;
    cin = c;
    total = ref_s + int'(a) + int'(c);
    @(negedge clk);
    ref_s = total % 16;
    ref_c = total / 16;
    checks++;
    if (S !== 4'(ref_s) || Cout0 !== 1'(ref_c)) begin
      failures++;
      $display("FAIL A=%0d cin=%b: S=%0d Cout0=%b, expected S=%0d Cout0=%0d", a, c, S, Cout0, ref_s, ref_c);
    end
    if (ref_c != 0) wraps++;
  endtask

  initial begin
    A = '0; cin = 1'b0; rst_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (S !== 4'd0 || Cout0 !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    ref_s = 0; ref_c = 0;
    for (int i = 0; i < 32; i++) step(4'b0011, 1'b0);    // increments of three
    for (int i = 0; i < 1000; i++) step(4'($urandom), 1'($urandom));
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no carry out ever seen"); end
    $display("carry-out pulses seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
