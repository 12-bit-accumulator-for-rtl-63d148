// tb_full_adder: exhaustive self-check of the one-bit full adder.
//
// For all eight (A, B, Cin) combinations the expected {Cout, S} is the
// two-bit integer sum A + B + Cin. A watchdog ends the run with a failure if
// the sequence never completes.
module tb_full_adder;
  logic A, B, Cin, S, Cout;
  int   checks = 0, failures = 0;

  full_adder dut (.A(A), .B(B), .Cin(Cin), .S(S), .Cout(Cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int unsigned total;
      {A, B, Cin} = 3'(i);
      total = int'(A) + int'(B) + int'(Cin);
      #10;
      checks++;
      if ({Cout, S} !== 2'(total)) begin
        failures++;
        $display("FAIL A=%b B=%b Cin=%b -> Cout=%b S=%b, expected %0d", A, B, Cin, Cout, S, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
