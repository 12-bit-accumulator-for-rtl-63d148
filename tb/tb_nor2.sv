// tb_nor2: exhaustive self-check of the 2-input NOR cell nor2.
//
// Applies all four input combinations and compares oup with the NOR truth
// table, written out as a constant (bit i is the output for {inp1,inp2} == i).
// A watchdog ends the run with a failure if the sequence never completes.
module tb_nor2;
  localparam logic [3:0] TRUTH = 4'b0001;

  logic inp1, inp2, oup;
  int   checks = 0, failures = 0;

  nor2 dut (.inp1(inp1), .inp2(inp2), .oup(oup));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {inp1, inp2} = 2'(i);
      #10;
      checks++;
      if (oup !== TRUTH[i]) begin
        failures++;
        $display("FAIL inp1=%b inp2=%b oup=%b expected %b", inp1, inp2, oup, TRUTH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
