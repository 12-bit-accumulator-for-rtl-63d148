// tb_inv: exhaustive self-check of the inverter cell inv.
//
// Drives inp = 0 and 1 and expects oup = 1 and 0. A watchdog ends the run
// with a failure if the sequence never completes.
module tb_inv;
  logic inp, oup;
  int   checks = 0, failures = 0;

  inv dut (.inp(inp), .oup(oup));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inp = 1'b0;
    #10;
    checks++;
    if (oup !== 1'b1) begin failures++; $display("FAIL inp=0 oup=%b", oup); end
    inp = 1'b1;
    #10;
    checks++;
    if (oup !== 1'b0) begin failures++; $display("FAIL inp=1 oup=%b", oup); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
