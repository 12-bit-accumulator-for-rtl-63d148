// tb_sine_rom: self-check of the sine look-up table.
//
// Reads all 4096 addresses. Each sample is compared with an independent
// evaluation of 127.5 + 127.5*sin(angle), allowing one code of rounding
// difference; the half-wave symmetry data(a) + data(a + 2048) = 255 (one code
// of slack) and the exact samples at 0, 90, 180 and 270 degrees are checked
// too. A watchdog counts a failure if the sweep does not complete.
module tb_sine_rom;
  logic [11:0] addr;
  logic [7:0]  data;
  logic [7:0]  samples [4096];
  int   checks = 0, failures = 0;

  sine_rom dut (.addr(addr), .data(data));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(int unsigned a, int unsigned code);
    checks++;
    if (int'(samples[a]) != code) begin
      failures++;
      $display("FAIL addr %0d: %0d, expected %0d", a, samples[a], code);
    end
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) begin
      real angle, want, diff;
      addr = 12'(a);
      #1;
      samples[a] = data;
      angle = real'(a) * 3.141592653589793 / 2048.0;
      want  = 127.5 * (1.0 + $sin(angle));
      diff  = real'(data) - want;
      checks++;
      if (diff > 0.5001 || diff < -0.5001) begin
        failures++;
        $display("FAIL addr %0d: data %0d, sine gives %f", a, data, want);
      end
    end
    for (int a = 0; a < 2048; a++) begin
      int s;
      s = int'(samples[a]) + int'(samples[a + 2048]);
      checks++;
      if (s < 254 || s > 256) begin
        failures++;
        $display("FAIL symmetry at %0d: %0d + %0d", a, samples[a], samples[a + 2048]);
      end
    end
    expect_code(0, 128);      // 0 degrees: mid-scale (127.5 rounds up)
    expect_code(1024, 255);   // 90 degrees: full scale
    expect_code(2048, 128);   // 180 degrees
    expect_code(3072, 0);     // 270 degrees: zero
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
