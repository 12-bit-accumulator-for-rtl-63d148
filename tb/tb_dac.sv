// tb_dac: self-check of the behavioural DAC model.
//
// For every input code the output voltage (in microvolts) is compared with
// 1.65 V + 1.7 V * code / 255 worked out in floating point, allowing 1 uV of
// rounding; the two ends of the range (1.65 V and 3.35 V, i.e. 1.7 V peak to
// peak around 2.5 V) are checked exactly. Watchdog on simulated time.
module tb_dac;
  logic [7:0]  code;
  logic [31:0] vout_uv;
  int   checks = 0, failures = 0;

  dac dut (.code(code), .vout_uv(vout_uv));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      real want, diff;
      code = 8'(c);
      #1;
      want = 1.65e6 + 1.7e6 * real'(c) / 255.0;
      diff = real'(vout_uv) - want;
      checks++;
      if (diff > 1.0 || diff < -1.0) begin
        failures++;
        $display("FAIL code %0d: %0d uV, expected %f", c, vout_uv, want);
      end
    end
    code = 8'd0;   #1; checks++; if (vout_uv != 32'd1_650_000) begin failures++; $display("FAIL bottom %0d", vout_uv); end
    code = 8'd255; #1; checks++; if (vout_uv != 32'd3_350_000) begin failures++; $display("FAIL top %0d", vout_uv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
