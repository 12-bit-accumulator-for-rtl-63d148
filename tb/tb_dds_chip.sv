// tb_dds_chip: end-to-end self-check of the synthesizer at its default sizes.
//
// Runs the chip through the operating points of the original design:
//  1. frequency word 0x800 with a 50 MHz clock: the phase must alternate
//     between two values 2048 apart and wrap every second clock, i.e. a
//     25 MHz output;
//  2. frequency word 0x001: one full accumulation cycle (the staircase of the
//     phase word) lasts exactly 4096 clocks between two wraps, and the DAC
//     output sweeps the full 1.7 V peak to peak;
//  3. a new random word every 50 clocks, exercising every carry path.
// Every clock the phase S and wrap flag Cout0 are compared with a reference
// built from three lagging running sums (see acc12), the ROM sample with
// 127.5 + 127.5*sin(2*pi*S/4096) and the output voltage with
// 1.65 V + 1.7 V*sample/255. It counts wraps, slice-to-slice carries and
// word changes and fails if one never happened. Watchdog: 200000 clocks.
module tb_dds_chip;
  localparam real TCLK_NS = 20.0;   // 50 MHz

  logic        clk = 1'b0, rst_n;
  logic [11:0] A, S;
  logic        Cout0;
  logic [7:0]  sample;
  logic [31:0] out;

  longint unsigned sum_lo, sum_mid, sum_hi, f_now, f_prev;
  logic [3:0]  a_lo_d1, a_lo_d2, a_mid_d1;
  int   checks = 0, failures = 0;
  int   wraps = 0, carry01 = 0, carry12 = 0, word_changes = 0;
  longint cycle = 0;

  dds_chip dut (.clk(clk), .rst_n(rst_n), .A(A), .S(S), .Cout0(Cout0), .sample(sample), .out(out));

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d: A=%03h S=%03h Cout0=%b sample=%0d out=%0d", what, cycle, A, S, Cout0, sample, out);
    end
  endtask

  task automatic step(logic [11:0] a);
    longint unsigned lo_before, mid_before;
    real want, diff;
    if (a !== A) word_changes++;
    A = a;
    lo_before  = sum_lo % 16;
    mid_before = ((sum_lo / 16) + sum_mid) % 16;
    if (lo_before + longint'(a_lo_d2) >= 16) carry01++;
    if (mid_before + longint'(a_mid_d1) + ((lo_before + longint'(a_lo_d2)) / 16) >= 16) carry12++;
    sum_hi  += longint'(a[11:8]);
    sum_mid += longint'(a_mid_d1);
    sum_lo  += longint'(a_lo_d2);
    a_lo_d2  = a_lo_d1;
    a_lo_d1  = a[3:0];
    a_mid_d1 = a[7:4];
    f_prev = f_now;
    f_now  = sum_lo + 16 * sum_mid + 256 * sum_hi;
    @(negedge clk);
    cycle++;
    check(S === 12'(f_now), "phase word");
    check(Cout0 === ((f_now / 4096) != (f_prev / 4096)), "wrap flag");
    if (Cout0) wraps++;
    want = 127.5 * (1.0 + $sin(real'(S) * 3.141592653589793 / 2048.0));
    diff = real'(sample) - want;
    check(diff <= 0.5001 && diff >= -0.5001, "sine sample");
    want = 1.65e6 + 1.7e6 * real'(sample) / 255.0;
    diff = real'(out) - want;
    check(diff <= 1.0 && diff >= -1.0, "output voltage");
  endtask

  task automatic restart();
    rst_n = 1'b0;
    A = '0;
    @(negedge clk);
    check(S === 12'd0 && Cout0 === 1'b0, "reset");
    rst_n = 1'b1;
    sum_lo = 0; sum_mid = 0; sum_hi = 0; f_now = 0; f_prev = 0;
    a_lo_d1 = '0; a_lo_d2 = '0; a_mid_d1 = '0;
  endtask

  initial begin
    int   n_wrap, first_wrap, second_wrap;
    int unsigned vmin, vmax;
    real  fout_mhz;

    // 1. 25 MHz output from a 50 MHz clock
    restart();
    n_wrap = 0;
    for (int i = 0; i < 1000; i++) begin
      step(12'h800);
      if (Cout0) n_wrap++;
      if (i > 0) check(S == 12'h000 || S == 12'h800, "phase alternates 0 / 0x800");
    end
    fout_mhz = real'(n_wrap) / (1000.0 * TCLK_NS) * 1000.0;
    $display("word 0x800: %0d wraps in 1000 clocks -> %0.2f MHz", n_wrap, fout_mhz);
    check(n_wrap == 500, "25 MHz: one wrap every second clock");

    // 2. one full accumulation cycle with the smallest word
    restart();
    first_wrap = -1; second_wrap = -1;
    vmin = '1; vmax = 0;
    for (int i = 0; i < 9000; i++) begin
      step(12'h001);
      if (out < vmin) vmin = out;
      if (out > vmax) vmax = out;
      if (Cout0) begin
        if (first_wrap < 0) first_wrap = i;
        else if (second_wrap < 0) second_wrap = i;
      end
    end
    $display("word 0x001: wraps at clocks %0d and %0d, output %0d..%0d uV", first_wrap, second_wrap, vmin, vmax);
    check(first_wrap >= 0 && second_wrap - first_wrap == 4096, "full accumulation cycle of 4096 clocks");
    check(vmin == 1_650_000 && vmax == 3_350_000, "1.7 V peak to peak output");

    // 3. changing frequency words
    restart();
    for (int i = 0; i < 20000; i++) begin
      logic [11:0] w;
      if (i % 50 == 0) w = 12'($urandom);
      step(w);
    end

    check(wraps > 0, "phase wrap happened");
    check(carry01 > 0, "carry from slice 0 to slice 1 happened");
    check(carry12 > 0, "carry from slice 1 to slice 2 happened");
    check(word_changes > 3, "frequency word changes happened");
    $display("wraps=%0d carries 0->1=%0d carries 1->2=%0d word changes=%0d", wraps, carry01, carry12, word_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
