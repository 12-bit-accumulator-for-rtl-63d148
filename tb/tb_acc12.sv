// tb_acc12: self-check of the 12-bit pipelined phase accumulator.
//
// The reference model keeps three untruncated running sums of the input
// word's slices, each lagging the next-higher one by one clock:
//   F(n) = sum_{e<=n-2} A[3:0](e) + 16*sum_{e<=n-1} A[7:4](e) + 256*sum_{e<=n} A[11:8](e)
// and expects S = F(n) mod 4096 and Cout0 = 1 exactly when F crossed a
// multiple of 4096 on this edge. It also checks, for constant words, that S
// advances by exactly A every clock (one phase step per cycle), and that the
// low slice's first sum reaches S after the third clock edge.
// Phases: constant words (including 0x800, 0x001 and 0xFFF), then a new random
// word every cycle. Counts slice-to-slice carries and wraps; a failure is
// counted if any never happened. Watchdog: 100000 clock cycles.
module tb_acc12;
  logic        clk = 1'b0, rst_n;
  logic [11:0] A, S, S_prev;
  logic        Cout0;
  longint unsigned sum_lo, sum_mid, sum_hi, f_now, f_prev;
  logic [3:0]  a_lo_d1, a_lo_d2;   // low bits sampled one and two edges ago
  logic [3:0]  a_mid_d1;
  int   checks = 0, failures = 0;
  int   wraps = 0, carry01 = 0, carry12 = 0;

  acc12 dut (.clk(clk), .rst_n(rst_n), .A(A), .S(S), .Cout0(Cout0));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: A=%03h S=%03h Cout0=%b expected S=%03h", what, A, S, Cout0, 12'(f_now));
    end
  endtask

  // Apply word a for one clock edge, update the reference, check the outputs.
  task automatic step(logic [11:0] a, bit constant_word);
    longint unsigned lo_before, mid_before;
    A = a;
    // reference: the edge adds the top bits now, the middle bits one edge late
    // and the low bits two edges late
    lo_before  = (sum_lo % 16);
    mid_before = ((sum_lo / 16) + sum_mid) % 16;
    sum_hi  += longint'(a[11:8]);
    sum_mid += longint'(a_mid_d1);
    sum_lo  += longint'(a_lo_d2);
    if (lo_before + longint'(a_lo_d2) >= 16) carry01++;
    if (mid_before + longint'(a_mid_d1) + ((lo_before + longint'(a_lo_d2)) / 16) >= 16) carry12++;
    a_lo_d2  = a_lo_d1;
    a_lo_d1  = a[3:0];
    a_mid_d1 = a[7:4];
    f_prev = f_now;
    f_now  = sum_lo + 16 * sum_mid + 256 * sum_hi;
    S_prev = S;
    @(negedge clk);
    check(S === 12'(f_now), "phase word");
    check(Cout0 === ((f_now / 4096) != (f_prev / 4096)), "carry out");
    if (Cout0) wraps++;
    if (constant_word) check(S === 12'(S_prev + a), "step of exactly A per clock");
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
    logic [11:0] w;
    restart();
    // latency: low bits of the first sum appear after the third edge
    step(12'h001, 1'b0);
    check(S === 12'h000, "low slice not yet at output after edge 1");
    step(12'h001, 1'b0);
    check(S === 12'h000, "low slice not yet at output after edge 2");
    step(12'h001, 1'b0);
    check(S === 12'h001, "low slice at output after edge 3");
    for (int i = 0; i < 4200; i++) step(12'h001, i > 0);   // one full accumulation cycle

    foreach (w_list[k]) begin
      restart();
      step(w_list[k], 1'b0);
      step(w_list[k], 1'b0);
      for (int i = 0; i < 300; i++) step(w_list[k], 1'b1);
    end

    restart();
    for (int i = 0; i < 20000; i++) step(12'($urandom), 1'b0);

    check(wraps > 0, "a phase wrap happened");
    check(carry01 > 0, "a carry from slice 0 to slice 1 happened");
    check(carry12 > 0, "a carry from slice 1 to slice 2 happened");
    $display("wraps=%0d carries 0->1=%0d carries 1->2=%0d", wraps, carry01, carry12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] w_list [6] = '{12'h800, 12'hFFF, 12'h00F, 12'h0F0, 12'h135, 12'hABC};
endmodule
