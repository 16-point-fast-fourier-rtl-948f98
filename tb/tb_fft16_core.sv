// tb_fft16_core: end-to-end test of the serial FFT core at its default size
// (16 points, 64-bit words).
//
// Each pass pulses start, feeds 16 samples in the following 16 cycles
// (checking in_take), and then expects out_valid for exactly 16 cycles,
// starting 19 cycles after start, with the round-trip results in order.
//  * Pass 1 is the document's demonstration, the ramp 0..15: the internal
//    forward spectrum must equal the published frequency-domain values and
//    the serial outputs the published round-trip values (six decimals).
//  * Further passes use random sequences; every output word must equal an
//    independent integer model of the round trip exactly, and be close to
//    the input sequence.
// Situations that must each occur at least once: a start ignored while busy,
// a back-to-back pass (start given in the last output cycle), an idle gap,
// and a reset in the middle of a pass after which the core works again.
module tb_fft16_core;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0;
  int passes = 0, ignored_starts = 0, back_to_back = 0, idle_gaps = 0, resets = 0;

  logic          clk = 0, rst = 1, start = 0;
  logic [63:0]   si = '0;
  logic          in_take, busy, out_valid;
  logic [63:0]   so_re, so_im;

  fft16_core dut (.clk, .rst, .start, .si, .in_take, .busy, .out_valid, .so_re, .so_im);

  always #5 clk = ~clk;

  localparam real SCALE = 268435456.0;
  localparam real FWD_RE [16] = '{120.0, -8.005859, -8.0, -8.066406, -8.0, -7.933594, -8.0, -7.994141,
                                  -8.0, -7.994141, -8.0, -7.933594, -8.0, -8.066406, -8.0, -8.005859};
  localparam real FWD_IM [16] = '{0.0, 40.058594, 19.25, 11.869141, 8.0, 5.369141, 3.25, 1.558594,
                                  0.0, -1.558594, -3.25, -5.369141, -8.0, -11.869141, -19.25, -40.058594};
  localparam real INV_RE [16] = '{0.25, 1.112389, 2.044922, 3.182549, 3.875, 4.915062, 6.044922, 7.304710,
                                  7.75, 9.020424, 9.955078, 10.950264, 12.125, 12.952126, 13.955078, 14.562477};
  localparam real INV_IM [16] = '{0.0, -0.007835, 0.0, -0.013695, 0.0, 0.014732, 0.0, 0.007744,
                                  0.0, 0.007835, 0.0, 0.013695, 0.0, -0.014732, 0.0, -0.007744};

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic cycle();
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pass. If started is set, start was already given in the previous
  // cycle. If chain is set, start is given again in the last output cycle.
  task automatic run_pass(input vec16_t x, input bit started, input bit chain, input bit is_ramp);
    vec16_t zr, zi;
    round_trip(x, zr, zi);
    if (!started) begin
      check(!busy, "idle before start");
      start = 1;
      cycle();
    end
    // Cycles 1..16: fill.
    for (int i = 0; i < 16; i++) begin
      start = ($urandom_range(3) == 0);
      si    = x[i];
      check(in_take && busy && !out_valid, "in_take during fill");
      if (start && busy) ignored_starts++;
      cycle();
    end
    start = 0;
    si    = {$urandom, $urandom};   // must be ignored from now on
    // Cycles 17, 18: load and first shift.
    for (int i = 0; i < 2; i++) begin
      check(!in_take && busy && !out_valid, "no valid before results");
      cycle();
    end
    if (is_ramp) begin
      for (int k = 0; k < 16; k++) begin
        real gr, gi;
        gr = real'($signed(dut.spectrum[k].re)) / SCALE;
        gi = real'($signed(dut.spectrum[k].im)) / SCALE;
        $display("X[%0d] = %f + (%f)i", k, gr, gi);
        check(fabs(gr - FWD_RE[k]) < 1.0e-6 && fabs(gi - FWD_IM[k]) < 1.0e-6,
              "ramp spectrum equals published values");
      end
    end
    // Cycles 19..34: results.
    for (int n = 0; n < 16; n++) begin
      real gr, gi;
      gr = real'($signed(so_re)) / SCALE;
      gi = real'($signed(so_im)) / SCALE;
      check(out_valid && !in_take, "out_valid during read-out");
      check($signed(so_re) == zr[n] && $signed(so_im) == zi[n], "result equals round-trip model");
      check(fabs(gr - real'(x[n])) < 1.0 + 0.03 * 1000.0 && fabs(gi) < 31.0, "result close to input");
      if (is_ramp) begin
        $display("x[%0d] = %f + (%f)i", n, gr, gi);
        check(fabs(gr - INV_RE[n]) < 1.0e-6 && fabs(gi - INV_IM[n]) < 1.0e-6,
              "ramp round trip equals published values");
      end
      if (n == 15) begin
        check(!busy, "idle during last output word");
        start = chain;
        if (chain) back_to_back++;
      end
      cycle();
    end
    start = 0;
    passes++;
    if (!chain) begin
      check(!out_valid, "out_valid drops after 16 words");
      repeat ($urandom_range(3)) begin
        check(!busy && !out_valid && !in_take, "idle gap");
        cycle();
      end
      idle_gaps++;
    end
  endtask

  initial begin
    vec16_t x;
    bit chain, started;
    repeat (3) cycle();
    rst = 0;
    cycle();

    for (int i = 0; i < 16; i++) x[i] = longint'(i);
    run_pass(x, 0, 0, 1);

    started = 0;
    for (int p = 0; p < 20; p++) begin
      for (int i = 0; i < 16; i++) x[i] = longint'($urandom_range(2000)) - 1000;
      chain = (p % 3 != 2);
      run_pass(x, started, chain, 0);
      started = chain;
    end
    if (started) begin
      // Finish the chained pass before testing reset.
      for (int i = 0; i < 16; i++) x[i] = -longint'(i);
      run_pass(x, 1, 0, 0);
    end

    // Reset in the middle of filling.
    start = 1;
    cycle();
    start = 0;
    repeat (7) cycle();
    rst = 1;
    #1;
    check(!busy && !out_valid && so_re == 0 && so_im == 0, "reset clears the core");
    resets++;
    cycle();
    rst = 0;
    cycle();
    for (int i = 0; i < 16; i++) x[i] = 100 * longint'(i % 4) - 150;
    run_pass(x, 0, 0, 0);

    $display("passes=%0d ignored_starts=%0d back_to_back=%0d idle_gaps=%0d resets=%0d",
             passes, ignored_starts, back_to_back, idle_gaps, resets);
    check(passes >= 3, "several passes ran");
    check(ignored_starts >= 1, "a start was ignored while busy");
    check(back_to_back >= 1, "a back-to-back pass ran");
    check(idle_gaps >= 1, "an idle gap occurred");
    check(resets >= 1, "a reset mid-pass occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
