// tb_control_unit: runs the FSM through several passes, with start pulses
// that arrive while busy (which must be ignored), idle gaps between passes,
// back-to-back passes and a reset in the middle of a pass. A cycle-accurate
// model written from the documented schedule (start in cycle 0; sipo_en in
// cycles 1..16; load in cycle 17; piso_en in cycles 18..33; out_valid in
// cycles 19..34; busy in cycles 1..33) is compared with every output in every cycle.
module tb_control_unit;

  int checks = 0, failures = 0;
  int passes = 0, ignored_starts = 0, resets = 0;

  logic clk = 0, rst = 1, start = 0;
  logic sipo_en, load, piso_en, out_valid, busy;

  control_unit #(.DEPTH(16)) dut (.clk, .rst, .start, .sipo_en, .load, .piso_en, .out_valid, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: t = cycles since the accepted start (0 = start cycle), -1 = idle.
  int t = -1;
  logic m_valid_d = 0;

  task automatic compare();
    logic e_sipo, e_load, e_piso, e_busy;
    e_sipo = (t >= 1 && t <= 16);
    e_load = (t == 17);
    e_piso = (t >= 18 && t <= 33);
    e_busy = (t >= 1 && t <= 33);
    checks++;
    if (sipo_en !== e_sipo || load !== e_load || piso_en !== e_piso ||
        busy !== e_busy || out_valid !== m_valid_d) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0d: sipo_en=%b load=%b piso_en=%b out_valid=%b busy=%b", t,
                 sipo_en, load, piso_en, out_valid, busy);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      // Drive start: often during busy too; sometimes reset mid-pass.
      start = ($urandom_range(4) == 0);
      if (c == 1500 && t > 0) begin
        rst = 1; #1; resets++;
        t = -1; m_valid_d = 0;
        compare();
        @(posedge clk); #1 rst = 0;
        continue;
      end
      #1 compare();
      if (start && busy) ignored_starts++;
      @(posedge clk);
      m_valid_d = (t >= 18 && t <= 33);
      if (t == 33) passes++;
      if (t >= 0 && t < 34) t++;
      else if (start && (t == -1 || t == 34)) t = 1;
      else t = -1;
      #1;
    end
    $display("passes=%0d ignored_starts=%0d resets=%0d", passes, ignored_starts, resets);
    checks++;
    if (passes < 5 || ignored_starts < 1 || resets != 1) begin
      failures++;
      $display("FAIL not every situation occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
