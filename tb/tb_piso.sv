// tb_piso: loads random 16-word blocks into the output register and checks
// that the words appear on so in slot order, one per enabled clock, with
// random idle cycles in between, that so holds while load is high or en is
// low, and that zeros follow once all 16 words have left.
module tb_piso;

  localparam int W = 64, D = 16;

  int checks = 0, failures = 0;

  logic             clk = 0, rst = 1, load = 0, en = 0;
  logic [W*D-1:0]   pi;
  logic [W-1:0]     so;

  piso #(.DATA_W(W), .DEPTH(D)) dut (.clk, .rst, .load, .en, .pi, .so);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (so !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: so=%h expected %h", what, so, exp);
    end
  endtask

  initial begin
    logic [W-1:0] words [D];
    logic [W-1:0] last;
    pi = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check('0, "reset");
    for (int blk = 0; blk < 30; blk++) begin
      for (int i = 0; i < D; i++) begin
        words[i] = {$urandom, $urandom};
        pi[i*W +: W] = words[i];
      end
      last = so;
      load = 1; en = $urandom_range(1);   // load wins over en
      @(posedge clk); #1;
      load = 0;
      check(last, "hold during load");
      pi = {W*D{1'b1}};                   // later changes of pi must not matter
      for (int i = 0; i < D; i++) begin
        en = 0;
        repeat ($urandom_range(2)) begin
          @(posedge clk); #1;
          check(i == 0 ? last : words[i-1], "hold while disabled");
        end
        en = 1;
        @(posedge clk); #1;
        check(words[i], "word order");
      end
      @(posedge clk); #1;
      check('0, "zero fill");
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
