// tb_sipo: shifts random words into the input register with a random enable
// pattern and compares the parallel output after every clock with a queue
// model of the last 16 accepted words (oldest in slot 0). Also checks reset.
module tb_sipo;

  localparam int W = 64, D = 16;

  int checks = 0, failures = 0;

  logic             clk = 0, rst = 1, en = 0;
  logic [W-1:0]     si = '0;
  logic [W*D-1:0]   po;

  sipo #(.DATA_W(W), .DEPTH(D)) dut (.clk, .rst, .en, .si, .po);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [D];

  initial begin
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (po !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    for (int c = 0; c < 400; c++) begin
      en = ($urandom_range(3) != 0);
      si = {$urandom, $urandom};
      @(posedge clk);
      if (en) begin
        for (int i = 0; i < D - 1; i++) model[i] = model[i+1];
        model[D-1] = si;
      end
      #1;
      for (int i = 0; i < D; i++) begin
        checks++;
        if (po[i*W +: W] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d slot %0d", c, i);
        end
      end
    end
    rst = 1;
    #1;
    checks++;
    if (po !== '0) begin failures++; $display("FAIL asynchronous reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
