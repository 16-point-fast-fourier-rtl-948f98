// tb_butterfly: checks the butterfly stage at all four widths used in the
// 16-point FFT (N = 2, 4, 8, 16) against a direct evaluation of
// y[k] = 128 x[k] +/- x[k+N/2] W_N^k with an independent twiddle table,
// for random and corner-case inputs.
module tb_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0;

  cplx_t x2 [2],  y2 [2];
  cplx_t x4 [4],  y4 [4];
  cplx_t x8 [8],  y8 [8];
  cplx_t x16[16], y16[16];

  butterfly #(.N(2))  dut2  (.x(x2),  .y(y2));
  butterfly #(.N(4))  dut4  (.x(x4),  .y(y4));
  butterfly #(.N(8))  dut8  (.x(x8),  .y(y8));
  butterfly #(.N(16)) dut16 (.x(x16), .y(y16));

  longint ir [16], ii [16];

  function automatic longint rnd();
    // Mix of small and large magnitudes, both signs.
    case ($urandom_range(3))
      0: return longint'($signed($urandom_range(255))) - 128;
      1: return longint'($signed($urandom)) ;
      2: return {$urandom, $urandom} >>> 12;
      default: return -longint'($urandom_range(1 << 20));
    endcase
  endfunction

  task automatic check_one(int n, int k, longint gr, longint gi, longint er, longint ei);
    checks++;
    if (gr !== er || gi !== ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d y[%0d] = %0d + %0dj, expected %0d + %0dj", n, k, gr, gi, er, ei);
    end
  endtask

  task automatic expect_stage(int n, longint gr[16], longint gi[16]);
    for (int k = 0; k < n / 2; k++) begin
      longint wr, wi, tr, ti;
      wr = TWR[k * (16 / n)];
      wi = TWI[k * (16 / n)];
      tr = ir[k + n/2] * wr - ii[k + n/2] * wi;
      ti = ir[k + n/2] * wi + ii[k + n/2] * wr;
      check_one(n, k,       gr[k],       gi[k],       128 * ir[k] + tr, 128 * ii[k] + ti);
      check_one(n, k + n/2, gr[k + n/2], gi[k + n/2], 128 * ir[k] - tr, 128 * ii[k] - ti);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint gr[16], gi[16];
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 16; i++) begin
        ir[i] = (it == 0) ? longint'(i) : rnd();
        ii[i] = (it == 0) ? 0 : rnd();
      end
      for (int i = 0; i < 2;  i++) x2[i]  = '{re: ir[i], im: ii[i]};
      for (int i = 0; i < 4;  i++) x4[i]  = '{re: ir[i], im: ii[i]};
      for (int i = 0; i < 8;  i++) x8[i]  = '{re: ir[i], im: ii[i]};
      for (int i = 0; i < 16; i++) x16[i] = '{re: ir[i], im: ii[i]};
      #1;
      for (int i = 0; i < 2;  i++) begin gr[i] = y2[i].re;  gi[i] = y2[i].im;  end
      expect_stage(2, gr, gi);
      for (int i = 0; i < 4;  i++) begin gr[i] = y4[i].re;  gi[i] = y4[i].im;  end
      expect_stage(4, gr, gi);
      for (int i = 0; i < 8;  i++) begin gr[i] = y8[i].re;  gi[i] = y8[i].im;  end
      expect_stage(8, gr, gi);
      for (int i = 0; i < 16; i++) begin gr[i] = y16[i].re; gi[i] = y16[i].im; end
      expect_stage(16, gr, gi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
