// tb_conjugate: checks that each bin leaves as (re, -im) divided by 2^28,
// rounded toward zero. The expected value is worked out with integer
// division, not with a shift.
module tb_conjugate;
  import fft_pkg::*;

  int checks = 0, failures = 0;

  cplx_t x [16], y [16];

  conjugate dut (.x(x), .y(y));

  localparam longint DIV = 64'sd268435456;  // 2^28

  function automatic longint tdiv(longint v);
    return v / DIV;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vr[16], vi[16];
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 16; i++) begin
        vr[i] = {$urandom, $urandom} >>> $urandom_range(30);
        vi[i] = {$urandom, $urandom} >>> $urandom_range(30);
        if (it == 0) begin
          vr[i] = longint'(i - 8) * DIV + longint'(i);   // exact and inexact mix
          vi[i] = (i % 2) ? -DIV * 3 : DIV * 5 + 1;
        end
        x[i] = '{re: vr[i], im: vi[i]};
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (y[i].re !== tdiv(vr[i]) || y[i].im !== tdiv(-vi[i])) begin
          failures++;
          if (failures < 10)
            $display("FAIL bin %0d: got %0d, %0d expected %0d, %0d", i,
                     y[i].re, y[i].im, tdiv(vr[i]), tdiv(-vi[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
