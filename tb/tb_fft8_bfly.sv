// tb_fft8_bfly: checks the radix-2 butterfly against a real-valued model.
// For random a, b, every twiddle index, both directions and both scale
// settings, the reference a +/- W*b (halved when scale = 1) is computed with
// $cos/$sin in double precision and compared within 2 LSB; saturation is
// checked with full-scale inputs.
`timescale 1ns/1ps
module tb_fft8_bfly;
  import ofdm_pkg::*;

  logic       inverse, scale;
  logic [1:0] tw;
  cplx_t      a, b, x, y;
  int         checks = 0, failures = 0;

  fft8_bfly dut (.inverse, .scale, .tw, .a, .b, .x, .y);

  function automatic real clip(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.1f expected %0.2f (inv=%0d scale=%0d tw=%0d)", what, got, exp, inverse, scale, tw);
    end
  endtask

  task automatic run_one(int ar, int ai, int br, int bi);
    real ang, c, s, wr, wi, xr, xi, yr, yi, k;
    a.re = word_t'(ar); a.im = word_t'(ai); b.re = word_t'(br); b.im = word_t'(bi);
    #1;
    ang = 2.0 * 3.14159265358979 * real'(tw) / 8.0;
    c = $cos(ang); s = inverse ? $sin(ang) : -$sin(ang);
    wr = real'(br) * c - real'(bi) * s;
    wi = real'(br) * s + real'(bi) * c;
    k  = scale ? 0.5 : 1.0;
    xr = clip(k * (real'(ar) + wr)); xi = clip(k * (real'(ai) + wi));
    yr = clip(k * (real'(ar) - wr)); yi = clip(k * (real'(ai) - wi));
    check("x.re", real'(x.re), xr, 2.0);
    check("x.im", real'(x.im), xi, 2.0);
    check("y.re", real'(y.re), yr, 2.0);
    check("y.im", real'(y.im), yi, 2.0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      {inverse, scale, tw} = 4'(m);
      for (int r = 0; r < 50; r++)
        run_one($signed($urandom_range(0, 32767)) - 16384, $signed($urandom_range(0, 32767)) - 16384,
                $signed($urandom_range(0, 32767)) - 16384, $signed($urandom_range(0, 32767)) - 16384);
      // full scale: unscaled results saturate
      run_one(32767, -32768, 32767, -32768);
      run_one(-32768, 32767, 32767, 32767);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
