// tb_fft8: checks the 8-point FFT (INVERSE = 0) and IFFT (INVERSE = 1)
// processors against a direct DFT computed in double precision with
// $cos/$sin. Random frames (FFT inputs within +/-2047 so nothing saturates,
// IFFT inputs within +/-16383), impulses and a full-scale frame that must
// saturate are sent; results must match within 4 LSB. The latency from
// input transfer to out_valid must be 13 cycles, and results must hold
// while out_ready is low.
`timescale 1ns/1ps
module tb_fft8;
  import ofdm_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid [2];
  logic   in_ready [2];
  frame_t in_frame [2];
  logic   out_valid [2];
  logic   out_ready [2];
  frame_t out_frame [2];
  int     checks = 0, failures = 0;

  fft8 #(.INVERSE(1'b0)) dut_fft (
    .clk, .rst_n, .in_valid (in_valid[0]), .in_ready (in_ready[0]), .in_frame (in_frame[0]),
    .out_valid (out_valid[0]), .out_ready (out_ready[0]), .out_frame (out_frame[0]));
  fft8 #(.INVERSE(1'b1)) dut_ifft (
    .clk, .rst_n, .in_valid (in_valid[1]), .in_ready (in_ready[1]), .in_frame (in_frame[1]),
    .out_valid (out_valid[1]), .out_ready (out_ready[1]), .out_frame (out_frame[1]));

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.1f expected %0.2f", what, got, exp);
    end
  endtask

  function automatic real clip(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  // send one frame to DUT d, wait for the result, compare with the DFT
  task automatic run_frame(int d, frame_t f, int hold);
    int lat;
    real er, ei, ang, sg, k;
    @(negedge clk);
    in_frame[d] = f;
    in_valid[d] = 1'b1;
    out_ready[d] = 1'b0;
    while (!in_ready[d]) @(negedge clk);
    @(posedge clk);
    #1 in_valid[d] = 1'b0;
    lat = 1;  // now one cycle after the cycle the frame was accepted in
    while (!out_valid[d]) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != 13) begin failures++; $display("FAIL latency %0d (expected 13)", lat); end
    // hold the result a few cycles; it must stay valid and unchanged
    for (int h = 0; h < hold; h++) begin
      frame_t prev;
      prev = out_frame[d];
      @(posedge clk); #1;
      checks++;
      if (!out_valid[d] || out_frame[d] !== prev) begin failures++; $display("FAIL result not held"); end
    end
    sg = (d != 0) ? 1.0 : -1.0;
    k  = (d != 0) ? 0.125 : 1.0;
    for (int m = 0; m < N; m++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = 2.0 * 3.14159265358979 * real'(n * m) / 8.0;
        er += real'(f[n].re) * $cos(ang) - real'(f[n].im) * sg * $sin(ang);
        ei += real'(f[n].re) * sg * $sin(ang) + real'(f[n].im) * $cos(ang);
      end
      check($sformatf("%s X[%0d].re", (d != 0) ? "ifft" : "fft", m), real'(out_frame[d][m].re), clip(k * er), 4.0);
      check($sformatf("%s X[%0d].im", (d != 0) ? "ifft" : "fft", m), real'(out_frame[d][m].im), clip(k * ei), 4.0);
    end
    @(negedge clk);
    out_ready[d] = 1'b1;
    @(negedge clk);
    out_ready[d] = 1'b0;
    checks++;
    if (out_valid[d] || !in_ready[d]) begin failures++; $display("FAIL result not released"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f;
    int lim;
    for (int d = 0; d < 2; d++) begin in_valid[d] = 1'b0; out_ready[d] = 1'b0; in_frame[d] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 2; d++) begin
      lim = (d != 0) ? 16383 : 2047;
      // impulses at each position
      for (int p = 0; p < N; p++) begin
        f = '0;
        f[p].re = word_t'(lim);
        f[p].im = word_t'(-lim / 2);
        run_frame(d, f, p % 3);
      end
      for (int r = 0; r < 40; r++) begin
        for (int n = 0; n < N; n++) begin
          f[n].re = word_t'($signed($urandom_range(0, 2 * lim)) - lim);
          f[n].im = word_t'($signed($urandom_range(0, 2 * lim)) - lim);
        end
        run_frame(d, f, r % 2);
      end
    end
    // full scale into the unscaled FFT: X[0] saturates
    for (int n = 0; n < N; n++) begin f[n].re = 16'sd30000; f[n].im = -16'sd30000; end
    run_frame(0, f, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
