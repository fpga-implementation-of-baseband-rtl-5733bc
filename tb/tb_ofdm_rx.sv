// tb_ofdm_rx: feeds the receiver with OFDM symbols built in double precision
// (1/8-scaled inverse DFT of eight random QPSK points, rounded, plus random
// noise of up to +/-300 LSB per part) under random input gaps and output
// stalls, and checks that the decided 2-bit symbols equal the transmitted
// ones in order. One batch of symbols is sent at 8x amplitude, which drives
// the unscaled FFT into saturation; decisions must still be right.
`timescale 1ns/1ps
module tb_ofdm_rx;
  import ofdm_pkg::*;
  import ofdm_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready;
  cplx_t      in_sample;
  logic [1:0] out_bits;
  int         checks = 0, failures = 0, nin = 0, nout = 0, saturated = 0;
  logic [1:0] expq [$];
  cplx_t      txq [$];

  ofdm_rx dut (.clk, .rst_n, .in_valid, .in_ready, .in_sample, .out_valid, .out_ready, .out_bits);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // saturation seen at the FFT output
  always @(posedge clk)
    if (dut.fft_valid && dut.fft_ready)
      for (int k = 0; k < N; k++)
        if (dut.fft_frame[k].re == 16'sh7fff || dut.fft_frame[k].re == -16'sh8000) saturated++;

  function automatic word_t rnd(real v);
    if (v > 32767.0) return 16'sh7fff;
    if (v < -32768.0) return -16'sh8000;
    return word_t'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  localparam int FRAMES = 100;

  initial begin
    logic [1:0] b [N];
    real        gain;
    bit         took, gave;
    // build the stimulus
    for (int f = 0; f < FRAMES; f++) begin
      gain = (f >= 40 && f < 45) ? 8.0 : 1.0;
      for (int k = 0; k < N; k++) begin b[k] = 2'($urandom); expq.push_back(b[k]); end
      for (int n = 0; n < N; n++) begin
        cplx_t s;
        s.re = rnd(gain * idft_re(b, n) + real'($signed($urandom_range(0, 600)) - 300));
        s.im = rnd(gain * idft_im(b, n) + real'($signed($urandom_range(0, 600)) - 300));
        txq.push_back(s);
      end
    end
    in_valid = 1'b0; out_ready = 1'b0; in_sample = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (nout < FRAMES * N) begin
      if (!in_valid || in_ready) begin
        in_valid = (txq.size() != 0) && ($urandom_range(0, 4) != 0);
        if (in_valid) in_sample = txq[0];
      end
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      took = in_valid && in_ready;
      gave = out_valid && out_ready;
      if (gave) begin
        logic [1:0] e;
        e = expq.pop_front();
        checks++;
        if (out_bits != e) begin failures++; $display("FAIL symbol %0d: got %b expected %b", nout, out_bits, e); end
        nout++;
      end
      if (took) begin void'(txq.pop_front()); nin++; end
      @(negedge clk);
      if (took) in_valid = 1'b0;
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated FFT outputs: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
