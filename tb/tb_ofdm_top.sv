// tb_ofdm_top: end-to-end test of the OFDM transmitter and receiver at the
// design's default sizes. Random 2-bit symbols enter the transmitter and the
// decided symbols leaving the receiver must equal them, in order, in three
// phases:
//   1. loopback = 1: the receiver takes the transmitter's samples directly;
//   2. loopback = 0: the testbench is the channel, taking tx_out under random
//      stalls, adding noise of up to +/-300 LSB and sending it into rx_in;
//   3. loopback = 1 again.
// Throughout, rx_bits_ready stalls at random. Each sample seen on tx_out is
// also checked against the reference inverse DFT. Mechanisms that must occur
// and are counted: input back-pressure (tx_bits_ready low while valid),
// receiver output stalls, transmitter output stalls in external mode, both
// loopback settings, and the switches between them.
`timescale 1ns/1ps
module tb_ofdm_top;
  import ofdm_pkg::*;
  import ofdm_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       loopback;
  logic       tx_bits_valid, tx_bits_ready;
  logic [1:0] tx_bits;
  logic       tx_out_valid, tx_out_ready;
  cplx_t      tx_out;
  logic       rx_in_valid, rx_in_ready;
  cplx_t      rx_in;
  logic       rx_bits_valid, rx_bits_ready;
  logic [1:0] rx_bits;

  ofdm_top dut (.*);

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_tx = 0;
  int c_in_stall = 0, c_rx_stall = 0, c_tx_stall = 0, c_loop = 0, c_ext = 0, c_switch = 0;
  logic [1:0] expq [$];   // symbols sent, awaiting the receiver
  logic [1:0] symq [$];   // symbols sent, awaiting the transmitter output check
  logic [1:0] sym [N];
  cplx_t      chq [$];    // channel samples in flight (external mode)

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sample(cplx_t s);
    int n;
    real er, ei;
    n = n_tx % N;
    if (n == 0) for (int k = 0; k < N; k++) sym[k] = symq.pop_front();
    er = idft_re(sym, n);
    ei = idft_im(sym, n);
    checks++;
    if (real'(s.re) - er > 4.0 || er - real'(s.re) > 4.0 || real'(s.im) - ei > 4.0 || ei - real'(s.im) > 4.0) begin
      failures++; $display("FAIL tx sample %0d", n_tx);
    end
    n_tx++;
  endtask

  // run one phase: send `frames` OFDM symbols and wait for all of them
  task automatic run_phase(bit lb, int frames);
    int target_in, target_out;
    bit took, gave, txgave, rxtook;
    if (loopback != lb) c_switch++;
    loopback = lb;
    target_in  = n_in + frames * N;
    target_out = n_out + frames * N;
    while (n_out < target_out) begin
      if (!tx_bits_valid || tx_bits_ready) begin
        tx_bits_valid = (n_in < target_in) && ($urandom_range(0, 4) != 0);
        tx_bits       = 2'($urandom);
      end
      rx_bits_ready = ($urandom_range(0, 3) != 0);
      tx_out_ready  = ($urandom_range(0, 2) != 0);
      if (!rx_in_valid || rx_in_ready) begin
        rx_in_valid = !lb && (chq.size() != 0) && ($urandom_range(0, 3) != 0);
        if (rx_in_valid) rx_in = chq[0];
      end
      #1;
      took   = tx_bits_valid && tx_bits_ready;
      gave   = rx_bits_valid && rx_bits_ready;
      txgave = tx_out_valid && (lb ? dut.rx_ready : tx_out_ready);
      rxtook = !lb && rx_in_valid && rx_in_ready;
      if (tx_bits_valid && !tx_bits_ready) c_in_stall++;
      if (rx_bits_valid && !rx_bits_ready) c_rx_stall++;
      if (!lb && tx_out_valid && !tx_out_ready) c_tx_stall++;
      if (lb) begin
        checks++;
        if (rx_in_ready) begin failures++; $display("FAIL rx_in_ready high in loopback"); end
      end
      if (gave) begin
        logic [1:0] e;
        e = expq.pop_front();
        checks++;
        if (rx_bits != e) begin failures++; $display("FAIL symbol %0d: got %b expected %b", n_out, rx_bits, e); end
        n_out++;
        if (lb) c_loop++; else c_ext++;
      end
      if (txgave) begin
        check_sample(tx_out);
        if (!lb) begin
          cplx_t s;
          s.re = tx_out.re + word_t'($signed($urandom_range(0, 600)) - 300);
          s.im = tx_out.im + word_t'($signed($urandom_range(0, 600)) - 300);
          chq.push_back(s);
        end
      end
      if (rxtook) void'(chq.pop_front());
      if (took) begin expq.push_back(tx_bits); symq.push_back(tx_bits); n_in++; end
      @(negedge clk);
      if (took) tx_bits_valid = 1'b0;
      if (rxtook) rx_in_valid = 1'b0;
    end
  endtask

  initial begin
    loopback = 1'b1;
    tx_bits_valid = 1'b0; tx_bits = '0; tx_out_ready = 1'b0;
    rx_in_valid = 1'b0; rx_in = '0; rx_bits_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_phase(1'b1, 60);
    run_phase(1'b0, 60);
    run_phase(1'b1, 30);
    $display("symbols=%0d input stalls=%0d rx output stalls=%0d tx output stalls=%0d loopback=%0d external=%0d switches=%0d",
             n_out, c_in_stall, c_rx_stall, c_tx_stall, c_loop, c_ext, c_switch);
    checks++;
    if (c_in_stall == 0 || c_rx_stall == 0 || c_tx_stall == 0 || c_loop == 0 || c_ext == 0 || c_switch < 2) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    checks++;
    if (n_tx != n_out) begin failures++; $display("FAIL %0d samples sent, %0d symbols received", n_tx, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
