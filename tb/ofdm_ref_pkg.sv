// ofdm_ref_pkg: reference models for the OFDM testbenches, in double
// precision: the QPSK point of a 2-bit symbol and the 8-point inverse DFT
// x[n] = 1/8 * sum_k X[k] exp(+j*2*pi*n*k/8) of eight such points.
package ofdm_ref_pkg;
  import ofdm_pkg::*;

  localparam real PI = 3.14159265358979;

  function automatic real qpsk_re(logic [1:0] b);
    return b[0] ? -real'(QPSK_AMP) : real'(QPSK_AMP);
  endfunction

  function automatic real qpsk_im(logic [1:0] b);
    return b[1] ? -real'(QPSK_AMP) : real'(QPSK_AMP);
  endfunction

  // time-domain sample n of the OFDM symbol carrying bits[0..7]
  function automatic real idft_re(logic [1:0] bits [N], int n);
    real acc;
    acc = 0.0;
    for (int k = 0; k < N; k++)
      acc += qpsk_re(bits[k]) * $cos(2.0 * PI * real'(n * k) / 8.0) - qpsk_im(bits[k]) * $sin(2.0 * PI * real'(n * k) / 8.0);
    return acc / N;
  endfunction

  function automatic real idft_im(logic [1:0] bits [N], int n);
    real acc;
    acc = 0.0;
    for (int k = 0; k < N; k++)
      acc += qpsk_re(bits[k]) * $sin(2.0 * PI * real'(n * k) / 8.0) + qpsk_im(bits[k]) * $cos(2.0 * PI * real'(n * k) / 8.0);
    return acc / N;
  endfunction
endpackage
