// ofdm_pkg: types and constants shared by the baseband OFDM transmitter and
// receiver. A complex sample is a packed pair of DW-bit two's-complement
// words (real part in the upper half). A frame is the N = 8 samples that one
// OFDM symbol carries, one per subcarrier; element 0 is the first sample on
// the serial side and subcarrier/time index 0 on the parallel side.
// N = 8 follows the 8-point FFT/IFFT of the original design; DW = 16 and the QPSK
// amplitude are this design's own choices.
package ofdm_pkg;

  localparam int N     = 8;   // FFT / IFFT size (points)
  localparam int LOG2N = 3;   // number of radix-2 stages
  localparam int DW    = 16;  // width of the real and of the imaginary part

  // QPSK amplitude. With the IFFT scaled by 1/8 and the FFT unscaled, a
  // back-to-back link returns the same amplitude, and 4096 keeps every
  // intermediate value of the FFT well inside 16 bits.
  localparam int QPSK_AMP = 4096;

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef cplx_t [N-1:0] frame_t;

  // Bit reversal of a LOG2N-bit index (input ordering of the in-place
  // decimation-in-time FFT).
  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] i);
    logic [LOG2N-1:0] r;
    for (int k = 0; k < LOG2N; k++) r[k] = i[LOG2N-1-k];
    return r;
  endfunction

endpackage
