// ofdm_rx: baseband OFDM receiver.
//
//   complex time-domain samples -> serial_to_parallel (8) -> fft8 (FFT)
//                  -> parallel_to_serial -> qpsk_demapper -> 2-bit symbols
//
// Eight received samples make one OFDM symbol; the unscaled 8-point FFT
// returns the eight subcarrier values, which are sent out in subcarrier
// order 0..7 and decided by sign. Serial-to-parallel, FFT and
// parallel-to-serial follow the original design; the hard-decision demapper is this
// design's counterpart of the transmitter's mapping. There is no
// synchronisation or equalisation: the first sample after reset is taken as
// the first sample of a symbol.
//
// Interface: valid/ready on both sides. Throughput as the transmitter:
// one OFDM symbol per 14 cycles at most.
module ofdm_rx
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_sample,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_bits
);

  logic   sp_valid, sp_ready;
  frame_t sp_frame;
  logic   fft_valid, fft_ready;
  frame_t fft_frame;
  logic   ps_valid, ps_ready;
  cplx_t  ps_sym;

  serial_to_parallel #(.N(N), .T(cplx_t)) u_sp (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data (in_sample),
    .out_valid (sp_valid), .out_ready (sp_ready), .out_frame (sp_frame)
  );

  fft8 #(.INVERSE(1'b0)) u_fft (
    .clk, .rst_n,
    .in_valid  (sp_valid), .in_ready (sp_ready), .in_frame (sp_frame),
    .out_valid (fft_valid), .out_ready (fft_ready), .out_frame (fft_frame)
  );

  parallel_to_serial #(.N(N), .T(cplx_t)) u_ps (
    .clk, .rst_n,
    .in_valid  (fft_valid), .in_ready (fft_ready), .in_frame (fft_frame),
    .out_valid (ps_valid), .out_ready (ps_ready), .out_data (ps_sym)
  );

  qpsk_demapper u_demap (
    .clk, .rst_n,
    .in_valid  (ps_valid), .in_ready (ps_ready), .in_sym (ps_sym),
    .out_valid, .out_ready, .out_bits
  );

endmodule
