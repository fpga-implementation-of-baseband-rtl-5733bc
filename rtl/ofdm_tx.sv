// ofdm_tx: baseband OFDM transmitter.
//
//   2-bit symbols -> qpsk_mapper -> serial_to_parallel (8) -> fft8 (IFFT)
//                 -> parallel_to_serial -> complex time-domain samples
//
// Eight QPSK symbols, one per subcarrier, make one OFDM symbol; the 8-point
// IFFT (scaled by 1/8) turns them into eight time-domain samples, which
// leave in time order n = 0..7. The chain of mapping, serial-to-parallel,
// IFFT and parallel-to-serial follows the original design; no cyclic prefix, pilots
// or filtering are added because none is part of it.
//
// Interface: valid/ready on both sides; back-pressure from the output or
// from the busy IFFT stalls the input. Throughput: one OFDM symbol per
// 14 cycles at most (the IFFT holds one frame at a time and needs 13 cycles
// from acceptance to result, plus the cycle in which the result is taken),
// i.e. 8 samples per 14 cycles.
module ofdm_tx
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_bits,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_sample
);

  logic   map_valid, map_ready;
  cplx_t  map_sym;
  logic   sp_valid, sp_ready;
  frame_t sp_frame;
  logic   ifft_valid, ifft_ready;
  frame_t ifft_frame;

  qpsk_mapper u_map (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_bits,
    .out_valid (map_valid), .out_ready (map_ready), .out_sym (map_sym)
  );

  serial_to_parallel #(.N(N), .T(cplx_t)) u_sp (
    .clk, .rst_n,
    .in_valid  (map_valid), .in_ready (map_ready), .in_data (map_sym),
    .out_valid (sp_valid), .out_ready (sp_ready), .out_frame (sp_frame)
  );

  fft8 #(.INVERSE(1'b1)) u_ifft (
    .clk, .rst_n,
    .in_valid  (sp_valid), .in_ready (sp_ready), .in_frame (sp_frame),
    .out_valid (ifft_valid), .out_ready (ifft_ready), .out_frame (ifft_frame)
  );

  parallel_to_serial #(.N(N), .T(cplx_t)) u_ps (
    .clk, .rst_n,
    .in_valid  (ifft_valid), .in_ready (ifft_ready), .in_frame (ifft_frame),
    .out_valid, .out_ready, .out_data (out_sample)
  );

endmodule
