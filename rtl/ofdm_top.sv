// ofdm_top: baseband OFDM transmitter and receiver on one device.
//
// The transmitter (ofdm_tx: QPSK mapping, serial-to-parallel, 8-point IFFT,
// parallel-to-serial) and the receiver (ofdm_rx: serial-to-parallel, 8-point
// FFT, parallel-to-serial, QPSK decision) sit side by side, as the original design
// puts both on one FPGA. The loopback input chooses the receiver's source:
//   loopback = 1  the receiver takes the transmitter's samples directly; they
//                 are still shown on tx_out, whose ready is then ignored;
//   loopback = 0  the transmitter drives tx_out only and the receiver takes
//                 rx_in, e.g. samples that went through an external channel.
// The loopback select is this design's choice. Change it only while both
// chains are empty, or symbol boundaries are lost.
//
// Interface: four valid/ready streams. tx_bits and rx_bits are 2-bit QPSK
// symbols, one per subcarrier; tx_out and rx_in are complex samples,
// {real, imaginary} of 16 bits each.
module ofdm_top
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       loopback,
  // transmitter input
  input  logic       tx_bits_valid,
  output logic       tx_bits_ready,
  input  logic [1:0] tx_bits,
  // transmitter output
  output logic       tx_out_valid,
  input  logic       tx_out_ready,
  output cplx_t      tx_out,
  // receiver input (used when loopback = 0)
  input  logic       rx_in_valid,
  output logic       rx_in_ready,
  input  cplx_t      rx_in,
  // receiver output
  output logic       rx_bits_valid,
  input  logic       rx_bits_ready,
  output logic [1:0] rx_bits
);

  logic  tx_valid, tx_ready;
  logic  rx_valid, rx_ready;
  cplx_t rx_sample;

  ofdm_tx u_tx (
    .clk, .rst_n,
    .in_valid  (tx_bits_valid), .in_ready (tx_bits_ready), .in_bits (tx_bits),
    .out_valid (tx_valid), .out_ready (tx_ready), .out_sample (tx_out)
  );

  always_comb begin
    if (loopback) begin
      rx_valid    = tx_valid;
      rx_sample   = tx_out;
      tx_ready    = rx_ready;
      rx_in_ready = 1'b0;
    end else begin
      rx_valid    = rx_in_valid;
      rx_sample   = rx_in;
      tx_ready    = tx_out_ready;
      rx_in_ready = rx_ready;
    end
  end

  assign tx_out_valid = tx_valid;

  ofdm_rx u_rx (
    .clk, .rst_n,
    .in_valid  (rx_valid), .in_ready (rx_ready), .in_sample (rx_sample),
    .out_valid (rx_bits_valid), .out_ready (rx_bits_ready), .out_bits (rx_bits)
  );

endmodule
