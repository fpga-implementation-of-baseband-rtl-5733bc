// qpsk_mapper: the mapping (modulator) block of the transmitter.
//
// Each 2-bit input symbol becomes one QPSK constellation point: bit 0 sets
// the sign of the real part and bit 1 the sign of the imaginary part
// (0 -> +AMP, 1 -> -AMP), a Gray mapping in which neighbouring points differ
// in one bit. That the transmitter maps bits to subcarrier symbols follows
// the original design; QPSK, the bit order and the amplitude are this design's
// choices.
//
// Interface: valid/ready in and out with one register stage, so a symbol
// appears on the output the cycle after it is accepted; full throughput of
// one symbol per cycle while out_ready stays high.
module qpsk_mapper
  import ofdm_pkg::*;
#(
  parameter int AMP = QPSK_AMP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_bits,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_sym
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym.re <= in_bits[0] ? word_t'(-AMP) : word_t'(AMP);
        out_sym.im <= in_bits[1] ? word_t'(-AMP) : word_t'(AMP);
      end
    end
  end

endmodule
