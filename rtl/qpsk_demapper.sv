// qpsk_demapper: hard-decision inverse of qpsk_mapper for the receiver.
//
// Bit 0 is 1 when the real part is negative and bit 1 is 1 when the
// imaginary part is negative, so the decision boundaries are the two axes.
// The demapper is this design's addition, the receiver-side counterpart of
// the mapping block.
//
// Interface: valid/ready in and out with one register stage (output the
// cycle after acceptance, one symbol per cycle).
module qpsk_demapper
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_sym,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_bits
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_bits <= {in_sym.im[DW-1], in_sym.re[DW-1]};
    end
  end

endmodule
