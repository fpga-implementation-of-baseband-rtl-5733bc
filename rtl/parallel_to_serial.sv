// parallel_to_serial: sends a parallel frame of N samples out one at a time.
//
// A frame is captured into a register when in_valid and in_ready meet; its
// elements then leave as element 0, 1, ..., N-1, one per transfer on the
// serial valid/ready output. in_ready is high when the register is empty or
// its last sample is leaving in this cycle, so with a frame always waiting
// the serial output runs without a gap. The converter follows the original design;
// the buffer and handshake are this design's own.
//
// Timing: the first sample is valid the cycle after the frame is accepted.
module parallel_to_serial #(
  parameter int  N = ofdm_pkg::N,
  parameter type T = ofdm_pkg::cplx_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T [N-1:0] in_frame,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int CW = $clog2(N);
  T [N-1:0]      buf_q;
  logic [CW-1:0] idx;
  logic          last;

  assign last      = (idx == CW'(N-1));
  assign in_ready  = !out_valid || (out_ready && last);
  assign out_data  = buf_q[idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      idx       <= '0;
    end else if (in_valid && in_ready) begin
      buf_q     <= in_frame;
      out_valid <= 1'b1;
      idx       <= '0;
    end else if (out_valid && out_ready) begin
      if (last) out_valid <= 1'b0;
      else      idx <= idx + 1'b1;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
