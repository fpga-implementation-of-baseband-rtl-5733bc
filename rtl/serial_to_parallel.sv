// serial_to_parallel: gathers N serial samples into one parallel frame.
//
// Samples are written into element 0, 1, ..., N-1 of a frame buffer as they
// arrive. When the N-th is written the frame is offered on out_frame with
// out_valid; in_ready stays low until the frame is taken, so a slow consumer
// stalls the serial side instead of losing samples. The converter itself
// follows the original design; its single buffer and handshake are this design's own.
//
// Timing: out_valid rises the cycle after the N-th sample is accepted. The
// next frame can start the cycle after out_ready takes the current one.
module serial_to_parallel #(
  parameter int  N = ofdm_pkg::N,
  parameter type T = ofdm_pkg::cplx_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T [N-1:0] out_frame
);

  localparam int CW = $clog2(N);
  logic [CW-1:0] cnt;

  assign in_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        out_frame[cnt] <= in_data;
        if (cnt == CW'(N-1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid);

endmodule
