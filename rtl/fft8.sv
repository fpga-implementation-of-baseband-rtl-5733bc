// fft8: 8-point FFT (INVERSE = 0) or IFFT (INVERSE = 1) processor.
//
// X[k] = sum_n x[n] exp(-j*2*pi*n*k/8)            (INVERSE = 0, unscaled)
// x[n] = 1/8 * sum_k X[k] exp(+j*2*pi*n*k/8)      (INVERSE = 1)
//
// Radix-2 decimation in time, computed in place. The input frame is written
// into an 8-entry register file in bit-reversed order; then one shared
// butterfly (fft8_bfly) performs the 12 butterflies, one per clock cycle,
// stage by stage, as selected by the controller fft8_ctrl. In stage s
// (span h = 2^s) butterfly k works on entries i = (k >> s)*2h + (k mod h)
// and i + h with twiddle W8^((k mod h) * 4/h), and the result overwrites both
// entries. After the third stage the register file holds the transform in
// natural order. The IFFT halves the results of every stage, which is its
// 1/8 scaling without a divider. The receiver uses INVERSE = 0, the
// transmitter INVERSE = 1: one design serves both, as the 8-point FFT and
// IFFT of the OFDM link. Serial single-butterfly computation with no
// multiplier is this design's reading of the original design's goal of few multipliers
// and dividers; the schedule and widths are its own choice.
//
// Interface: valid/ready on the input frame and on the output frame. The
// input is accepted only while the processor is idle; out_valid rises 13
// cycles after the input transfer and stays until out_ready.
module fft8
  import ofdm_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  frame_t in_frame,
  output logic   out_valid,
  input  logic   out_ready,
  output frame_t out_frame
);

  logic       load, run;
  logic [1:0] stage, bfly;

  fft8_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .load, .run, .stage, .bfly,
    .out_valid, .out_ready
  );

  frame_t regs;

  // butterfly addressing
  logic [2:0] idx_a, idx_b;
  logic [1:0] tw;
  always_comb begin
    unique case (stage)
      2'd0: begin idx_a = {bfly, 1'b0};          idx_b = idx_a + 3'd1; tw = 2'd0;              end
      2'd1: begin idx_a = {bfly[1], 1'b0, bfly[0]}; idx_b = idx_a + 3'd2; tw = {bfly[0], 1'b0}; end
      default: begin idx_a = {1'b0, bfly};       idx_b = idx_a + 3'd4; tw = bfly;              end
    endcase
  end

  cplx_t bx, by;
  fft8_bfly u_bfly (
    .inverse (INVERSE),
    .scale   (INVERSE),
    .tw      (tw),
    .a       (regs[idx_a]),
    .b       (regs[idx_b]),
    .x       (bx),
    .y       (by)
  );

  always_ff @(posedge clk) begin
    if (load) begin
      for (int n = 0; n < N; n++) regs[bitrev(3'(n))] <= in_frame[n];
    end else if (run) begin
      regs[idx_a] <= bx;
      regs[idx_b] <= by;
    end
  end

  assign out_frame = regs;

  // the result must stay still while it waits
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_frame));

endmodule
