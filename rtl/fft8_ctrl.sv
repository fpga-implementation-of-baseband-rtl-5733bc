// fft8_ctrl: controller of the 8-point FFT/IFFT processor.
//
// It selects, cycle by cycle, which computation the shared butterfly of
// fft8 performs. Idle, it offers in_ready; when a frame is offered it pulses
// load (the frame is written into the register file), then runs 12 cycles
// with run = 1, stepping bfly 0..3 inside stage 0..2, and then raises
// out_valid until out_ready takes the result.
//
// Timing: the frame is accepted at clock edge 0, the butterflies are written
// at edges 1..12, and out_valid is high from edge 12 on, so the result is
// first visible 13 cycles after the cycle the input was accepted in. One
// frame is in the processor at a time. That a controller sequences the
// computation follows the original design; the state machine and its timing are this
// design's own.
module fft8_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       load,
  output logic       run,
  output logic [1:0] stage,
  output logic [1:0] bfly,
  output logic       out_valid,
  input  logic       out_ready
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      stage <= '0;
      bfly  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          state <= S_RUN;
          stage <= '0;
          bfly  <= '0;
        end
        S_RUN: begin
          bfly <= bfly + 2'd1;
          if (bfly == 2'd3) begin
            stage <= stage + 2'd1;
            if (stage == 2'd2) state <= S_DONE;
          end
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign load      = in_ready && in_valid;
  assign run       = (state == S_RUN);
  assign out_valid = (state == S_DONE);

  // stage never exceeds 2 while a butterfly runs
  a_stage_range: assert property (@(posedge clk) disable iff (!rst_n) run |-> stage <= 2'd2);

endmodule
