// tb_serial_to_parallel: streams random samples in with random gaps and
// random consumer stalls, and checks that each frame holds the next N
// samples in arrival order (element 0 first), that the input stalls while a
// full frame waits, and that out_valid follows the N-th sample by one cycle.
`timescale 1ns/1ps
module tb_serial_to_parallel;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid, in_ready, out_valid, out_ready;
  cplx_t  in_data;
  frame_t out_frame;
  int     checks = 0, failures = 0, frames = 0, stalls = 0, cnt = 0;
  cplx_t  q [$];

  serial_to_parallel #(.N(N), .T(cplx_t)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_frame);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic took;
    in_valid = 1'b0; out_ready = 1'b0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (frames < 300) begin
      in_valid  = ($urandom_range(0, 4) != 0);
      in_data   = cplx_t'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      if (in_valid && out_valid) begin
        checks++;
        if (in_ready) begin failures++; $display("FAIL input not stalled while frame waits"); end
        stalls++;
      end
      #1;
      took = in_valid && in_ready;
      if (out_valid && out_ready) begin
        for (int n = 0; n < N; n++) begin
          cplx_t e;
          e = q.pop_front();
          checks++;
          if (out_frame[n] != e) begin failures++; $display("FAIL frame %0d element %0d", frames, n); end
        end
        frames++;
      end
      if (took) begin q.push_back(in_data); cnt++; end
      @(posedge clk);
      #1;
      // in the cycle after the N-th sample, out_valid must be high
      if (took && (cnt % N == 0)) begin
        checks++;
        if (!out_valid) begin failures++; $display("FAIL out_valid late"); end
      end
      @(negedge clk);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
