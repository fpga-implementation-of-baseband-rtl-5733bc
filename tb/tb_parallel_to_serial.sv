// tb_parallel_to_serial: offers random frames with random gaps and random
// consumer stalls, and checks that the samples leave in element order
// 0..N-1, frame after frame, that a waiting frame is taken in the cycle the
// last sample leaves (no gap), and that the first sample of a frame is
// valid the cycle after the frame is accepted.
`timescale 1ns/1ps
module tb_parallel_to_serial;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid, in_ready, out_valid, out_ready;
  frame_t in_frame;
  cplx_t  out_data;
  int     checks = 0, failures = 0, frames = 0, outs = 0, back2back = 0;
  cplx_t  q [$];

  parallel_to_serial #(.N(N), .T(cplx_t)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_frame, .out_valid, .out_ready, .out_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic took;
    in_valid = 1'b0; out_ready = 1'b0; in_frame = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (frames < 300 || q.size() != 0) begin
      if (!in_valid || in_ready) begin
        in_valid = (frames < 300) && ($urandom_range(0, 2) != 0);
        for (int n = 0; n < N; n++) in_frame[n] = cplx_t'($urandom);
      end
      out_ready = ($urandom_range(0, 3) != 0);
      if (in_valid && in_ready && out_valid) back2back++;
      @(posedge clk);
      took = in_valid && in_ready;
      if (out_valid && out_ready) begin
        cplx_t e;
        e = q.pop_front();
        checks++;
        if (out_data != e) begin failures++; $display("FAIL sample %0d", outs); end
        outs++;
      end
      if (took) begin
        for (int n = 0; n < N; n++) q.push_back(in_frame[n]);
        frames++;
      end
      #1;
      if (took) begin
        checks++;
        if (!out_valid || out_data != in_frame[0]) begin failures++; $display("FAIL first sample not ready"); end
      end
      @(negedge clk);
      if (took) in_valid = 1'b0;
    end
    checks++;
    if (outs != 300 * N || back2back == 0) begin failures++; $display("FAIL outs=%0d back2back=%0d", outs, back2back); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
