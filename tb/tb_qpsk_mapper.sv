// tb_qpsk_mapper: sends random 2-bit symbols with random output stalls and
// checks every constellation point (bit 0 -> sign of I, bit 1 -> sign of Q,
// amplitude 4096), the order of the stream and the one-cycle latency.
`timescale 1ns/1ps
module tb_qpsk_mapper;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready;
  logic [1:0] in_bits;
  cplx_t      out_sym;
  int         checks = 0, failures = 0;
  logic [1:0] q [$];
  int         sent = 0, got = 0;

  qpsk_mapper dut (.clk, .rst_n, .in_valid, .in_ready, .in_bits, .out_valid, .out_ready, .out_sym);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: a symbol accepted with the output free is valid next cycle
  initial begin
    in_valid = 1'b0; out_ready = 1'b1; in_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    in_valid = 1'b1; in_bits = 2'b10;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || out_sym.re != 16'sd4096 || out_sym.im != -16'sd4096) begin
      failures++; $display("FAIL latency/point for 10");
    end
    @(negedge clk);
    while (sent < 2000) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_bits  = 2'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) begin q.push_back(in_bits); sent++; end
      if (out_valid && out_ready) begin
        logic [1:0] e;
        e = q.pop_front();
        checks++;
        if (out_sym.re != (e[0] ? -16'sd4096 : 16'sd4096) || out_sym.im != (e[1] ? -16'sd4096 : 16'sd4096)) begin
          failures++; $display("FAIL bits %b -> (%0d,%0d)", e, out_sym.re, out_sym.im);
        end
        got++;
      end
      @(negedge clk);
    end
    // drain and check that every accepted symbol came out
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (3) begin
      @(posedge clk);
      if (out_valid && q.size() != 0) begin
        logic [1:0] e;
        e = q.pop_front();
        checks++;
        if (out_sym.re != (e[0] ? -16'sd4096 : 16'sd4096) || out_sym.im != (e[1] ? -16'sd4096 : 16'sd4096)) begin failures++; $display("FAIL last symbol"); end
      end
      @(negedge clk);
    end
    checks++;
    if (q.size() != 0 || out_valid) begin failures++; $display("FAIL %0d symbols lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
