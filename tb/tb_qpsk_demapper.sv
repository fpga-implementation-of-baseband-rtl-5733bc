// tb_qpsk_demapper: sends random complex symbols (including values near
// zero) with random output stalls and checks that each decision equals
// {sign of Q, sign of I} and that order and count are kept.
`timescale 1ns/1ps
module tb_qpsk_demapper;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready;
  cplx_t      in_sym;
  logic [1:0] out_bits;
  int         checks = 0, failures = 0, sent = 0;
  logic [1:0] q [$];

  qpsk_demapper dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_ready, .out_bits);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; out_ready = 1'b0; in_sym = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (sent < 2000) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_sym.re = word_t'($signed($urandom_range(0, 200)) - 100);
      in_sym.im = word_t'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) begin
        q.push_back({in_sym.im < 0, in_sym.re < 0}); sent++;
      end
      if (out_valid && out_ready) begin
        logic [1:0] e;
        e = q.pop_front();
        checks++;
        if (out_bits != e) begin failures++; $display("FAIL got %b expected %b", out_bits, e); end
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
        if (out_bits != e) begin failures++; $display("FAIL last symbol"); end
      end
      @(negedge clk);
    end
    checks++;
    if (q.size() != 0 || out_valid) begin failures++; $display("FAIL %0d symbols lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
