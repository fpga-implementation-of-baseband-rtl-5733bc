// tb_ofdm_tx: drives the transmitter with random 2-bit symbols and random
// output stalls, and checks every time-domain sample against the 1/8-scaled
// inverse DFT of the eight QPSK points of its OFDM symbol (within 4 LSB).
// A second phase with input always valid and output always ready checks the
// throughput: consecutive OFDM symbols start 14 cycles apart.
`timescale 1ns/1ps
module tb_ofdm_tx;
  import ofdm_pkg::*;
  import ofdm_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready;
  logic [1:0] in_bits;
  cplx_t      out_sample;
  int         checks = 0, failures = 0, nin = 0, nout = 0, stalls = 0;
  logic [1:0] sent [$];
  logic [1:0] sym [N];
  int         first_cycle [$];
  int         cyc = 0;
  logic       free_run = 1'b0;

  ofdm_tx dut (.clk, .rst_n, .in_valid, .in_ready, .in_bits, .out_valid, .out_ready, .out_sample);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, real got, real exp);
    checks++;
    if ((got - exp) > 4.0 || (exp - got) > 4.0) begin
      failures++; $display("FAIL %s sample %0d: got %0.1f expected %0.2f", what, nout, got, exp);
    end
  endtask

  localparam int FRAMES = 120;

  initial begin
    bit took, gave;
    in_valid = 1'b0; out_ready = 1'b0; in_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (nout < FRAMES * N) begin
      free_run = (nout >= (FRAMES - 20) * N);
      if (!in_valid || in_ready) begin
        in_valid = (nin < FRAMES * N) && (free_run || $urandom_range(0, 3) != 0);
        in_bits  = 2'($urandom);
      end
      out_ready = free_run || ($urandom_range(0, 3) != 0);
      #1;
      took = in_valid && in_ready;
      gave = out_valid && out_ready;
      if (in_valid && !in_ready) stalls++;
      if (gave) begin
        int n;
        n = nout % N;
        if (n == 0) begin
          for (int k = 0; k < N; k++) sym[k] = sent.pop_front();
          first_cycle.push_back(cyc);
        end
        check("re", real'(out_sample.re), idft_re(sym, n));
        check("im", real'(out_sample.im), idft_im(sym, n));
        nout++;
      end
      if (took) begin sent.push_back(in_bits); nin++; end
      @(negedge clk);
      if (took) in_valid = 1'b0;
    end
    // free-running phase: symbols start 14 cycles apart
    for (int f = FRAMES - 10; f < FRAMES; f++) begin
      checks++;
      if (first_cycle[f] - first_cycle[f-1] != 14) begin
        failures++; $display("FAIL symbol period %0d", first_cycle[f] - first_cycle[f-1]);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL input never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
