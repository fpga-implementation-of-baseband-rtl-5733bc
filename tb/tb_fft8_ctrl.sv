// tb_fft8_ctrl: checks the FFT controller's sequence. After a frame is
// offered, load must pulse once, then run must be high for exactly 12
// cycles with (stage, bfly) stepping (0,0), (0,1), ... (2,3), then out_valid
// must stay high until out_ready, and in_ready must be high only when idle.
`timescale 1ns/1ps
module tb_fft8_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, load, run, out_valid, out_ready;
  logic [1:0] stage, bfly;
  int         checks = 0, failures = 0;

  fft8_ctrl dut (.clk, .rst_n, .in_valid, .in_ready, .load, .run, .stage, .bfly, .out_valid, .out_ready);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      expect_eq("idle in_ready", int'(in_ready), 1);
      expect_eq("idle load", int'(load), 0);
      expect_eq("idle run", int'(run), 0);
      in_valid = 1'b1;
      #1 expect_eq("load on offer", int'(load), 1);
      @(negedge clk);
      in_valid = 1'b0;
      for (int s = 0; s < 3; s++)
        for (int b = 0; b < 4; b++) begin
          expect_eq("run", int'(run), 1);
          expect_eq("in_ready while busy", int'(in_ready), 0);
          expect_eq("load while busy", int'(load), 0);
          expect_eq("stage", int'(stage), s);
          expect_eq("bfly", int'(bfly), b);
          expect_eq("out_valid while busy", int'(out_valid), 0);
          @(negedge clk);
        end
      // result held for rep cycles
      for (int h = 0; h <= rep; h++) begin
        expect_eq("out_valid", int'(out_valid), 1);
        expect_eq("run after done", int'(run), 0);
        expect_eq("in_ready while holding", int'(in_ready), 0);
        if (h == rep) out_ready = 1'b1;
        @(negedge clk);
      end
      out_ready = 1'b0;
      expect_eq("out_valid released", int'(out_valid), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
