`timescale 1ns / 1ps
// tb_first_order_comp - self-checking test of the first-order compensator.
//
// A reference model in longint arithmetic computes the difference equation
// x[n] = floor(K1 * x[n-2] / 2^16) + K2, two-cycle recurrence of the
// two-register pipeline, with K1 = {111111, k1[9:0]}, and the output is
// compared with floor(x / 2^16) every cycle.  The constants of the three
// spread-spectrum frequencies (K1 = 0xFFCB; K2 = 0x3333, 0x3A92, 0x2D77) are
// applied in turn, then random constants; after each settling phase the
// word must be within one of K2 / (1 - K1).  It also checks the time
// constant of a step (1236 iterations of two cycles for K1 = 0xFFCB, i.e.
// 2.47 ms at a 1 MHz clock) and that a step of K2 reaches the output one
// cycle later.
module tb_first_order_comp;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] k1 = 16'hFFCB, k2 = '0;
  logic [9:0]  dlyc;
  int checks = 0, failures = 0;
  longint x [2];      // reference Q10.16 state of the even and odd sequences
  int     ph = 0;

  always #5 clk = ~clk;

  first_order_comp dut (.clk, .rst_n, .k1, .k2, .dlyc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: stage 2 of sequence ph is updated from its value two cycles ago
  longint s1_ref = 0, s2_ref = 0;
  always @(posedge clk) if (rst_n) begin
    longint k1f, s1n, s2n;
    k1f = longint'({6'b111111, k1[9:0]});
    s1n = ((k1f * s2_ref) >> 16) & ((64'd1 << 26) - 1);
    s2n = (s1_ref + longint'(k2)) & ((64'd1 << 26) - 1);
    s1_ref = s1n;
    s2_ref = s2n;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(dlyc) != int'(s2_ref >> 16)) begin
      failures++;
      if (failures < 10) $display("FAIL dlyc %0d, reference %0d", dlyc, s2_ref >> 16);
    end
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // waits 14 time constants (two cycles per iteration) and checks the fixed point
  task automatic settle_and_check(input logic [15:0] a, input logic [15:0] b);
    real target, k1r;
    int  cycles;
    cycles = 28 * 65536 / (65536 - int'({6'b111111, a[9:0]}));
    @(negedge clk);
    k1 = a;
    k2 = b;
    repeat (cycles) @(posedge clk);
    @(negedge clk);
    k1r    = real'({6'b111111, a[9:0]}) / 65536.0;
    target = (real'(b) / 65536.0) / (1.0 - k1r);
    check(real'(dlyc) > target - 1.5 && real'(dlyc) < target + 0.5,
          $sformatf("K1=%h K2=%h settled at %0d, K2/(1-K1) = %0.2f", a, b, dlyc, target));
  endtask

  initial begin
    logic [15:0] kk;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Table values: 1 - K1 = 53/65536, time constant ~1237 iterations
    settle_and_check(16'hFFCB, 16'h3333);
    check(dlyc == 10'd247, "K2 = 0x3333 gives 247");
    // time constant: from 247.3 towards 282.9 the word must reach 270 after the
    // number of cycles the exponential predicts, two cycles per iteration
    begin
      real x0, xi, k1r, n_iter;
      int  c;
      k1r    = 65483.0 / 65536.0;
      x0     = 13107.0 / 53.0;
      xi     = 14994.0 / 53.0;
      n_iter = $ln((xi - 270.0) / (xi - x0)) / $ln(k1r);
      @(negedge clk);
      k2 = 16'h3A92;
      c  = 0;
      while (dlyc < 10'd270 && c < 100000) begin
        @(negedge clk);
        c++;
      end
      check(real'(c) > 2.0 * n_iter * 0.98 && real'(c) < 2.0 * n_iter * 1.02,
            $sformatf("63 %% rise took %0d cycles, expected %0.0f", c, 2.0 * n_iter));
    end
    settle_and_check(16'hFFCB, 16'h3A92);
    check(dlyc == 10'd282, "K2 = 0x3A92 gives 282");
    settle_and_check(16'hFFCB, 16'h2D77);
    check(dlyc == 10'd219, "K2 = 0x2D77 gives 219");
    // one-cycle latency from K2 to the output (large K2 step)
    @(negedge clk);
    k1 = 16'hFC00;          // K1 = 0.984375
    k2 = 16'h0000;
    repeat (3000) @(posedge clk);
    @(negedge clk);
    check(dlyc == 10'd0, "decays to zero with K2 = 0");
    k2 = 16'hFFFF;
    @(posedge clk); #1;
    check(dlyc == 10'd0, "no output change before the edge");
    @(negedge clk);
    check(dlyc == 10'd0, "K2 < 1 adds less than one word");
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(dlyc == 10'd1, "second addition crosses one word");
    for (int i = 0; i < 6; i++) begin
      kk = 16'($urandom_range(0, 1000));
      settle_and_check({6'b0, kk[9:0]}, 16'($urandom_range(0, 4095)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
