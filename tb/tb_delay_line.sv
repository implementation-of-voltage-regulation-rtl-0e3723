`timescale 1ns / 1ps
// tb_delay_line - self-checking test of the delay-line model.
//
// Sends pulses of random width through the line for random taps and checks
// that both edges come out tap * 2 ns later, including pulses shorter than
// the delay (several edges in flight at once) and tap increases between edges.
module tb_delay_line;
  logic din = 1'b0, dout;
  logic [9:0] tap = '0;
  int checks = 0, failures = 0;
  realtime q_in [$];
  realtime q_dly [$];

  delay_line dut (.din, .tap, .dout);

  // expected output time of every input edge, in order
  // (changes at time zero are initialisation, not edges)
  always @(din) if ($realtime > 0) begin
    q_in.push_back($realtime);
    q_dly.push_back(real'(tap) * 2.0);
  end
  always @(dout) if ($realtime > 0) begin
    realtime t_exp;
    checks++;
    if (q_in.size() == 0) begin
      failures++;
      $display("FAIL output edge without input edge");
    end else begin
      t_exp = q_in.pop_front() + q_dly.pop_front();
      if ($realtime < t_exp - 0.001 || $realtime > t_exp + 0.001) begin
        failures++;
        $display("FAIL edge at %0t, expected %0t", $realtime, t_exp);
      end
    end
  end

  initial begin : watchdog
    #(1.0e7);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int k = 0; k < 300; k++) begin
      tap = 10'($urandom_range(1, 1023));
      #($urandom_range(1, 3000) * 1.0);
      din = 1'b1;
      #($urandom_range(1, 3000) * 1.0);
      // a longer delay for the falling edge keeps the edges in order
      if (k % 3 == 0 && tap < 10'd1000) tap = tap + 10'($urandom_range(0, 20));
      din = 1'b0;
      #(4200.0);   // let the last edge leave the line when taps change order
    end
    #(3000.0);
    checks++;
    if (q_in.size() != 0) begin
      failures++;
      $display("FAIL %0d edges lost", q_in.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
