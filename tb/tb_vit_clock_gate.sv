// tb_vit_clock_gate: self-checking testbench of the clock gating cell.
//
// Changes the enable at random times, in both clock phases, and checks that a
// gated clock pulse occurs exactly when the enable was high at the end of the
// preceding low phase, that gclk is never high while clk is low, and that a
// pulse, once started, lasts the whole high phase.
module tb_vit_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, blocked = 0;
  logic en_at_rise;

  vit_clock_gate u_dut (.clk, .en, .gclk);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      // low phase: enable may change anywhere in it
      #($urandom_range(1, 4)) en = 1'($urandom);
      #($urandom_range(1, 4));
      en_at_rise = en;
      clk = 1'b1;
      #1;
      checks++;
      if (gclk !== en_at_rise) begin
        failures++;
        $display("cycle %0d: gclk=%0b, enable before edge %0b", c, gclk, en_at_rise);
      end
      if (en_at_rise) pulses++; else blocked++;
      // high phase: toggling the enable must not change gclk
      #($urandom_range(1, 3)) en = ~en;
      #1;
      checks++;
      if (gclk !== en_at_rise) begin
        failures++;
        $display("cycle %0d: gclk changed during high phase", c);
      end
      #($urandom_range(1, 3));
      clk = 1'b0;
      #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high while clk low"); end
    end
    checks++;
    if (pulses == 0 || blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
