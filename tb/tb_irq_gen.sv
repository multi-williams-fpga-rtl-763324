// tb_irq_gen: self-checking testbench for irq_gen.
// Drives VA11 and COUNT 240 by hand, with the clock enable active on every
// other clock, and checks that each rising edge gives an IRQ pulse of
// exactly IRQ_HOLD (100) enabled cycles, that a level held high does not
// retrigger, and that overlapping pulses from both sources merge on irq.
module tb_irq_gen;
  logic clk = 0, rst = 1, ce = 0;
  logic va11 = 0, count240 = 0;
  logic irq, irq_4ms, irq_240, ev_4ms, ev_240;
  int checks = 0, failures = 0;

  irq_gen dut (.clk, .rst, .ce, .va11, .count240, .irq, .irq_4ms, .irq_240, .ev_4ms, .ev_240);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= rst ? 1'b0 : ~ce;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // count enabled cycles with irq high until it drops
  task automatic measure(output int len);
    len = 0;
    do begin
      @(posedge clk); #1;
      if (ce) ;
    end while (!irq);
    while (irq) begin
      @(posedge clk);
      if (ce) len++;
      #1;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    check(!irq, "no irq after reset");
    // VA11 edge, held high much longer than the pulse
    va11 <= 1;
    measure(len);
    check(len == 100, "4 ms pulse length");
    check(!irq_240, "240 source quiet");
    repeat (400) @(posedge clk);
    check(!irq, "level does not retrigger");
    va11 <= 0;
    repeat (10) @(posedge clk);
    check(!irq, "falling edge gives no irq");
    // COUNT 240 edge
    count240 <= 1;
    measure(len);
    check(len == 100, "240 pulse length");
    count240 <= 0;
    // overlap: 240 edge then VA11 edge 50 cycles later
    repeat (10) @(posedge clk);
    count240 <= 1;
    repeat (100) @(posedge clk);   // 50 enabled cycles
    check(irq && irq_240 && !irq_4ms, "only 240 active");
    va11 <= 1;
    repeat (20) @(posedge clk); #1;
    check(irq_240 && irq_4ms, "both active");
    measure(len);
    check(len >= 85 && len <= 95, "merged pulse ends with the later source");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
