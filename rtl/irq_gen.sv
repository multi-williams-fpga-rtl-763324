// irq_gen: interrupt request generator for the video interrupts.
//
// Two sources come from the video counter: VA11 (a 4 ms periodic interrupt)
// and COUNT 240 (scan line >= 240, once per frame). On each rising edge of
// a source, sampled once per MPU cycle (ce), the generator starts a pulse
// that keeps IRQ asserted for IRQ_HOLD MPU cycles, long enough for the CPU
// to see it whatever instruction it is in the middle of. The two sources
// each have their own pulse timer and the IRQ output is their OR; the
// status outputs let software or a testbench see which source fired.
// Edge detection and pulse stretching are this design's choice; the 100
// cycle hold comes from the hold time the Williams hardware gives its IRQ.
module irq_gen #(
  parameter int IRQ_HOLD = 100
) (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  logic va11,
  input  logic count240,
  output logic irq,
  output logic irq_4ms,      // pulse from VA11 active
  output logic irq_240,      // pulse from COUNT 240 active
  output logic ev_4ms,       // one-cycle strobe: a VA11 rising edge was seen
  output logic ev_240        // one-cycle strobe: a COUNT 240 rising edge was seen
);

  localparam int CW = $clog2(IRQ_HOLD + 1);

  logic          va11_q, c240_q;
  logic [CW-1:0] t4, t240;

  assign ev_4ms = ce & va11 & ~va11_q;
  assign ev_240 = ce & count240 & ~c240_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      va11_q <= 1'b0;
      c240_q <= 1'b0;
      t4     <= '0;
      t240   <= '0;
    end else if (ce) begin
      va11_q <= va11;
      c240_q <= count240;
      if (ev_4ms)          t4 <= CW'(IRQ_HOLD);
      else if (t4 != '0)   t4 <= t4 - 1'b1;
      if (ev_240)          t240 <= CW'(IRQ_HOLD);
      else if (t240 != '0) t240 <= t240 - 1'b1;
    end
  end

  assign irq_4ms = (t4 != '0);
  assign irq_240 = (t240 != '0);
  assign irq     = irq_4ms | irq_240;

endmodule
