// debounce: switch debouncer for the control panel lines.
//
// Each of the W raw switch lines is first passed through a two-flop
// synchroniser. A line's debounced output changes only after the
// synchronised input has differed from it for CYCLES consecutive clocks;
// any bounce back to the current output value restarts that bit's count.
// A change therefore shows at the output CYCLES + 2 clocks after it
// settles at the input. With a 4 MHz clock the default of 20000 cycles is
// 5 ms. The need for debouncing is the design's; the counter scheme and its
// length are this design's choice.
module debounce #(
  parameter int W      = 32,
  parameter int CYCLES = 20000
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] raw,
  output logic [W-1:0] clean
);

  localparam int CW = $clog2(CYCLES + 1);

  logic [W-1:0]  s1, s2;
  logic [CW-1:0] cnt [W];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1    <= '0;
      s2    <= '0;
      clean <= '0;
      for (int i = 0; i < W; i++) cnt[i] <= '0;
    end else begin
      s1 <= raw;
      s2 <= s1;
      for (int i = 0; i < W; i++) begin
        if (s2[i] == clean[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] == CW'(CYCLES - 1)) begin
          cnt[i]   <= '0;
          clean[i] <= s2[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end

endmodule
