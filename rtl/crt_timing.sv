// crt_timing: the Williams video address counter ("pixel gun" position).
//
// A 14-bit counter VA[13:0] advances once per MPU cycle (ce). VA[13:6] is
// the scan line (V128..V1) and VA[5:0] the horizontal position (H32..H1),
// as on the video address generator of the original board. The counter
// counts up from 0 until it overflows; on that first overflow it reloads
// RELOAD (16128 = 0x3F00) and counts to overflow a second time, then starts
// again at 0. One frame is therefore 16384 + 256 = 16640 MPU cycles, 16.6 ms
// at 1 MHz (60 Hz). The original counted a 16-bit address at 4 MHz; this
// counter runs at the MPU rate with 14 bits, as the design it follows does.
//
// Outputs (all registered-state decodes, no extra latency):
//   va        current video address
//   va11      VA11, the 4 ms interrupt source (period 4096 cycles)
//   count240  VA13 & VA12 & VA11 & VA10: scan line >= 240; high for
//             1024 + 256 = 1280 cycles (about 1.3 ms) per frame
//   vcount    value read at 0xCB00: the upper six bits of the line, {VA13..VA8, 00}
//   frame_start one-cycle strobe (with ce) when the counter wraps to 0
// The reload value and the 14-bit width follow the design; the split of the
// 0xCB00 read (six bits, low two read as 0) is this design's choice.
module crt_timing #(
  parameter int          VA_W   = 14,
  parameter logic [13:0] RELOAD = 14'd16128
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  output logic [VA_W-1:0] va,
  output logic            va11,
  output logic            count240,
  output logic [7:0]      vcount,
  output logic            frame_start
);

  logic second_pass;   // set after the first overflow, while counting from RELOAD
  logic at_top;

  assign at_top = &va;

  always_ff @(posedge clk) begin
    if (rst) begin
      va          <= '0;
      second_pass <= 1'b0;
    end else if (ce) begin
      if (at_top) begin
        if (second_pass) begin
          va          <= '0;
          second_pass <= 1'b0;
        end else begin
          va          <= RELOAD[VA_W-1:0];
          second_pass <= 1'b1;
        end
      end else begin
        va <= va + 1'b1;
      end
    end
  end

  assign va11        = va[11];
  assign count240    = &va[13:10];
  assign vcount      = {va[13:8], 2'b00};
  assign frame_start = ce & at_top & second_pass;

endmodule
