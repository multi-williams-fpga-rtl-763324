// bram_dp: the shared 128 kB dual-port block RAM.
//
// Holds the game's program ROMs, the video framebuffer, scratchpad RAM,
// palette and CMOS bytes. It is organised as LINES lines of 64 bits (8
// bytes); byte lane j is bits [8j+7:8j] and is written when we[j] is set.
// Port A serves the host processor (it loads the ROMs and reads the
// framebuffer and palette for the video layer); port B serves the core
// through bram_port_adapter. Both ports are synchronous: a read presented
// with en at one clock edge returns its line after that edge (one cycle
// latency), read-before-write on the same port. A write from both ports
// to the same line in the same cycle is not arbitrated: port B's lanes win.
// Size and 64-bit width follow the BRAM block of the design; the single
// clock for both ports and the lane numbering are this design's choices.
module bram_dp #(
  parameter int LINES  = 16384,            // 16384 x 8 bytes = 128 kB
  parameter int AW     = $clog2(LINES)
) (
  input  logic          clk,
  // port A (host)
  input  logic          a_en,
  input  logic [7:0]    a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [63:0]   a_din,
  output logic [63:0]   a_dout,
  // port B (core)
  input  logic          b_en,
  input  logic [7:0]    b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [63:0]   b_din,
  output logic [63:0]   b_dout
);

  logic [63:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      for (int j = 0; j < 8; j++)
        if (a_we[j]) mem[a_addr][8*j +: 8] <= a_din[8*j +: 8];
    end
    if (b_en) begin
      b_dout <= mem[b_addr];
      for (int j = 0; j < 8; j++)
        if (b_we[j]) mem[b_addr][8*j +: 8] <= b_din[8*j +: 8];
    end
  end

endmodule
