// host_regs: registers through which the host processor runs the core.
//
// A simple synchronous register port (cs, we, addr, wdata; rdata is
// combinational) stands for the host bus attachment:
//   0  CONTROL  rw  [1:0] game (williams_pkg::game_t), [4] run: while 0 the
//                   M6809E is held in reset, so the host can load ROMs and
//                   clear RAM in the shared BRAM first
//   1  SOUND    r   [5:0] last sound command written by the game, [8] new
//                   command flag; a read of this register clears the flag
//                   (snd_ack pulses for one clock)
//   2  STATUS   r   [0] restart button, [1] blitter busy (CPU halted),
//                   [2] bank latch (1 = ROM mapped low)
// blit_en enables the blitter for the games that have one (Joust,
// Robotron). Game selection, CPU reset, the blitter enable and the sound
// command hand-off are the design's; the register layout and the plain
// register port (in place of the full host bus protocol) are this design's.
module host_regs
  import williams_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cs,
  input  logic        we,
  input  logic [1:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output game_t       game,
  output logic        run,
  output logic        blit_en,
  input  logic [5:0]  snd_cmd,
  input  logic        snd_valid,
  output logic        snd_ack,
  input  logic        restart_btn,
  input  logic        blit_busy,
  input  logic        rom_bank
);

  always_ff @(posedge clk) begin
    if (rst) begin
      game <= GAME_STARGATE;
      run  <= 1'b0;
    end else if (cs && we && addr == 2'd0) begin
      game <= game_t'(wdata[1:0]);
      run  <= wdata[4];
    end
  end

  assign snd_ack = cs && !we && addr == 2'd1;
  assign blit_en = (game == GAME_JOUST) || (game == GAME_ROBOTRON);

  always_comb begin
    unique case (addr)
      2'd0:    rdata = {27'b0, run, 2'b00, game};
      2'd1:    rdata = {23'b0, snd_valid, 2'b00, snd_cmd};
      2'd2:    rdata = {29'b0, rom_bank, blit_busy, restart_btn};
      default: rdata = 32'h0;
    endcase
  end

endmodule
