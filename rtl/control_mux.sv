// control_mux: routes the arcade panel's switches to the PIA inputs of the
// selected game.
//
// The panel gives 28 active-high lines (after debouncing), 14 per player in
// this order: up, down, left, right, buttons 1-7, coin, start, meta
// (player 1 on bits 0-13, player 2 on bits 14-27). Each game expects its
// controls on different PIA bits, so the mapping is chosen at run time by
// game (purely combinational):
//   Defender / Stargate  PA: fire, thrust, smart bomb, hyperspace, start 2,
//                        start 1, reverse, down (bits 0..7); PB: up, inviso
//                        (P1 stick and buttons 1-6)
//   Joust                PA: left, right, flap (button 1) of the player that
//                        CB2 selects (0 = player 1, 1 = player 2), start 1
//                        on bit 4, start 2 on bit 5; PB: 0
//   Robotron             PA: move up/down/left/right (P1 stick), start 1,
//                        start 2, fire up, fire down (P2 stick); PB: fire
//                        left, fire right (P2 stick)
//   coin door (all)      auto-up (P2 meta), advance (P1 meta), left coin
//                        (P1 coin) and centre coin (P2 coin) on bits 0,1,4,5
// The panel's line order is the design's; the run-time multiplexing and
// CB2 player select are the design's; the bit layout per game follows the
// games' input ports and is not part of the design's own description.
module control_mux
  import williams_pkg::*;
(
  input  game_t       game,
  input  logic        player_sel,   // CB2 of the input PIA
  input  logic [27:0] ctl,
  output logic [7:0]  pa,
  output logic [7:0]  pb,
  output logic [7:0]  coin_door
);

  // offsets inside a player's 14 lines
  localparam int UP = 0, DOWN = 1, LEFT = 2, RIGHT = 3, B1 = 4, B2 = 5, B3 = 6,
                 B4 = 7, B5 = 8, B6 = 9, COIN = 11, START = 12, META = 13;

  logic [13:0] p1, p2, psel;

  assign p1   = ctl[13:0];
  assign p2   = ctl[27:14];
  assign psel = player_sel ? p2 : p1;

  always_comb begin
    pa = '0;
    pb = '0;
    unique case (game)
      GAME_JOUST: begin
        pa = {2'b00, p2[START], p1[START], 1'b0, psel[B1], psel[RIGHT], psel[LEFT]};
      end
      GAME_ROBOTRON: begin
        pa = {p2[DOWN], p2[UP], p2[START], p1[START], p1[RIGHT], p1[LEFT], p1[DOWN], p1[UP]};
        pb = {6'b0, p2[RIGHT], p2[LEFT]};
      end
      default: begin   // Defender, Stargate
        pa = {p1[DOWN], p1[B5], p1[START], p2[START], p1[B4], p1[B3], p1[B2], p1[B1]};
        pb = {6'b0, p1[B6], p1[UP]};
      end
    endcase
  end

  assign coin_door = {2'b00, p2[COIN], p1[COIN], 2'b00, p1[META], p2[META]};

endmodule
