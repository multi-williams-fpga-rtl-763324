// tb_control_mux: self-checking testbench for control_mux.
// Presses one panel line at a time for every game and both CB2 values and
// checks the PIA bit that must come on, from a table of (game, line, bit)
// entries written out here, and that no other bit is set.
module tb_control_mux;
  import williams_pkg::*;
  game_t game;
  logic player_sel;
  logic [27:0] ctl;
  logic [7:0] pa, pb, coin_door;
  int checks = 0, failures = 0;

  control_mux dut (.game, .player_sel, .ctl, .pa, .pb, .coin_door);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected {port, bit} for a line: port 0 = PA, 1 = PB, 2 = none
  function automatic int expect_map(game_t g, bit ps, int line);
    int pl = line / 14, f = line % 14;
    unique case (g)
      GAME_JOUST: begin
        if (f == 12) return pl == 0 ? 4 : 5;                         // starts
        if (pl != int'(ps)) return 100;
        case (f) 2: return 0; 3: return 1; 4: return 2; default: return 100; endcase
      end
      GAME_ROBOTRON: begin
        if (f == 12) return pl == 0 ? 4 : 5;
        if (pl == 0) case (f) 0: return 0; 1: return 1; 2: return 2; 3: return 3; default: return 100; endcase
        case (f) 0: return 6; 1: return 7; 2: return 8; 3: return 9; default: return 100; endcase
      end
      default: begin
        if (f == 12) return pl == 0 ? 5 : 4;
        if (pl != 0) return 100;
        case (f) 4: return 0; 5: return 1; 6: return 2; 7: return 3; 8: return 6; 1: return 7;
                 0: return 8; 9: return 9; default: return 100; endcase
      end
    endcase
  endfunction

  function automatic int expect_coin(int line);
    case (line) 13: return 1; 27: return 0; 11: return 4; 25: return 5; default: return 100; endcase
  endfunction

  initial begin
    game_t games [4] = '{GAME_DEFENDER, GAME_STARGATE, GAME_JOUST, GAME_ROBOTRON};
    for (int g = 0; g < 4; g++)
      for (int ps = 0; ps < 2; ps++)
        for (int line = 0; line < 28; line++) begin
          int e, c;
          logic [15:0] got;
          game = games[g]; player_sel = ps[0]; ctl = 28'd1 << line;
          #1;
          e = expect_map(game, ps[0], line);
          got = {pb, pa};
          check(got == ((e == 100) ? 16'h0 : 16'd1 << e), $sformatf("game %0d ps %0d line %0d", g, ps, line));
          c = expect_coin(line);
          check(coin_door == ((c == 100) ? 8'h0 : 8'd1 << c), $sformatf("coin door line %0d", line));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
