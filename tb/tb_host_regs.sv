// tb_host_regs: self-checking testbench for host_regs.
// Checks reset values, game and RUN writes and their read-back, the
// blitter enable per game, the sound register (command, flag, ack pulse
// only on a read of that register) and the status bits.
module tb_host_regs;
  import williams_pkg::*;
  logic clk = 0, rst = 1, cs = 0, we = 0;
  logic [1:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  game_t game;
  logic run, blit_en, snd_ack;
  logic [5:0] snd_cmd = 6'h15;
  logic snd_valid = 1, restart_btn = 0, blit_busy = 0, rom_bank = 0;
  int checks = 0, failures = 0;

  host_regs dut (.clk, .rst, .cs, .we, .addr, .wdata, .rdata, .game, .run, .blit_en,
                 .snd_cmd, .snd_valid, .snd_ack, .restart_btn, .blit_busy, .rom_bank);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    check(!run && game == GAME_STARGATE, "reset values");
    for (int g = 0; g < 4; g++) begin
      cs = 1; we = 1; addr = 0; wdata = 32'h10 | g;
      @(posedge clk); #1;
      we = 0; #1;
      check(game == game_t'(g) && run, "game and run written");
      check(rdata == (32'h10 | g), "control read back");
      check(blit_en == (g >= 2), "blitter only for Joust and Robotron");
      check(!snd_ack, "no ack on control read");
      cs = 0;
    end
    cs = 1; we = 1; addr = 0; wdata = 32'h2; @(posedge clk); #1; cs = 0; we = 0;
    check(!run, "run cleared");
    cs = 1; addr = 1; #1;
    check(rdata == 32'h115, "sound register");
    check(snd_ack, "ack on sound read");
    cs = 0; #1;
    check(!snd_ack, "ack only while read");
    cs = 1; we = 1; addr = 1; #1;
    check(!snd_ack, "no ack on write to sound register");
    we = 0; addr = 2; restart_btn = 1; blit_busy = 1; rom_bank = 1; #1;
    check(rdata == 32'h7, "status bits");
    restart_btn = 0; #1;
    check(rdata == 32'h6, "restart bit follows button");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
