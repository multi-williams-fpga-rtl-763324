// tb_pia_sound: self-checking testbench for pia_sound.
// Checks the sampled port A input, that a port B write stores six bits,
// raises the new-command flag and gives one strobe, that the host ack
// clears the flag, that a write in the same clock as an ack wins, and that
// writes to other registers do not disturb the command.
module tb_pia_sound;
  logic clk = 0, rst = 1, cs = 0, we = 0, snd_ack = 0;
  logic [1:0] rs = 0;
  logic [7:0] wdata = 0, rdata, pa_in = 0;
  logic [5:0] snd_cmd;
  logic snd_valid, snd_strobe;
  int checks = 0, failures = 0, strobes = 0;

  pia_sound dut (.clk, .rst, .cs, .we, .rs, .wdata, .rdata, .pa_in, .snd_cmd, .snd_valid, .snd_strobe, .snd_ack);
  always #5 clk = ~clk;
  always @(posedge clk) if (snd_strobe) strobes++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cpu_write(logic [1:0] r, logic [7:0] v);
    cs = 1; we = 1; rs = r; wdata = v;
    @(posedge clk); #1;
    cs = 0; we = 0;
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
    check(!snd_valid, "no command after reset");
    pa_in = 8'h32; @(posedge clk); #1;
    cs = 1; rs = 0; #1; check(rdata == 8'h32, "PA read"); cs = 0;
    cpu_write(2, 8'hEA);
    check(snd_valid && snd_cmd == 6'h2A, "six command bits and flag");
    check(strobes == 1, "one strobe per write");
    cs = 1; rs = 2; #1; check(rdata == 8'h2A, "command read back"); cs = 0;
    cpu_write(0, 8'h15); cpu_write(1, 8'h15); cpu_write(3, 8'h15);
    check(snd_cmd == 6'h2A && strobes == 1, "other registers leave the command");
    snd_ack = 1; @(posedge clk); #1; snd_ack = 0;
    check(!snd_valid && snd_cmd == 6'h2A, "ack clears the flag only");
    snd_ack = 1; cpu_write(2, 8'h07); snd_ack = 0;
    check(snd_valid && snd_cmd == 6'h07, "write beats simultaneous ack");
    check(strobes == 2, "second strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
