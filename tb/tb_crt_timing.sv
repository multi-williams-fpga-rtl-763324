// tb_crt_timing: self-checking testbench for crt_timing.
// Drives a random clock enable and compares the video address, VA11,
// COUNT 240 and the 0xCB00 value every clock with a reference computed from
// the number of enables seen: within a 16640-cycle frame, position n gives
// VA = n for n < 16384 and VA = 16128 + (n - 16384) after that. Also
// measures the frame length, the VA11 period and the COUNT 240 high time.
module tb_crt_timing;
  logic clk = 0, rst = 1, ce = 0;
  logic [13:0] va;
  logic va11, count240, frame_start;
  logic [7:0] vcount;
  int checks = 0, failures = 0;
  int n = 0;              // enables since reset
  int last_frame = -1, last_va11 = -1, hi240 = 0, frames = 0;
  logic va11_d = 0;

  crt_timing dut (.clk, .rst, .ce, .va, .va11, .count240, .vcount, .frame_start);

  always #5 clk = ~clk;

  function automatic int ref_va(int k);
    int p = k % 16640;
    return (p < 16384) ? p : 16128 + (p - 16384);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at n=%0d va=%0d", what, n, va);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (n < 3 * 16640 + 100) begin
      ce <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (ce) begin
        if (frame_start) begin
          if (last_frame >= 0) check(n - last_frame == 16640, "frame length");
          if (frames > 0) check(hi240 == 1280, "COUNT 240 high time");
          last_frame = n; hi240 = 0; frames++;
        end
        if (count240) hi240++;
        n++;
      end
      check(va == 14'(ref_va(n)), "video address");
      check(va11 == va[11], "VA11");
      check(count240 == (ref_va(n) >= 240 * 64), "COUNT 240 decode");
      check(vcount == {va[13:8], 2'b00}, "0xCB00 value");
      if (va11 && !va11_d) begin
        if (last_va11 >= 0) check(n - last_va11 == 4096 || n - last_va11 == 4352, "VA11 period");
        last_va11 = n;
      end
      va11_d = va11;
    end
    check(frames >= 3, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
