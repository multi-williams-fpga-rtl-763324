// tb_debounce: self-checking testbench for debounce (CYCLES reduced to 50).
// Bounces some lines, holds others steady, and checks that an output only
// changes after its input has been stable for CYCLES clocks (plus the two
// synchroniser stages), and that a short glitch never reaches the output.
module tb_debounce;
  localparam int CYC = 50;
  logic clk = 0, rst = 1;
  logic [7:0] raw = 0, clean;
  int checks = 0, failures = 0;

  debounce #(.W(8), .CYCLES(CYC)) dut (.clk, .rst, .raw, .clean);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // glitches shorter than CYCLES on bit 0
    for (int i = 0; i < 10; i++) begin
      raw[0] = 1; repeat (CYC / 2) @(posedge clk); #1;
      raw[0] = 0; repeat (3) @(posedge clk); #1;
      check(clean[0] == 0, "glitch filtered");
    end
    // clean press on bit 3: measure the delay
    raw[3] = 1; t = 0;
    while (!clean[3] && t < 10 * CYC) begin @(posedge clk); #1; t++; end
    check(t == CYC + 2, "press delay is CYCLES + 2");
    check(clean == 8'h08, "only bit 3 changed");
    // bouncing release then settle
    for (int i = 0; i < 5; i++) begin
      raw[3] = 0; repeat (7) @(posedge clk); #1;
      raw[3] = 1; repeat (2) @(posedge clk); #1;
      check(clean[3] == 1, "bounce does not release");
    end
    raw[3] = 0;
    repeat (CYC + 1) @(posedge clk); #1;
    check(clean[3] == 1, "not released before CYCLES + 2");
    repeat (2) @(posedge clk); #1;
    check(clean[3] == 0, "released");
    raw = 8'hA5;
    repeat (CYC + 3) @(posedge clk); #1;
    check(clean == 8'hA5, "all lines follow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
