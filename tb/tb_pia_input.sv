// tb_pia_input: self-checking testbench for pia_input.
// Checks that PA and PB read the inputs as sampled one clock earlier, that
// CRA reads 0, that CRB holds its six writable bits, and that CB2 follows
// CRB bit 3 only in the output set/reset mode (CRB[5:4] = 11).
module tb_pia_input;
  logic clk = 0, rst = 1, cs = 0, we = 0, cb2;
  logic [1:0] rs = 0;
  logic [7:0] wdata = 0, rdata, pa_in = 0, pb_in = 0;
  int checks = 0, failures = 0;

  pia_input dut (.clk, .rst, .cs, .we, .rs, .wdata, .rdata, .pa_in, .pb_in, .cb2);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_crb(logic [7:0] v);
    cs = 1; we = 1; rs = 3; wdata = v;
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
    check(cb2 == 0, "CB2 low after reset");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a, b;
      a = 8'($urandom); b = 8'($urandom);
      pa_in = a; pb_in = b;
      @(posedge clk); #1;
      pa_in = ~a; pb_in = ~b;        // changes after sampling must not show yet
      cs = 1; rs = 0; #1; check(rdata == a, "PA read");
      rs = 2; #1; check(rdata == b, "PB read");
      rs = 1; #1; check(rdata == 8'h00, "CRA reads 0");
      cs = 0;
    end
    write_crb(8'hFF);
    rs = 3; #1; check(rdata == 8'h3F, "CRB read");
    check(cb2 == 1, "CB2 high in set mode");
    write_crb(8'h30);
    check(cb2 == 0, "CB2 low in reset mode");
    write_crb(8'h28);
    check(cb2 == 0, "CB2 low outside output set/reset mode");
    write_crb(8'h38);
    check(cb2 == 1, "CB2 high again");
    cs = 1; we = 1; rs = 2; wdata = 8'h00; @(posedge clk); #1; cs = 0; we = 0;
    check(cb2 == 1, "write to PB does not touch CRB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
