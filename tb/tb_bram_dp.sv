// tb_bram_dp: self-checking testbench for the 128 kB dual-port BRAM.
// Writes random lines and single byte lanes through both ports, keeps its
// own copy of the contents, and checks every read on both ports, including
// the one-cycle read latency and read-before-write on the same port.
module tb_bram_dp;
  localparam int LINES = 16384;
  logic clk = 0;
  logic a_en = 0, b_en = 0;
  logic [7:0] a_we = 0, b_we = 0;
  logic [13:0] a_addr = 0, b_addr = 0;
  logic [63:0] a_din = 0, b_din = 0, a_dout, b_dout;
  logic [63:0] model [int];
  int checks = 0, failures = 0;

  bram_dp dut (.clk, .a_en, .a_we, .a_addr, .a_din, .a_dout, .b_en, .b_we, .b_addr, .b_din, .b_dout);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [63:0] merge(logic [63:0] old, logic [63:0] d, logic [7:0] we);
    for (int j = 0; j < 8; j++) if (we[j]) old[8*j +: 8] = d[8*j +: 8];
    return old;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] addrs [64];
    logic [63:0] expect_a, expect_b, d;
    logic [7:0] we;
    // fill 64 lines: even ones through port A, odd through port B
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? 14'd0 : (i == 1) ? 14'h3FFF : 14'($urandom_range(2, LINES - 1));
      for (int k = 0; k < i; k++) if (addrs[k] == addrs[i]) addrs[i] = 14'(i * 37 + 5000);
    end
    for (int i = 0; i < 64; i++) begin
      d = {$urandom, $urandom};
      if (i % 2 == 0) begin a_en = 1; a_we = 8'hFF; a_addr = addrs[i]; a_din = d; end
      else            begin b_en = 1; b_we = 8'hFF; b_addr = addrs[i]; b_din = d; end
      model[addrs[i]] = d;
      @(posedge clk); #1;
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    end
    // partial byte writes on both ports
    for (int i = 0; i < 64; i++) begin
      we = 8'($urandom);
      d = {$urandom, $urandom};
      if (i % 2) begin a_en = 1; a_we = we; a_addr = addrs[i]; a_din = d; end
      else       begin b_en = 1; b_we = we; b_addr = addrs[i]; b_din = d; end
      @(posedge clk); #1;
      // read-before-write: the port returns the old line
      if (i % 2) begin check(a_dout == model[addrs[i]], "port A read-before-write"); end
      else       check(b_dout == model[addrs[i]], "port B read-before-write");
      model[addrs[i]] = merge(model[addrs[i]], d, we);
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    end
    // read back on both ports at once
    for (int i = 0; i < 64; i++) begin
      a_en = 1; a_addr = addrs[i];
      b_en = 1; b_addr = addrs[63 - i];
      expect_a = model[addrs[i]];
      expect_b = model[addrs[63 - i]];
      @(posedge clk); #1;
      check(a_dout == expect_a, "port A read");
      check(b_dout == expect_b, "port B read");
    end
    // output holds while the port is disabled
    a_en = 0; b_en = 0;
    @(posedge clk); #1;
    a_addr = addrs[5];
    @(posedge clk); #1;
    check(a_dout == expect_a, "port A holds when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
