// tb_bram_port_adapter: self-checking testbench for bram_port_adapter.
// Connects the adapter to a small 64-bit line memory model and checks the
// address format (8-byte aligned byte address, line = address bits
// [16:3]), the one-hot, big-endian write enable, the eight-fold replicated
// write data, and the byte muxed out on reads, against a byte-array model.
module tb_bram_port_adapter;
  logic clk = 0;
  logic en = 0, we = 0;
  logic [16:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic bram_en;
  logic [7:0] bram_we;
  logic [31:0] bram_addr;
  logic [13:0] bram_line;
  logic [63:0] bram_din, bram_dout;
  logic [63:0] lines [16384];
  logic [7:0] bytes [int];
  int checks = 0, failures = 0;

  bram_port_adapter dut (.clk, .en, .we, .addr, .wdata, .rdata,
                         .bram_en, .bram_we, .bram_addr, .bram_line, .bram_din, .bram_dout);
  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (bram_en) begin
      bram_dout <= lines[bram_line];
      for (int j = 0; j < 8; j++) if (bram_we[j]) lines[bram_line][8*j +: 8] <= bram_din[8*j +: 8];
    end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t addr=%h", what, $time, addr); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] a [256];
    for (int i = 0; i < 16384; i++) lines[i] = '0;
    for (int i = 0; i < 256; i++) begin
      // 32 aligned groups of 8 consecutive bytes plus random bytes
      a[i] = (i < 128) ? 17'(((i / 8) * 4099 % 16384) * 8 + i % 8) : 17'($urandom_range(0, 131071));
    end
    for (int i = 0; i < 256; i++) begin
      logic [7:0] d = 8'($urandom);
      en <= 1; we <= 1; addr <= a[i]; wdata <= d;
      #1;
      check(bram_addr == {15'b0, a[i][16:3], 3'b000}, "aligned address");
      check(bram_line == a[i][16:3], "line");
      check(bram_we == (8'h80 >> a[i][2:0]), "one-hot big-endian write enable");
      check(bram_din == {8{d}}, "replicated data");
      bytes[a[i]] = d;
      @(posedge clk);
    end
    en <= 0; we <= 0;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      en <= 1; we <= 0; addr <= a[i];
      #1;
      check(bram_we == 8'h00, "no write enable on read");
      @(posedge clk);
      en <= 0;
      #1;
      check(rdata == bytes[a[i]], "read byte");
    end
    // byte 0 of a line is the most significant lane
    check(lines[0][63:56] == (bytes.exists(0) ? bytes[0] : 8'h00), "byte 0 in lane 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
