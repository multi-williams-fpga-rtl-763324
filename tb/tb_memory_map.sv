// tb_memory_map: self-checking testbench for memory_map.
// Plays the bus master and a byte memory with one cycle of read latency,
// plus fixed read values for the two PIAs and the video counter. Each
// access is checked against an address table written out independently:
// which BRAM byte address is used (RAM, ROM or none), which device strobe
// fires, and what the read returns the cycle after. Covers the bank latch
// at 0xC900 (ROM reads, RAM writes beneath it), the palette and its mirror,
// CMOS, fixed ROM, the blitter enable, and unmapped I/O.
module tb_memory_map;
  import williams_pkg::*;
  logic clk = 0, rst = 1, blit_en = 0;
  logic acc = 0, we = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic mem_en, mem_we;
  logic [16:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic [2:0] io_reg;
  logic [7:0] io_wdata;
  logic pia_in_cs, pia_snd_cs, blit_we, io_we, rom_bank;
  logic [7:0] mem [131072];
  int checks = 0, failures = 0;

  memory_map dut (.clk, .rst, .blit_en, .acc, .addr, .we, .wdata, .rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .io_reg, .io_wdata, .pia_in_cs, .pia_snd_cs, .blit_we, .io_we,
    .pia_in_rdata(8'hA5 ^ {6'b0, io_reg[1:0]}), .pia_snd_rdata(8'h5A ^ {6'b0, io_reg[1:0]}),
    .vcount(8'hF4), .rom_bank);

  always #5 clk = ~clk;
  always_ff @(posedge clk)
    if (mem_en) begin
      mem_rdata <= mem[mem_addr];
      if (mem_we) mem[mem_addr] <= mem_wdata;
    end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s addr=%h", what, addr); end
  endtask

  // expected BRAM byte address, -1 for none
  function automatic int exp_mem(logic [15:0] a, bit w, bit bank);
    if (a < 16'h9000) return (bank && !w) ? 32'h10000 + a : a;
    if (a < 16'hC000) return a;
    if (a < 16'hC400) return 32'hC000 + a[3:0];
    if (a >= 16'hCC00 && a < 16'hD000) return a;
    if (a >= 16'hD000) return w ? -1 : 32'h10000 + a;
    return -1;
  endfunction

  task automatic access(logic [15:0] a, bit w, logic [7:0] d, output logic [7:0] q,
                        input bit bank, input int exp_strobe);
    int em;
    acc <= 1; addr <= a; we <= w; wdata <= d;
    #1;
    em = exp_mem(a, w, bank);
    check(mem_en == (em >= 0), "memory enable");
    if (em >= 0) check(mem_addr == 17'(em), "BRAM address");
    if (em >= 0) check(mem_we == w, "memory write");
    check(pia_in_cs == (exp_strobe == 1), "input PIA strobe");
    check(pia_snd_cs == (exp_strobe == 2), "sound PIA strobe");
    check(blit_we == (exp_strobe == 3), "blitter strobe");
    @(posedge clk);
    acc <= 0; we <= 0;
    #1;
    q = rdata;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q;
    for (int i = 0; i < 131072; i++) mem[i] = 8'(i * 7 + (i >> 8));
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(rom_bank == 0, "bank latch resets to RAM");
    // RAM read/write across the regions
    access(16'h1234, 1, 8'h11, q, 0, 0);
    access(16'h1234, 0, 0, q, 0, 0); check(q == 8'h11, "RAM read back");
    access(16'hA000, 1, 8'h22, q, 0, 0);
    access(16'hA000, 0, 0, q, 0, 0); check(q == 8'h22, "always-RAM read back");
    // fixed ROM
    access(16'hFFFE, 0, 0, q, 0, 0); check(q == mem[17'h1FFFE], "fixed ROM read");
    access(16'hE000, 1, 8'h33, q, 0, 0);
    check(mem[17'h1E000] != 8'h33 && mem[17'h0E000] != 8'h33, "ROM write ignored");
    // bank switch to ROM
    access(16'hC900, 1, 8'h01, q, 0, 0);
    check(rom_bank == 1, "bank latch set");
    access(16'h1234, 0, 0, q, 1, 0); check(q == mem[17'h11234], "banked ROM read");
    access(16'h1234, 1, 8'h44, q, 1, 0);
    check(mem[17'h01234] == 8'h44, "write under ROM goes to RAM");
    access(16'h9100, 0, 0, q, 1, 0); check(q == mem[17'h09100], "0x9000+ stays RAM");
    access(16'hC900, 1, 8'h00, q, 1, 0);
    access(16'h1234, 0, 0, q, 0, 0); check(q == 8'h44, "RAM visible after bank back");
    // palette and mirror
    access(16'hC003, 1, 8'h5C, q, 0, 0);
    check(mem[17'h0C003] == 8'h5C, "palette entry in BRAM");
    access(16'hC013, 0, 0, q, 0, 0); check(q == 8'h5C, "palette mirror");
    // CMOS
    access(16'hCC10, 1, 8'h0F, q, 0, 0);
    access(16'hCC10, 0, 0, q, 0, 0); check(q == 8'h0F, "CMOS read back");
    // PIAs and video counter
    for (int r = 0; r < 4; r++) begin
      access(16'hC804 + 16'(r), 0, 0, q, 0, 1); check(q == (8'hA5 ^ 8'(r)), "input PIA read");
      check(io_reg[1:0] == 2'(r), "PIA register select");
      access(16'hC80C + 16'(r), 0, 0, q, 0, 2); check(q == (8'h5A ^ 8'(r)), "sound PIA read");
    end
    access(16'hC800, 0, 0, q, 0, 0); check(q == 8'h00, "unmapped I/O reads 0");
    access(16'hCB00, 0, 0, q, 0, 0); check(q == 8'hF4, "video counter read");
    // blitter registers only with blit_en
    access(16'hCA00, 1, 8'hC0, q, 0, 0);
    blit_en <= 1;
    for (int r = 0; r < 8; r++) begin
      access(16'hCA00 + 16'(r), 1, 8'(r), q, 0, 3);
      check(io_reg == 3'(r) && io_wdata == 8'(r), "blitter register and data");
    end
    access(16'hCA08, 1, 8'h00, q, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
