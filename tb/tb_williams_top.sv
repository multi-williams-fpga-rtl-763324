// tb_williams_top: end-to-end testbench for williams_top at its default
// parameters.
// The testbench plays the two processors around the core: an M6809E bus
// model that makes one read or write per MPU cycle (and waits while HALT is
// high), and the host, which loads ROM bytes and reads back RAM through the
// BRAM's host port and uses the host registers. One run goes through:
// host ROM load and CPU release from reset, ROM and RAM reads, the bank
// latch with a write under ROM, palette writes seen by the host, blits that
// halt the CPU for the expected number of cycles (a plain copy and a
// rotate), a blit ignored for a game without blitter, a sound command
// handed to the host, debounced controls read through the input PIA with
// the CB2 player switch, the coin door, the restart button, and two video
// frames with both interrupt sources and the 0xCB00 read.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_williams_top;
  import williams_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] cpu_addr = 16'hFFFF;
  logic cpu_rw = 1;
  logic [7:0] cpu_dout = 0, cpu_din;
  logic cpu_ce, cpu_reset, cpu_halt, cpu_irq;
  logic plb_en = 0;
  logic [7:0] plb_we = 0;
  logic [13:0] plb_addr = 0;
  logic [63:0] plb_wdata = 0, plb_rdata;
  logic host_cs = 0, host_we = 0;
  logic [1:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic [31:0] controls = 0;
  logic restart_btn;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_release, n_bank, n_write_under_rom, n_palette, n_halt, n_rotate_blit, n_blit_disabled,
      n_sound, n_player_sel, n_debounce, n_coin, n_restart, n_irq_4ms, n_irq_240, n_frame, n_vcount;

  williams_top dut (.clk, .rst, .cpu_addr, .cpu_rw, .cpu_dout, .cpu_din, .cpu_ce, .cpu_reset,
                    .cpu_halt, .cpu_irq, .plb_en, .plb_we, .plb_addr, .plb_wdata, .plb_rdata,
                    .host_cs, .host_we, .host_addr, .host_wdata, .host_rdata, .controls, .restart_btn);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------- M6809E bus model ----------
  // bus outputs change at the negedge in the last phase of an MPU cycle
  task automatic cpu_cycle(logic [15:0] a, bit rw, logic [7:0] d, output logic [7:0] q);
    @(negedge clk iff cpu_ce);
    while (cpu_halt) @(negedge clk iff cpu_ce);
    cpu_addr = a; cpu_rw = rw; cpu_dout = d;
    @(negedge clk iff cpu_ce);
    q = cpu_din;
    cpu_rw = 1;
  endtask
  task automatic cpu_wr(logic [15:0] a, logic [7:0] d);
    logic [7:0] q;
    cpu_cycle(a, 0, d, q);
  endtask
  task automatic cpu_rd(logic [15:0] a, output logic [7:0] q);
    cpu_cycle(a, 1, 8'h00, q);
  endtask

  // ---------- host model ----------
  task automatic host_wbyte(logic [16:0] ba, logic [7:0] d);
    int lane = 7 - int'(ba[2:0]);
    @(negedge clk);
    plb_en = 1; plb_addr = ba[16:3]; plb_we = 8'd1 << lane; plb_wdata = 64'(d) << (8 * lane);
    @(negedge clk);
    plb_en = 0; plb_we = 0;
  endtask
  task automatic host_rbyte(logic [16:0] ba, output logic [7:0] q);
    int lane = 7 - int'(ba[2:0]);
    @(negedge clk);
    plb_en = 1; plb_addr = ba[16:3]; plb_we = 0;
    @(negedge clk);
    plb_en = 0;
    q = plb_rdata[8 * lane +: 8];
  endtask
  task automatic host_reg_wr(logic [1:0] a, logic [31:0] d);
    @(negedge clk);
    host_cs = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_cs = 0; host_we = 0;
  endtask
  task automatic host_reg_rd(logic [1:0] a, output logic [31:0] q);
    @(negedge clk);
    host_cs = 1; host_we = 0; host_addr = a;
    #1 q = host_rdata;
    @(negedge clk);
    host_cs = 0;
  endtask

  // ---------- video interrupts, frame length ----------
  logic irq4_d = 0, irq240_d = 0, c240_d = 0;
  int mpu_cycles = 0, last240 = -1;
  always @(posedge clk) begin
    if (cpu_ce) mpu_cycles++;
    if (!rst && dut.u_irq.irq_4ms && !irq4_d) n_irq_4ms++;
    if (!rst && dut.u_irq.irq_240 && !irq240_d) begin
      n_irq_240++;
      if (last240 >= 0) begin
        checks++;
        if (mpu_cycles - last240 != 16640) begin
          failures++; $display("FAIL frame length %0d", mpu_cycles - last240);
        end else n_frame++;
      end
      last240 = mpu_cycles;
    end
    irq4_d <= dut.u_irq.irq_4ms;
    irq240_d <= dut.u_irq.irq_240;
    if (!rst && cpu_irq != (dut.u_irq.irq_4ms | dut.u_irq.irq_240)) begin
      failures++; $display("FAIL cpu_irq is not the OR of the two sources");
    end
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // blit a block and measure the halt in MPU cycles
  task automatic blit(logic [7:0] ctl, logic [7:0] mask, logic [15:0] src, logic [15:0] dst,
                      logic [7:0] w, logic [7:0] h, output int halt_cycles);
    logic [7:0] q;
    int start;
    cpu_wr(16'hCA01, mask);
    cpu_wr(16'hCA02, src[15:8]); cpu_wr(16'hCA03, src[7:0]);
    cpu_wr(16'hCA04, dst[15:8]); cpu_wr(16'hCA05, dst[7:0]);
    cpu_wr(16'hCA06, w); cpu_wr(16'hCA07, h);
    cpu_wr(16'hCA00, ctl);
    start = mpu_cycles;
    cpu_rd(16'h9000, q);          // the next access waits for the blit
    halt_cycles = 0;
    halt_cycles = mpu_cycles - start - 2;   // minus this read and the write's own end
  endtask

  initial begin
    logic [7:0] q;
    logic [31:0] r;
    int hc;
    logic [7:0] sprite [24];
    {n_release, n_bank, n_write_under_rom, n_palette, n_halt, n_rotate_blit, n_blit_disabled,
     n_sound, n_player_sel, n_debounce, n_coin, n_restart, n_irq_4ms, n_irq_240, n_frame, n_vcount} = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // host loads ROM while the CPU is held in reset
    check(cpu_reset, "CPU held in reset before RUN");
    host_wbyte(17'h1FFFE, 8'hD0); host_wbyte(17'h1FFFF, 8'h00);     // reset vector
    host_wbyte(17'h1D000, 8'h86);
    host_wbyte(17'h10100, 8'hB5);                                   // banked ROM
    for (int i = 0; i < 24; i++) begin
      sprite[i] = 8'(i * 29 + 3);
      host_wbyte(17'h1E000 + 17'(i), sprite[i]);
    end
    host_reg_wr(0, 32'h10 | 32'(GAME_JOUST));
    check(!cpu_reset, "CPU released by RUN");
    if (!cpu_reset) n_release++;

    // ROM and RAM
    cpu_rd(16'hFFFE, q); check(q == 8'hD0, "reset vector high byte");
    cpu_rd(16'hFFFF, q); check(q == 8'h00, "reset vector low byte");
    cpu_rd(16'hD000, q); check(q == 8'h86, "fixed ROM");
    cpu_wr(16'h0100, 8'h5E);
    cpu_rd(16'h0100, q); check(q == 8'h5E, "RAM under bank");
    // bank latch: ROM visible at 0x0100, writes still land in RAM
    cpu_wr(16'hC900, 8'h01);
    cpu_rd(16'h0100, q); check(q == 8'hB5, "banked ROM read");
    if (q == 8'hB5) n_bank++;
    cpu_wr(16'h0100, 8'h77);
    host_rbyte(17'h00100, q); check(q == 8'h77, "write under ROM reaches RAM");
    if (q == 8'h77) n_write_under_rom++;
    host_rbyte(17'h10100, q); check(q == 8'hB5, "ROM unchanged");
    cpu_wr(16'hC900, 8'h00);
    cpu_rd(16'h0100, q); check(q == 8'h77, "RAM back after bank switch");

    // palette, read by the host
    for (int i = 0; i < 16; i++) cpu_wr(16'hC000 + 16'(i), 8'(8'hF0 - i));
    for (int i = 0; i < 16; i++) begin
      host_rbyte(17'h0C000 + 17'(i), q);
      check(q == 8'(8'hF0 - i), "palette entry in BRAM");
      if (q == 8'(8'hF0 - i)) n_palette++;
    end

    // blit a 4 x 6 sprite from ROM to screen format at column 0x10, row 0x20
    blit(8'hC2, 8'h00, 16'hE000, 16'h1020, 8'd4, 8'd6, hc);
    check(hc >= 24 && hc <= 26, "halt lasts about one MPU cycle per byte");
    if (hc >= 24) n_halt++;
    for (int y = 0; y < 6; y++)
      for (int x = 0; x < 4; x++) begin
        host_rbyte(17'h01020 + 17'(x * 256 + y), q);
        check(q == sprite[y * 4 + x], "blitted byte");
      end
    // rotate one pixel right: one extra cycle per row
    blit(8'hE0, 8'h00, 16'hE000, 16'hA000, 8'd3, 8'd2, hc);
    check(hc >= 8 && hc <= 10, "rotate halt length");
    for (int y = 0; y < 2; y++) begin
      logic [23:0] row, rot;
      row = {sprite[y*3], sprite[y*3+1], sprite[y*3+2]};
      rot = {row[3:0], row[23:4]};
      for (int x = 0; x < 3; x++) begin
        host_rbyte(17'h0A000 + 17'(y * 3 + x), q);
        check(q == rot[23 - 8*x -: 8], "rotated byte");
        if (q == rot[23 - 8*x -: 8]) n_rotate_blit++;
      end
    end
    // no blitter for Stargate
    host_reg_wr(0, 32'h10 | 32'(GAME_STARGATE));
    cpu_wr(16'hCA06, 8'd8); cpu_wr(16'hCA07, 8'd8);
    cpu_wr(16'hCA00, 8'hC0);
    @(posedge clk); #1;
    check(!cpu_halt, "no halt without blitter");
    if (!cpu_halt) n_blit_disabled++;
    host_reg_wr(0, 32'h10 | 32'(GAME_JOUST));

    // sound command to the host
    cpu_wr(16'hC80E, 8'hEA);
    host_reg_rd(1, r);
    check(r == 32'h12A, "sound command and flag");
    if (r == 32'h12A) n_sound++;
    host_reg_rd(1, r);
    check(r == 32'h02A, "flag cleared by the read");

    // controls: P1 left and P2 flap, through the debouncer
    controls = (32'd1 << 2) | (32'd1 << 18) | (32'd1 << 11) | (32'd1 << 28);
    cpu_rd(16'hC804, q); check(q == 8'h00, "not yet debounced");
    repeat (20010) @(posedge clk);
    cpu_rd(16'hC804, q); check(q == 8'h01, "player 1 left");
    if (q == 8'h01) n_debounce++;
    cpu_wr(16'hC807, 8'h38);          // CB2 high: player 2
    cpu_rd(16'hC807, q); check(q == 8'h38, "CRB read back");
    cpu_rd(16'hC804, q); check(q == 8'h04, "player 2 flap");
    if (q == 8'h04) n_player_sel++;
    cpu_wr(16'hC807, 8'h30);
    cpu_rd(16'hC80C, q); check(q == 8'h10, "left coin on coin door");
    if (q == 8'h10) n_coin++;
    check(restart_btn, "restart button");
    host_reg_rd(2, r); check(r[0], "restart in status");
    if (restart_btn && r[0]) n_restart++;
    controls = 0;

    // two full frames of video timing; read 0xCB00 in COUNT 240
    while (n_frame < 2) begin
      @(negedge clk);
      if (dut.count240 && n_vcount == 0) begin
        cpu_rd(16'hCB00, q);
        check(q >= 8'hF0 && q[1:0] == 2'b00, "0xCB00 in the bottom lines");
        n_vcount++;
      end
    end

    // mechanism counts
    check(n_release > 0, "mechanism: CPU release");
    check(n_bank > 0, "mechanism: bank switch");
    check(n_write_under_rom > 0, "mechanism: write under ROM");
    check(n_palette == 16, "mechanism: palette");
    check(n_halt > 0, "mechanism: blitter halt");
    check(n_rotate_blit == 6, "mechanism: rotate");
    check(n_blit_disabled > 0, "mechanism: blitter disabled");
    check(n_sound > 0, "mechanism: sound command");
    check(n_debounce > 0, "mechanism: debounce");
    check(n_player_sel > 0, "mechanism: CB2 player select");
    check(n_coin > 0, "mechanism: coin door");
    check(n_restart > 0, "mechanism: restart button");
    check(n_irq_4ms >= 4, "mechanism: 4 ms interrupt");
    check(n_irq_240 >= 2, "mechanism: COUNT 240 interrupt");
    check(n_frame >= 2, "mechanism: frame wrap");
    check(n_vcount > 0, "mechanism: video count read");
    $display("mechanisms: release=%0d bank=%0d under_rom=%0d palette=%0d halt=%0d rotate=%0d no_blit=%0d sound=%0d debounce=%0d player=%0d coin=%0d restart=%0d irq4ms=%0d irq240=%0d frames=%0d vcount=%0d",
             n_release, n_bank, n_write_under_rom, n_palette, n_halt, n_rotate_blit, n_blit_disabled,
             n_sound, n_debounce, n_player_sel, n_coin, n_restart, n_irq_4ms, n_irq_240, n_frame, n_vcount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
