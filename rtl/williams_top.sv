// williams_top: the multi-game Williams arcade core (Defender/Stargate
// family, Joust, Robotron) around an external M6809E.
//
// The core is the custom peripheral that sits between the M6809E CPU and
// the host processor. It holds the memory map, the video counter and its
// interrupts, the blitter ("Special Chip"), the input and sound PIAs and
// the control-panel debouncing and per-game multiplexing. Program ROMs,
// RAM, framebuffer, palette and CMOS live in a 128 kB dual-port BRAM: port
// A is brought out (plb_*) for the host, which loads the game's ROMs,
// reads framebuffer and palette to draw the screen, and plays sounds from
// the commands the game writes to the sound PIA (host_* registers).
//
// Clocking: one clock, clk, is the memory clock and runs at four times the
// MPU cycle rate (4 MHz for a 1 MHz MPU). A two-bit phase counter divides
// it; cpu_ce marks the last clock of each MPU cycle. The CPU presents
// cpu_addr / cpu_rw / cpu_dout for a whole MPU cycle; the access is made at
// phase 0, read data is in cpu_din from phase 2 on and stays until the next
// access, so the CPU can take it at cpu_ce. While the blitter runs,
// cpu_halt is high, the CPU must not access the bus, and the blitter uses
// phases 0-2 of every MPU cycle itself. cpu_reset holds the CPU in reset
// until the host sets RUN. cpu_irq is the video interrupt request.
// CONTROLS[28] is the restart button (restart_btn, for the host);
// CONTROLS[31:29] are not connected on the panel and are ignored.
// The block split follows the design; the single clock with a phase
// counter in place of separate clock managers is this design's choice.
module williams_top
  import williams_pkg::*;
#(
  parameter int DEBOUNCE_CYCLES = 20000,
  parameter int IRQ_HOLD        = 100
) (
  input  logic        clk,
  input  logic        rst,
  // M6809E bus
  input  logic [15:0] cpu_addr,
  input  logic        cpu_rw,
  input  logic [7:0]  cpu_dout,
  output logic [7:0]  cpu_din,
  output logic        cpu_ce,
  output logic        cpu_reset,
  output logic        cpu_halt,
  output logic        cpu_irq,
  // host side of the shared BRAM (64-bit lines)
  input  logic        plb_en,
  input  logic [7:0]  plb_we,
  input  logic [13:0] plb_addr,
  input  logic [63:0] plb_wdata,
  output logic [63:0] plb_rdata,
  // host registers
  input  logic        host_cs,
  input  logic        host_we,
  input  logic [1:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  // control panel
  input  logic [31:0] controls,
  output logic        restart_btn
);

  // ---------------- clock phase ----------------
  logic [1:0] phase;
  always_ff @(posedge clk)
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  assign cpu_ce = (phase == 2'd3);

  // ---------------- host registers ----------------
  game_t      game;
  logic       run, blit_en, snd_ack, snd_valid, blit_busy, rom_bank;
  logic [5:0] snd_cmd;

  host_regs u_host (
    .clk, .rst,
    .cs(host_cs), .we(host_we), .addr(host_addr), .wdata(host_wdata), .rdata(host_rdata),
    .game, .run, .blit_en,
    .snd_cmd, .snd_valid, .snd_ack,
    .restart_btn, .blit_busy, .rom_bank
  );
  assign cpu_reset = rst | ~run;

  // ---------------- video counter and interrupts ----------------
  logic [13:0] va;
  logic        va11, count240, frame_start;
  logic [7:0]  vcount;
  logic        irq_4ms, irq_240, ev_4ms, ev_240;

  crt_timing u_crt (
    .clk, .rst, .ce(cpu_ce), .va, .va11, .count240, .vcount, .frame_start
  );
  irq_gen #(.IRQ_HOLD(IRQ_HOLD)) u_irq (
    .clk, .rst, .ce(cpu_ce), .va11, .count240,
    .irq(cpu_irq), .irq_4ms, .irq_240, .ev_4ms, .ev_240
  );

  // ---------------- bus masters ----------------
  logic        b_acc, b_we, blit_done;
  logic [15:0] b_addr;
  logic [7:0]  b_wdata;
  logic        m_acc, m_we;
  logic [15:0] m_addr;
  logic [7:0]  m_wdata, m_rdata;
  logic        cpu_acc, cpu_acc_q;

  assign cpu_acc  = (phase == 2'd0) && !blit_busy && !cpu_reset;
  assign cpu_halt = blit_busy;

  always_comb begin
    if (blit_busy) begin
      m_acc = b_acc; m_addr = b_addr; m_we = b_we; m_wdata = b_wdata;
    end else begin
      m_acc = cpu_acc; m_addr = cpu_addr; m_we = !cpu_rw; m_wdata = cpu_dout;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cpu_acc_q <= 1'b0;
      cpu_din   <= 8'h00;
    end else begin
      cpu_acc_q <= cpu_acc && cpu_rw;
      if (cpu_acc_q) cpu_din <= m_rdata;
    end
  end

  // ---------------- memory map and BRAM ----------------
  logic        mem_en, mem_we;
  logic [16:0] mem_addr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [2:0]  io_reg;
  logic [7:0]  io_wdata, pia_in_rdata, pia_snd_rdata;
  logic        pia_in_cs, pia_snd_cs, blit_we, io_we;

  memory_map u_map (
    .clk, .rst, .blit_en,
    .acc(m_acc), .addr(m_addr), .we(m_we), .wdata(m_wdata), .rdata(m_rdata),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .io_reg, .io_wdata, .pia_in_cs, .pia_snd_cs, .blit_we, .io_we,
    .pia_in_rdata, .pia_snd_rdata, .vcount, .rom_bank
  );

  logic        bram_en;
  logic [7:0]  bram_we;
  logic [31:0] bram_addr;
  logic [13:0] bram_line;
  logic [63:0] bram_din, bram_dout;

  bram_port_adapter #(.BYTE_AW(17)) u_adapt (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
    .bram_en, .bram_we, .bram_addr, .bram_line, .bram_din, .bram_dout
  );

  bram_dp #(.LINES(16384)) u_bram (
    .clk,
    .a_en(plb_en), .a_we(plb_we), .a_addr(plb_addr), .a_din(plb_wdata), .a_dout(plb_rdata),
    .b_en(bram_en), .b_we(bram_we), .b_addr(bram_line), .b_din(bram_din), .b_dout(bram_dout)
  );

  // ---------------- blitter ----------------
  blitter u_blit (
    .clk, .rst, .phase,
    .reg_we(blit_we), .reg_sel(io_reg), .reg_wdata(io_wdata),
    .busy(blit_busy), .m_acc(b_acc), .m_addr(b_addr), .m_we(b_we), .m_wdata(b_wdata),
    .m_rdata, .done(blit_done)
  );

  // ---------------- controls and PIAs ----------------
  logic [28:0] ctl_clean;
  logic [7:0]  pa, pb, coin_door;
  logic        cb2;

  debounce #(.W(29), .CYCLES(DEBOUNCE_CYCLES)) u_deb (
    .clk, .rst, .raw(controls[28:0]), .clean(ctl_clean)
  );
  assign restart_btn = ctl_clean[28];

  control_mux u_cmux (
    .game, .player_sel(cb2), .ctl(ctl_clean[27:0]), .pa, .pb, .coin_door
  );

  pia_input u_pia_in (
    .clk, .rst, .cs(pia_in_cs), .we(io_we), .rs(io_reg[1:0]), .wdata(io_wdata),
    .rdata(pia_in_rdata), .pa_in(pa), .pb_in(pb), .cb2
  );

  pia_sound u_pia_snd (
    .clk, .rst, .cs(pia_snd_cs), .we(io_we), .rs(io_reg[1:0]), .wdata(io_wdata),
    .rdata(pia_snd_rdata), .pa_in(coin_door),
    .snd_cmd, .snd_valid, .snd_strobe(), .snd_ack
  );

endmodule
