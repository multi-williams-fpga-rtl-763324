// memory_map: address decoder and data router of the Williams core.
//
// One bus master at a time (the M6809E, or the blitter while the CPU is
// halted) presents an access: acc is a one-clock strobe with addr, we and
// wdata. The map decodes the 16-bit address, sends memory accesses to the
// shared BRAM as a 17-bit byte address {is_rom, addr} and I/O accesses to
// the devices, and returns read data in rdata on the clock after the
// strobe (the BRAM's latency; I/O read data is registered to match).
//
//   0x0000-0x8FFF  bank-switched: reads come from ROM when the bank latch
//                  is set, from RAM otherwise; writes always go to RAM, so
//                  code can read ROM and write the framebuffer beneath it
//   0x9000-0xBFFF  RAM
//   0xC000-0xC3FF  colour palette, 16 bytes mirrored (kept in BRAM so the
//                  host's video layer can read it at 0x0C000-0x0C00F)
//   0xC804-0xC807  input PIA        0xC80C-0xC80F  sound PIA
//   0xC900         bank latch, bit 0 (1 = ROM), write only
//   0xCA00-0xCA07  blitter registers, write only, ignored when blit_en = 0
//   0xCB00-0xCBFF  video counter read (vcount)
//   0xCC00-0xCFFF  CMOS configuration RAM (in BRAM, full bytes)
//   0xD000-0xFFFF  ROM (writes ignored)
//   others         read as 0x00, writes ignored
// The address ranges follow the Williams map used by Stargate, Joust and
// Robotron. The palette mirroring, the bank latch bit, unmapped reads as 0
// and the BRAM layout are this design's choices. Defender's own map is not
// implemented; the same map is used for every game.
module memory_map
  import williams_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        blit_en,
  // bus master
  input  logic        acc,
  input  logic [15:0] addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // BRAM byte port (bram_port_adapter)
  output logic        mem_en,
  output logic        mem_we,
  output logic [BRAM_ADDR_W-1:0] mem_addr,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata,
  // I/O devices: register select is addr[2:0] for the blitter, addr[1:0] for PIAs
  output logic [2:0]  io_reg,
  output logic [7:0]  io_wdata,
  output logic        pia_in_cs,      // strobe: access to the input PIA
  output logic        pia_snd_cs,     // strobe: access to the sound PIA
  output logic        blit_we,        // strobe: write to a blitter register
  output logic        io_we,          // write qualifier for the PIA strobes
  input  logic [7:0]  pia_in_rdata,
  input  logic [7:0]  pia_snd_rdata,
  input  logic [7:0]  vcount,
  output logic        rom_bank        // bank latch state
);

  typedef enum logic [2:0] {
    SEL_NONE, SEL_RAM, SEL_ROM, SEL_PIA_IN, SEL_PIA_SND, SEL_BANK, SEL_BLIT, SEL_VCNT
  } sel_t;

  sel_t sel;
  logic rd_from_mem;
  logic [7:0] io_rdata_q;

  always_comb begin
    sel = SEL_NONE;
    if (addr < ADDR_ALWAYS_RAM)                 sel = (rom_bank && !we) ? SEL_ROM : SEL_RAM;
    else if (addr < ADDR_IO)                    sel = SEL_RAM;
    else if (addr[15:10] == 6'b1100_00)         sel = SEL_RAM;          // palette
    else if (addr[15:4] == ADDR_PIA_IN[15:4] && addr[3:2] == 2'b01) sel = SEL_PIA_IN;
    else if (addr[15:4] == ADDR_PIA_SND[15:4] && addr[3:2] == 2'b11) sel = SEL_PIA_SND;
    else if (addr[15:8] == ADDR_BANK[15:8])     sel = SEL_BANK;
    else if (addr[15:3] == ADDR_BLITTER[15:3])  sel = SEL_BLIT;
    else if (addr[15:8] == ADDR_VIDCOUNT[15:8]) sel = SEL_VCNT;
    else if (addr < ADDR_ROM && addr >= ADDR_CMOS) sel = SEL_RAM;       // CMOS
    else if (addr >= ADDR_ROM)                  sel = SEL_ROM;
  end

  // memory side
  always_comb begin
    mem_en    = acc && (sel == SEL_RAM || (sel == SEL_ROM && !we));
    mem_we    = we && sel == SEL_RAM;
    mem_wdata = wdata;
    if (sel == SEL_ROM)                  mem_addr = {1'b1, addr};
    else if (addr[15:10] == 6'b1100_00)  mem_addr = {1'b0, 12'hC00, addr[3:0]};
    else                                 mem_addr = {1'b0, addr};
  end

  // I/O side
  assign io_reg     = addr[2:0];
  assign io_wdata   = wdata;
  assign io_we      = we;
  assign pia_in_cs  = acc && sel == SEL_PIA_IN;
  assign pia_snd_cs = acc && sel == SEL_PIA_SND;
  assign blit_we    = acc && we && blit_en && sel == SEL_BLIT;

  always_ff @(posedge clk) begin
    if (rst) begin
      rom_bank    <= 1'b0;
      rd_from_mem <= 1'b0;
      io_rdata_q  <= '0;
    end else if (acc) begin
      if (we && sel == SEL_BANK) rom_bank <= wdata[0];
      rd_from_mem <= (sel == SEL_RAM || sel == SEL_ROM);
      unique case (sel)
        SEL_PIA_IN:  io_rdata_q <= pia_in_rdata;
        SEL_PIA_SND: io_rdata_q <= pia_snd_rdata;
        SEL_VCNT:    io_rdata_q <= vcount;
        default:     io_rdata_q <= 8'h00;
      endcase
    end
  end

  assign rdata = rd_from_mem ? mem_rdata : io_rdata_q;

endmodule
