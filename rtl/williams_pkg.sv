// williams_pkg: types and constants shared by the multi-game Williams arcade core.
//
// Holds the game selection enum, the layout of the blitter control byte,
// the I/O addresses of the Williams memory map, and the 17-bit byte layout
// used inside the 128 kB shared BRAM. The I/O addresses are those of the
// Williams map; the BRAM layout (RAM in the lower 64 kB, ROM in the upper
// 64 kB at the ROM's own CPU address) is this design's choice.
package williams_pkg;

  // Games supported by the core; the host selects one before releasing the CPU.
  typedef enum logic [1:0] {
    GAME_DEFENDER = 2'd0,
    GAME_STARGATE = 2'd1,
    GAME_JOUST    = 2'd2,
    GAME_ROBOTRON = 2'd3
  } game_t;

  // Blitter control byte, written at 0xCA00 (bit 0 is the LSB).
  typedef struct packed {
    logic odd_en;      // [7] write odd (right, low nibble) pixels
    logic even_en;     // [6] write even (left, high nibble) pixels
    logic rotate;      // [5] rotate each row one pixel right
    logic solid;       // [4] replace source colour with the mask colour
    logic transparent; // [3] write only non-zero source pixels
    logic xwrap;       // [2] X (column) wraps around the screen width
    logic dst_screen;  // [1] destination in screen format
    logic src_screen;  // [0] source in screen format
  } blit_ctrl_t;

  // CPU address map
  localparam logic [15:0] ADDR_ALWAYS_RAM = 16'h9000; // 0x9000-0xBFFF
  localparam logic [15:0] ADDR_IO         = 16'hC000; // 0xC000-0xCBFF
  localparam logic [15:0] ADDR_PIA_IN     = 16'hC804; // 0xC804-0xC807
  localparam logic [15:0] ADDR_PIA_SND    = 16'hC80C; // 0xC80C-0xC80F
  localparam logic [15:0] ADDR_BANK       = 16'hC900;
  localparam logic [15:0] ADDR_BLITTER    = 16'hCA00; // 0xCA00-0xCA07
  localparam logic [15:0] ADDR_VIDCOUNT   = 16'hCB00;
  localparam logic [15:0] ADDR_CMOS       = 16'hCC00; // 0xCC00-0xCFFF
  localparam logic [15:0] ADDR_ROM        = 16'hD000; // 0xD000-0xFFFF

  // BRAM byte address = {is_rom, cpu_address}
  localparam int BRAM_ADDR_W = 17;

  // Screen geometry: 304 pixels = 152 byte columns, pixel pairs 256 bytes apart
  localparam int SCREEN_COLUMNS = 152;

endpackage
