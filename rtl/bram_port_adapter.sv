// bram_port_adapter: byte access onto the 64-bit EDK BRAM port.
//
// Once a bus is attached to either side of the EDK BRAM block, its port is
// forced to 64-bit data and a 32-bit, 8-byte-aligned byte address. This
// adapter lets the 8-bit core use it:
//   * address: the byte address is passed on with its low three bits
//     cleared; the BRAM itself uses bits [16:3] (BRAM_ADDR_B[15:28] in the
//     big-endian bit numbering of the bus), which are also given as line.
//   * write: the byte is replicated into all eight lanes and only the lane
//     chosen by the low three address bits is write-enabled.
//   * read: the whole line comes back one cycle later and the byte chosen by
//     the low three bits of the address of that read is muxed out; that
//     offset is registered alongside the BRAM's own read register.
// Byte order is big-endian, as seen by the PowerPC host: byte offset k sits
// in lane 7-k (bits [63-8k -: 8]). The address format and the replicate /
// mask scheme follow the design; the byte order is this design's choice.
module bram_port_adapter #(
  parameter int BYTE_AW = 17                 // 128 kB
) (
  input  logic               clk,
  // byte side (core)
  input  logic               en,
  input  logic               we,
  input  logic [BYTE_AW-1:0] addr,
  input  logic [7:0]         wdata,
  output logic [7:0]         rdata,          // valid the cycle after en
  // BRAM side
  output logic               bram_en,
  output logic [7:0]         bram_we,
  output logic [31:0]        bram_addr,      // 8-byte aligned byte address
  output logic [BYTE_AW-4:0] bram_line,      // bram_addr[BYTE_AW-1:3]
  output logic [63:0]        bram_din,
  input  logic [63:0]        bram_dout
);

  logic [2:0] rd_off;

  assign bram_en   = en;
  assign bram_addr = {{(32-BYTE_AW){1'b0}}, addr[BYTE_AW-1:3], 3'b000};
  assign bram_line = addr[BYTE_AW-1:3];
  assign bram_din  = {8{wdata}};

  always_comb begin
    bram_we = '0;
    if (en && we) bram_we[3'd7 - addr[2:0]] = 1'b1;
  end

  always_ff @(posedge clk)
    if (en) rd_off <= addr[2:0];

  assign rdata = bram_dout[8*(3'd7 - rd_off) +: 8];

endmodule
