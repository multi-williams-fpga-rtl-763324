// blitter: the Special Chip, a block-copy DMA engine for the framebuffer.
//
// Registers (written by the CPU through the memory map, reg = addr[2:0]):
//   0  control byte (williams_pkg::blit_ctrl_t); writing it starts the blit
//   1  mask: the colour pair used in solid mode
//   2  source address, high byte      3  source address, low byte
//   4  destination address, high byte 5  destination address, low byte
//   6  width in bytes (0 = 256)       7  height in rows (0 = 256)
// While a blit runs, busy is high; it drives the MPU's HALT, and the blitter
// then owns the memory map's bus (m_acc / m_addr / m_we / m_wdata, read
// data in m_rdata on the clock after m_acc).
//
// Each byte takes one MPU cycle, i.e. the four memory clocks of phase 0..3:
//   phase 0  read the source byte
//   phase 1  latch it; read the destination byte
//   phase 2  write the merged byte to the destination (skipped when no
//            pixel of the byte is to be written)
//   phase 3  step the addresses
// giving one byte per microsecond at a 1 MHz MPU (about 1 MB/s). A blit of
// W x H bytes keeps busy high for W*H MPU cycles (W*H + H with rotate) plus
// the wait for the next phase 0.
//
// A byte holds two 4-bit pixels, the left (even) pixel in the high nibble.
// Linear format advances 1 byte per byte along a row and starts the next row
// W bytes on; screen format advances 256 bytes (one column) along a row and
// starts the next row one byte on. With xwrap, a screen-format column wraps
// from 151 (the 304-pixel screen's last byte column) back to 0. Rotate
// shifts each row one pixel right and puts the row's last pixel in front:
// one extra MPU cycle per row reads the row's last source byte first.
// Transparency writes only non-zero source pixels, solid mode writes the
// mask's nibble instead of the source pixel, and the even/odd enables
// decide which of the two pixels of a byte may be written at all.
// Register set, control bits, HALT and the 8-bit combined datapath follow
// the design. Nibble order, the bit polarity of the even/odd enables, the
// wrap width, the meaning of 0 for width/height and the cycle schedule are
// this design's choices.
module blitter
  import williams_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  phase,       // memory clock within the MPU cycle
  // register writes
  input  logic        reg_we,
  input  logic [2:0]  reg_sel,
  input  logic [7:0]  reg_wdata,
  // bus master
  output logic        busy,
  output logic        m_acc,
  output logic [15:0] m_addr,
  output logic        m_we,
  output logic [7:0]  m_wdata,
  input  logic [7:0]  m_rdata,
  // status
  output logic        done          // one-clock strobe at the end of a blit
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_PRE, S_XFER} state_t;

  state_t     state;
  blit_ctrl_t ctrl;
  logic [7:0] mask, width, height;
  logic [15:0] src, dst;
  logic [15:0] src_row, dst_row, sa, da;
  logic [8:0] x_left, y_left;
  logic [7:0] src_q;
  logic [3:0] carry;

  logic [8:0] w_full, h_full;
  assign w_full = (width  == 8'd0) ? 9'd256 : {1'b0, width};
  assign h_full = (height == 8'd0) ? 9'd256 : {1'b0, height};

  // one step along a row
  function automatic logic [15:0] step_x(logic [15:0] a, logic screen, logic wrap);
    logic [7:0] col;
    col = a[15:8];
    if (!screen)   return a + 16'd1;
    if (!wrap)     return a + 16'h0100;
    if (col >= 8'(SCREEN_COLUMNS - 1)) return {col - 8'(SCREEN_COLUMNS - 1), a[7:0]};
    return {col + 8'd1, a[7:0]};
  endfunction

  // address of the last byte of a row
  function automatic logic [15:0] row_last(logic [15:0] row, logic screen, logic wrap, logic [8:0] w);
    int c;
    if (!screen) return row + 16'(w - 9'd1);
    if (!wrap)   return row + {7'(w - 9'd1), 8'h00};
    c = (int'(row[15:8]) + int'(w) - 1) % SCREEN_COLUMNS;
    return {8'(c), row[7:0]};
  endfunction

  // next row start
  function automatic logic [15:0] step_y(logic [15:0] row, logic screen, logic [8:0] w);
    return screen ? row + 16'd1 : row + 16'(w);
  endfunction

  // pixel merge
  logic [7:0] s_pix, merged;
  logic       wr_hi, wr_lo;
  always_comb begin
    s_pix  = ctrl.rotate ? {carry, src_q[7:4]} : src_q;
    wr_hi  = ctrl.even_en && (!ctrl.transparent || s_pix[7:4] != 4'h0);
    wr_lo  = ctrl.odd_en  && (!ctrl.transparent || s_pix[3:0] != 4'h0);
    merged = m_rdata;
    if (wr_hi) merged[7:4] = ctrl.solid ? mask[7:4] : s_pix[7:4];
    if (wr_lo) merged[3:0] = ctrl.solid ? mask[3:0] : s_pix[3:0];
  end

  // bus requests
  always_comb begin
    m_acc   = 1'b0;
    m_we    = 1'b0;
    m_addr  = sa;
    m_wdata = merged;
    if (state == S_PRE && phase == 2'd0) begin
      m_acc  = 1'b1;
      m_addr = row_last(src_row, ctrl.src_screen, ctrl.xwrap, w_full);
    end else if (state == S_XFER) begin
      unique case (phase)
        2'd0: begin m_acc = 1'b1; m_addr = sa; end
        2'd1: begin m_acc = 1'b1; m_addr = da; end
        2'd2: begin m_acc = wr_hi | wr_lo; m_we = 1'b1; m_addr = da; end
        default: ;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state  <= S_IDLE;
      ctrl   <= '0;
      mask   <= '0;
      src    <= '0;
      dst    <= '0;
      width  <= '0;
      height <= '0;
      src_row <= '0; dst_row <= '0; sa <= '0; da <= '0;
      x_left <= '0; y_left <= '0; src_q <= '0; carry <= '0;
    end else begin
      if (reg_we && state == S_IDLE) begin
        unique case (reg_sel)
          3'd0: begin ctrl <= blit_ctrl_t'(reg_wdata); state <= S_START; end
          3'd1: mask        <= reg_wdata;
          3'd2: src[15:8]   <= reg_wdata;
          3'd3: src[7:0]    <= reg_wdata;
          3'd4: dst[15:8]   <= reg_wdata;
          3'd5: dst[7:0]    <= reg_wdata;
          3'd6: width       <= reg_wdata;
          3'd7: height      <= reg_wdata;
        endcase
      end
      unique case (state)
        S_START: if (phase == 2'd3) begin
          src_row <= src;  dst_row <= dst;
          sa      <= src;  da      <= dst;
          x_left  <= w_full;
          y_left  <= h_full;
          carry   <= 4'h0;
          state   <= ctrl.rotate ? S_PRE : S_XFER;
        end
        S_PRE: begin
          if (phase == 2'd1) carry <= m_rdata[3:0];
          if (phase == 2'd3) state <= S_XFER;
        end
        S_XFER: begin
          if (phase == 2'd1) src_q <= m_rdata;
          if (phase == 2'd3) begin
            carry <= src_q[3:0];
            if (x_left == 9'd1) begin
              if (y_left == 9'd1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                src_row <= step_y(src_row, ctrl.src_screen, w_full);
                dst_row <= step_y(dst_row, ctrl.dst_screen, w_full);
                sa      <= step_y(src_row, ctrl.src_screen, w_full);
                da      <= step_y(dst_row, ctrl.dst_screen, w_full);
                x_left  <= w_full;
                y_left  <= y_left - 1'b1;
                if (ctrl.rotate) state <= S_PRE;
              end
            end else begin
              sa     <= step_x(sa, ctrl.src_screen, ctrl.xwrap);
              da     <= step_x(da, ctrl.dst_screen, ctrl.xwrap);
              x_left <= x_left - 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  // Bus rules: the blitter uses the bus only while it holds the MPU halted,
  // and never in phase 3, which is left for stepping the addresses.
  a_acc_while_busy: assert property (@(posedge clk) disable iff (rst)
                                     m_acc |-> busy);
  a_no_acc_phase3:  assert property (@(posedge clk) disable iff (rst)
                                     m_acc |-> phase != 2'd3);

endmodule
