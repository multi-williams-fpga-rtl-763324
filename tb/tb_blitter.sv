// tb_blitter: self-checking testbench for the blitter.
// The testbench supplies the MPU-cycle phase and a 64 kB byte memory with
// one cycle of read latency. For each case it loads the eight registers,
// starts the blit, measures how many MPU cycles busy stays high, and then
// compares the whole memory with a reference model written here from the
// pixel rules: pixel rows are gathered from the source, rotated if asked,
// and each destination pixel is written or kept by the even/odd enables,
// transparency and solid colour. Cases cover linear and screen formats in
// both directions, X wrap, transparency, solid mode, rotate, single-pixel
// enables, and a control byte that writes nothing; then every one of the
// 256 control bytes runs once at a random size and position.
module tb_blitter;
  import williams_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase = 0;
  logic reg_we = 0;
  logic [2:0] reg_sel = 0;
  logic [7:0] reg_wdata = 0;
  logic busy, m_acc, m_we, done;
  logic [15:0] m_addr;
  logic [7:0] m_wdata, m_rdata;
  logic [7:0] mem [65536];
  logic [7:0] ref_mem [65536];
  int checks = 0, failures = 0;
  int mpu_cycles;

  blitter dut (.clk, .rst, .phase, .reg_we, .reg_sel, .reg_wdata,
               .busy, .m_acc, .m_addr, .m_we, .m_wdata, .m_rdata, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    phase <= rst ? 2'd0 : phase + 2'd1;
    if (m_acc) begin
      m_rdata <= mem[m_addr];
      if (m_we) mem[m_addr] <= m_wdata;
    end
  end
  always_ff @(posedge clk) if (busy && phase == 2'd3) mpu_cycles <= mpu_cycles + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] addr_of(logic [15:0] base, bit screen, bit wrap, int x, int y, int w);
    logic [15:0] row;
    int col;
    if (!screen) return base + 16'(y * w + x);
    row = base + 16'(y);
    if (!wrap) return row + 16'(x * 256);
    col = (int'(row[15:8]) + x) % 152;
    return {8'(col), row[7:0]};
  endfunction

  // reference model of one blit on ref_mem
  task automatic model(logic [7:0] ctl, logic [7:0] mask, logic [15:0] src, logic [15:0] dst, int w, int h);
    blit_ctrl_t c;
    logic [3:0] pix [512];
    logic [3:0] rot [512];
    logic [7:0] d;
    c = blit_ctrl_t'(ctl);
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        d = ref_mem[addr_of(src, c.src_screen, c.xwrap, x, y, w)];
        pix[2*x] = d[7:4]; pix[2*x+1] = d[3:0];
      end
      for (int p = 0; p < 2*w; p++) rot[p] = c.rotate ? pix[(p + 2*w - 1) % (2*w)] : pix[p];
      for (int x = 0; x < w; x++) begin
        logic [15:0] da = addr_of(dst, c.dst_screen, c.xwrap, x, y, w);
        d = ref_mem[da];
        for (int k = 0; k < 2; k++) begin
          logic [3:0] sp = rot[2*x + k];
          bit en = (k == 0) ? c.even_en : c.odd_en;
          if (en && (!c.transparent || sp != 0)) begin
            if (k == 0) d[7:4] = c.solid ? mask[7:4] : sp;
            else        d[3:0] = c.solid ? mask[3:0] : sp;
          end
        end
        ref_mem[da] = d;
      end
    end
  endtask

  task automatic wr(int r, logic [7:0] v);
    reg_we = 1; reg_sel = 3'(r); reg_wdata = v;
    @(posedge clk); #1;
    reg_we = 0;
  endtask

  task automatic run_case(string name, logic [7:0] ctl, logic [7:0] mask, logic [15:0] src,
                          logic [15:0] dst, int w, int h);
    int mism = 0;
    int expect_cycles;
    blit_ctrl_t c;
    c = blit_ctrl_t'(ctl);
    for (int i = 0; i < 65536; i++) ref_mem[i] = mem[i];
    model(ctl, mask, src, dst, w, h);
    wr(1, mask); wr(2, src[15:8]); wr(3, src[7:0]); wr(4, dst[15:8]); wr(5, dst[7:0]);
    wr(6, 8'(w)); wr(7, 8'(h));
    mpu_cycles = 0;
    wr(0, ctl);
    check(busy, {name, ": busy after start"});
    while (busy) begin @(posedge clk); #1; end
    for (int i = 0; i < 65536; i++) if (mem[i] !== ref_mem[i]) begin
      mism++;
      if (mism < 4) $display("  %s: mem[%h]=%h expected %h", name, i, mem[i], ref_mem[i]);
    end
    check(mism == 0, {name, ": memory contents"});
    // one byte per MPU cycle, plus one cycle per row for rotate, plus the start cycle
    expect_cycles = w * h + (c.rotate ? h : 0) + 1;
    check(mpu_cycles == expect_cycles, {name, ": cycle count"});
    if (mpu_cycles != expect_cycles) $display("  %s: %0d MPU cycles, expected %0d", name, mpu_cycles, expect_cycles);
    repeat (5) @(posedge clk); #1;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
    // sprite area with some transparent pixels
    for (int i = 16'hE000; i < 16'hE200; i++) if (i % 3 == 0) mem[i] = {mem[i][7:4], 4'h0};
    for (int i = 16'hE000; i < 16'hE200; i++) if (i % 5 == 0) mem[i] = {4'h0, mem[i][3:0]};
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (2) @(posedge clk); #1;
    check(!busy, "idle after reset");
    run_case("linear to screen copy", 8'hC2, 8'hFF, 16'hE000, 16'h1020, 6, 5);
    run_case("linear to linear copy", 8'hC0, 8'h00, 16'hE040, 16'hA000, 16, 3);
    run_case("screen to linear", 8'hC1, 8'h00, 16'h1020, 16'hA100, 4, 7);
    run_case("screen to screen", 8'hC3, 8'h00, 16'h2030, 16'h4010, 5, 4);
    run_case("transparent", 8'hCA, 8'h00, 16'hE000, 16'h3050, 8, 6);
    run_case("solid transparent", 8'hDA, 8'h7B, 16'hE080, 16'h3060, 8, 6);
    run_case("solid fill", 8'hD2, 8'h44, 16'hE000, 16'h5000, 10, 10);
    run_case("rotate right", 8'hE2, 8'h00, 16'hE100, 16'h6020, 5, 4);
    run_case("rotate transparent", 8'hEA, 8'h00, 16'hE100, 16'h6040, 5, 4);
    run_case("even pixels only", 8'h42, 8'h00, 16'hE000, 16'h7010, 6, 3);
    run_case("odd pixels only", 8'h82, 8'h00, 16'hE000, 16'h7020, 6, 3);
    run_case("no pixels", 8'h02, 8'h00, 16'hE000, 16'h7030, 6, 3);
    run_case("x wrap", 8'hC6, 8'h00, 16'hE000, 16'h9440, 12, 3);
    run_case("no wrap past column 151", 8'hC2, 8'h00, 16'hE000, 16'h9480, 12, 3);
    // every control byte once, with random sizes and positions: sources in
    // byte columns 0x70-0x85, destinations in 0x10-0x65 or near the wrap
    // column (0x92-0x9B, or wrapped to 0x00-0x05), so the two never overlap
    for (int k = 0; k < 256; k++) begin
      logic [15:0] s_a, d_a;
      s_a = {8'(8'h70 + $urandom_range(0, 15)), 8'($urandom_range(0, 240))};
      d_a = {8'(($urandom_range(0, 3) == 0) ? 8'h92 + $urandom_range(0, 3)
                                             : 8'h10 + $urandom_range(0, 79)),
             8'($urandom_range(0, 240))};
      run_case($sformatf("control %02h", k), 8'(k), 8'($urandom), s_a, d_a,
               $urandom_range(1, 6), $urandom_range(1, 4));
    end
    check(done == 0, "done is a strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
