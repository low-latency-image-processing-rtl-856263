// tb_memory_buffer: checks the frame-buffer writer on 16 x 6 frames.
//
// Frames of random pixels are streamed with random blanking into a memory
// model that asserts waitrequest at random. Afterwards every 32-bit word of
// the frame must be at frame_base + y*16 + x with the four pixels packed
// little-endian, and no other address may have been written. A second
// phase holds waitrequest for a long time in mid-frame: the 4-word FIFO must
// overflow and set the flag, every word that did arrive must still be
// correct, and overflow_clr must clear the flag.
`timescale 1ns/1ps
module tb_memory_buffer;
  import nav_pkg::*;
  localparam int W = 16, H = 6;

  logic        clk = 0, rst_n = 0;
  logic [7:0]  in_data = '0;
  pix_sync_t   in_sync = '{blank: 1'b1, h_sync: 1'b0, x_cnt: '0, y_cnt: '0};
  logic [31:0] base = '0;
  logic [31:0] m_address, m_writedata;
  logic        m_write, m_waitrequest = 0;
  logic        ovf, ovf_clr = 0;

  memory_buffer #(.PIX_W(8), .IMG_W(W), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .in_data, .in_sync, .frame_base(base),
    .m_address, .m_write, .m_writedata, .m_waitrequest,
    .overflow(ovf), .overflow_clr(ovf_clr));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, accepted = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [31:0] mem [int unsigned];
  bit hold = 0;
  always @(negedge clk) m_waitrequest <= hold || ($urandom % 3 == 0);
  always @(posedge clk) begin
    if (m_write && !m_waitrequest) begin mem[m_address] = m_writedata; accepted++; end
    if (m_write && m_waitrequest) stalls++;
  end

  logic [7:0] img [H][W];

  task automatic send_frame(input int stall_row);
    for (int y = 0; y < H; y++) begin
      repeat (2 + $urandom % 4) @(negedge clk);
      for (int x = 0; x < W; x++) begin
        if (y == stall_row && x == 0) hold = 1;
        if ($urandom % 6 == 0) begin in_sync.blank = 1; @(negedge clk); end
        in_data = img[y][x];
        in_sync = '{blank: 1'b0, h_sync: x == 0, x_cnt: coord_t'(x), y_cnt: coord_t'(y)};
        @(negedge clk);
        in_sync.blank = 1;
      end
      if (y == stall_row + 1) hold = 0;
    end
    repeat (40) @(negedge clk);
  endtask

  task automatic check_frame(input int unsigned b, input bit all, input string name);
    int bad = 0, missing = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 4) begin
        int unsigned ad;
        ad = b + y * W + x;
        if (!mem.exists(ad)) missing++;
        else if (mem[ad] != {img[y][x+3], img[y][x+2], img[y][x+1], img[y][x]}) bad++;
      end
    check(bad == 0, $sformatf("%s: %0d wrong words", name, bad));
    if (all) check(missing == 0, $sformatf("%s: %0d missing words", name, missing));
    else     check(missing > 0, $sformatf("%s: words lost in the stall", name));
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      foreach (img[y, x]) img[y][x] = 8'($urandom);
      mem.delete();
      base = 32'h1000 * (f + 1);
      send_frame(-1);
      check_frame(base, 1, $sformatf("frame %0d", f));
      check(mem.size() == W * H / 4, $sformatf("frame %0d: %0d words written", f, mem.size()));
      check(ovf == 0, "no overflow");
    end
    foreach (img[y, x]) img[y][x] = 8'($urandom);
    mem.delete();
    base = 32'h8000;
    send_frame(2);
    check_frame(base, 0, "stalled frame");
    check(ovf == 1, "overflow flagged");
    ovf_clr = 1; @(negedge clk); ovf_clr = 0;
    check(ovf == 0, "overflow cleared");
    $display("stall clocks %0d, words accepted %0d", stalls, accepted);
    check(stalls > 0, "wait states exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
