// tb_nav_fabric_top: end-to-end test of the fabric at full size (640x480).
//
// A behavioural camera sends three synthetic frames (noise, bright and dark
// blobs, rectangles) with horizontal and vertical blanking. A behavioural
// processor takes features from the detector interface on interrupt, and a
// behavioural external memory with random wait states receives the frame
// buffer. The expected features are computed here from the same images by a
// direct FAST12 + 3x3 non-maxima suppression model, written independently
// of the RTL. Scenario:
//   frame 1  default look-up table; line 5 is sent 3 pixels too long
//            (truncation and sync_error); all features read on interrupt
//   frame 2  look-up table reloaded to invert the image (mode switch);
//            features read on interrupt
//   frame 3  processor stops reading: the feature FIFO overflows; the
//            memory stalls for 400 clocks: the memory buffer overflows
// Checked: every feature read (position and score) against the model, the
// FIFO drops exactly what does not fit, frame buffers 1 and 2 word by word,
// the status flags, and the latency of each feature: it is queued a fixed
// 8 pixels + 3 clocks after the last pixel of its 9x9 neighbourhood left the
// sensor. Each mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module tb_nav_fabric_top;
  import nav_pkg::*;

  localparam int W = 640;
  localparam int H = 480;
  localparam int HBLANK = 40;
  localparam int FAST_T = 20;
  localparam int NMS_T  = 10;
  localparam int FEAT_DEPTH = 256;
  localparam int LAT_CLK = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cam_fv = 1'b0, cam_lv = 1'b0;
  logic [9:0]  cam_data = '0;
  logic        lut_we = 1'b0;
  logic [9:0]  lut_addr = '0;
  logic [7:0]  lut_wdata = '0;
  logic [31:0] frame_base = '0;
  logic        status_clr = 1'b0;
  logic        sync_error, mb_overflow;
  logic [1:0]  s_address = '0;
  logic        s_read = 1'b0, s_write = 1'b0;
  logic [31:0] s_readdata, s_writedata = '0;
  logic        irq;
  logic [31:0] m_address, m_writedata;
  logic        m_write, m_waitrequest = 1'b0;

  nav_fabric_top dut (
    .clk, .rst_n, .cam_fv, .cam_lv, .cam_data,
    .fast_threshold(8'(FAST_T)), .nms_threshold(12'(NMS_T)),
    .lut_we, .lut_addr, .lut_wdata, .frame_base, .status_clr,
    .sync_error, .mb_overflow,
    .s_address, .s_read, .s_readdata, .s_write, .s_writedata, .irq,
    .m_address, .m_write, .m_writedata, .m_waitrequest
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- images and reference model ----------------
  byte unsigned raw [H][W];   // 8-bit scene sent on cam_data[9:2]
  byte unsigned img [H][W];   // what the detector should see
  int           scr [H][W];
  int unsigned  rng;

  function automatic int unsigned rnd();
    rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
    return rng;
  endfunction

  task automatic make_scene(input int unsigned seed);
    rng = seed;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) raw[y][x] = 8'(90 + rnd() % 6);
    for (int k = 0; k < 25; k++) begin
      int x0 = int'(rnd() % (W - 60)), y0 = int'(rnd() % (H - 60));
      int w = 10 + int'(rnd() % 50), h = 10 + int'(rnd() % 50);
      for (int y = y0; y < y0 + h; y++)
        for (int x = x0; x < x0 + w; x++) raw[y][x] = 8'(170 + rnd() % 4);
    end
    for (int k = 0; k < 900; k++) begin
      int x0 = int'(rnd() % (W - 4)), y0 = int'(rnd() % (H - 4));
      int sz = 1 + int'(rnd() % 3);
      int v  = (rnd() % 2 == 0) ? 220 + int'(rnd() % 30) : int'(rnd() % 30);
      for (int y = y0; y < y0 + sz; y++)
        for (int x = x0; x < x0 + sz; x++) raw[y][x] = 8'(v);
    end
  endtask

  localparam int CDX [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
  localparam int CDY [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};

  function automatic int ref_score(input int x, input int y);
    int c = img[y][x];
    int sb = 0, sd = 0;
    bit br [32];
    bit dk [32];
    bit cb = 0, cd = 0;
    for (int i = 0; i < 16; i++) begin
      int p = img[y + CDY[i]][x + CDX[i]];
      br[i] = p > c + FAST_T;  br[i+16] = br[i];
      dk[i] = p < c - FAST_T;  dk[i+16] = dk[i];
      if (br[i]) sb += p - c - FAST_T;
      if (dk[i]) sd += c - FAST_T - p;
    end
    for (int j = 0; j < 16; j++) begin
      int nb = 0, nd = 0;
      for (int k = 0; k < 12; k++) begin
        nb += int'(br[j+k]);
        nd += int'(dk[j+k]);
      end
      if (nb == 12) cb = 1;
      if (nd == 12) cd = 1;
    end
    if (!(cb || cd)) return 0;
    return (sb > sd) ? sb : sd;
  endfunction

  typedef struct { int x; int y; int s; } feat_t;
  feat_t expected [$];
  int    exp_per_frame [3];

  task automatic reference(input int fr);
    int n = 0;
    for (int y = 3; y < H - 3; y++)
      for (int x = 3; x < W - 3; x++) scr[y][x] = ref_score(x, y);
    for (int y = 4; y < H - 4; y++)
      for (int x = 4; x < W - 4; x++) begin
        int c = scr[y][x];
        bit m = c > NMS_T;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            if (dy == 0 && dx == 0) continue;
            if (dy < 0 || (dy == 0 && dx < 0)) m &= c >  scr[y+dy][x+dx];
            else                               m &= c >= scr[y+dy][x+dx];
          end
        if (m) begin
          expected.push_back('{x, y, c});
          n++;
        end
      end
    exp_per_frame[fr] = n;
  endtask

  // ---------------- external memory ----------------
  logic [31:0] ext_mem [int unsigned];
  bit          force_stall = 0;
  int          stall_cycles = 0;
  always @(negedge clk) m_waitrequest <= force_stall || ($urandom % 4 == 0);
  always @(posedge clk) begin
    if (m_write && !m_waitrequest) ext_mem[m_address] = m_writedata;
    if (m_write && m_waitrequest) stall_cycles++;
  end

  // ---------------- processor model ----------------
  feat_t got [$];
  bit    cpu_on = 0;
  int    irq_reads = 0;

  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    s_address = a; s_read = 1'b1;
    @(negedge clk);
    s_read = 1'b0;
    d = s_readdata;
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    s_address = a; s_write = 1'b1; s_writedata = d;
    @(negedge clk);
    s_write = 1'b0;
  endtask

  initial begin : cpu
    logic [31:0] xy, sc;
    forever begin
      @(negedge clk);
      if (cpu_on && irq) begin
        bus_read(2'd1, xy);
        bus_read(2'd2, sc);
        got.push_back('{int'(xy[15:0]), int'(xy[31:16]), int'(sc)});
        irq_reads++;
      end
    end
  end

  // ---------------- latency monitor ----------------
  // Linear index (frame-relative) of the pixel the camera drove on each clock.
  // Each feature is checked after the run, in the order it was queued.
  int  drv_idx = -1;
  int  drv_log [$];
  int  push_cyc [$];
  always @(negedge clk) begin
    #1;
    if (dut.u_det_if.do_push) push_cyc.push_back(drv_log.size());
    drv_log.push_back(drv_idx);
  end

  function automatic int latency_errors(input bit probe);
    int bad = 0;
    for (int i = 0; i < got.size() && i < push_cyc.size(); i++) begin
      int want = ((got[i].y + 4) * W + got[i].x + 4 + 8) % (W * H);
      if (probe && i == 0)
        for (int k = 0; k < 20; k++)
          if (push_cyc[i] >= k && drv_log[push_cyc[i] - k] == want)
            $display("latency probe: %0d clocks", k);
      if (push_cyc[i] < LAT_CLK || drv_log[push_cyc[i] - LAT_CLK] != want) bad++;
    end
    return bad;
  endfunction

  // ---------------- camera ----------------
  task automatic send_frame(input int fr);
    @(negedge clk);
    cam_fv = 1'b1;
    repeat (10) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      int len = (fr == 0 && y == 5) ? W + 3 : W;
      if (fr == 2 && y == 100)
        fork
          begin
            force_stall = 1;
            repeat (400) @(negedge clk);
            force_stall = 0;
          end
        join_none
      for (int x = 0; x < len; x++) begin
        cam_lv   = 1'b1;
        cam_data = {(x < W) ? raw[y][x] : 8'hFF, 2'(x)};
        drv_idx  = (x < W) ? y * W + x : -1;
        @(negedge clk);
      end
      cam_lv = 1'b0; drv_idx = -1;
      if (fr == 2 && y == 2) cpu_on = 0;
      repeat (HBLANK) @(negedge clk);
    end
    cam_fv = 1'b0;
    repeat (50) @(negedge clk);
  endtask

  task automatic load_invert_lut();
    for (int i = 0; i < 1024; i++) begin
      lut_we = 1'b1; lut_addr = 10'(i); lut_wdata = 8'(255 - (i >> 2));
      @(negedge clk);
    end
    lut_we = 1'b0;
  endtask

  task automatic check_frame_buffer(input int base, input string name);
    int bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 4) begin
        int unsigned a = base + y * W + x;
        logic [31:0] want = {img[y][x+3], img[y][x+2], img[y][x+1], img[y][x]};
        if (!ext_mem.exists(a) || ext_mem[a] != want) bad++;
      end
    check(bad == 0, $sformatf("%s: %0d wrong words", name, bad));
  endtask

  int n_truncations = 0, n_mode_switch = 0, n_feat_ovf = 0, n_mb_ovf = 0, n_irq = 0;
  always @(posedge clk) if (irq && !$past(irq)) n_irq++;

  initial begin : main
    logic [31:0] st;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    bus_write(2'd3, 32'h1);   // interrupt enable
    cpu_on = 1;

    // frame 1: default table (value >> 2)
    make_scene(32'h1234_5678);
    foreach (raw[y, x]) img[y][x] = raw[y][x];
    reference(0);
    frame_base = 32'h0000_0000;
    send_frame(0);
    check(sync_error == 1'b1, "sync_error after a long line");
    if (sync_error) n_truncations++;
    @(negedge clk) status_clr = 1'b1;
    @(negedge clk) status_clr = 1'b0;
    check(sync_error == 1'b0, "sync_error cleared");
    check_frame_buffer(32'h0, "frame buffer 1");

    // frame 2: inverting table
    load_invert_lut();
    n_mode_switch++;
    make_scene(32'h9abc_def1);
    foreach (raw[y, x]) img[y][x] = 8'(255 - raw[y][x]);
    reference(1);
    frame_base = 32'h0010_0000;
    send_frame(1);
    check_frame_buffer(32'h0010_0000, "frame buffer 2");
    check(sync_error == 1'b0, "no sync_error in a regular frame");
    check(mb_overflow == 1'b0, "no memory-buffer overflow with light stalls");

    // frame 3: no reads, long memory stall
    make_scene(32'h0f0f_3c3c);
    foreach (raw[y, x]) img[y][x] = 8'(255 - raw[y][x]);
    reference(2);
    frame_base = 32'h0020_0000;
    send_frame(2);
    check(mb_overflow == 1'b1, "memory-buffer overflow after a long stall");
    if (mb_overflow) n_mb_ovf++;
    bus_read(2'd0, st);
    check(st[17] == 1'b1, "feature FIFO overflow flag");
    check(32'(st[15:0]) == FEAT_DEPTH, $sformatf("FIFO full: %0d", st[15:0]));
    if (st[17]) n_feat_ovf++;
    cpu_on = 1;
    repeat (FEAT_DEPTH * 6 + 100) @(negedge clk);
    bus_read(2'd0, st);
    check(st[16] == 1'b1, "FIFO empty after draining");

    // compare everything read with the model
    $display("expected features per frame: %0d %0d %0d; read %0d",
             exp_per_frame[0], exp_per_frame[1], exp_per_frame[2], got.size());
    check(got.size() == exp_per_frame[0] + exp_per_frame[1] + FEAT_DEPTH,
          $sformatf("feature count %0d", got.size()));
    for (int i = 0; i < got.size() && i < expected.size(); i++)
      check(got[i] == expected[i],
            $sformatf("feature %0d: got (%0d,%0d,%0d) want (%0d,%0d,%0d)", i,
                      got[i].x, got[i].y, got[i].s,
                      expected[i].x, expected[i].y, expected[i].s));

    check(latency_errors(1) == 0, "feature latency");
    check(push_cyc.size() == got.size(), "one queue entry per feature read");
    $display("mechanisms: features=%0d irq_rises=%0d latency_checked=%0d mem_stalls=%0d truncation=%0d lut_switch=%0d feat_overflow=%0d mb_overflow=%0d",
             got.size(), n_irq, push_cyc.size(), stall_cycles, n_truncations,
             n_mode_switch, n_feat_ovf, n_mb_ovf);
    check(got.size() > 0 && n_irq > 0 && push_cyc.size() > 0 && stall_cycles > 0 &&
          n_truncations > 0 && n_mode_switch > 0 && n_feat_ovf > 0 && n_mb_ovf > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
