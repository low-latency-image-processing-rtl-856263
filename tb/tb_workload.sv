// tb_workload: the evaluated operating points, run at sensor timing with
// about 200 features per image and a processor model that takes features
// from the detector interface.
//
// Two configurations of the fabric run side by side, each with its own DUT,
// clock and synthetic scene:
//   run[0]  640x480 at 60 fps: 27 MHz pixel clock, 857 clocks per line and
//           525 lines per frame (16.66 ms), 4 frames
//   run[1]  1920x1080 at 60 fps: 148.5 MHz pixel clock, 2200 clocks per line
//           and 1125 lines per frame (16.67 ms), 2 frames
// The same scene is seen in every frame of a run. The NMS threshold is chosen
// from the reference model so that the image yields at most 200 features
// (the score of the 201st strongest local maximum). The processor model
// takes one feature on interrupt and then stays busy for a fixed time per
// feature (descriptor + matching): 71.65 us (a hard-core CPU class, 200
// features in about 14.3 ms), and in frames 3-4 of run[0] 120.65 us (a
// soft-core CPU class, 200 features in about 24.1 ms).
// Checked per run: every feature against the reference FAST12 + NMS model,
// no feature FIFO overflow (peak occupancy below 256 entries), and, at the
// faster processor rate, every feature of a frame processed before the next
// frame starts. Reported: per frame, when the last feature reached the FIFO
// and when the processor finished it, relative to the end of the frame
// readout, and the peak FIFO backlog.
`timescale 1ns/1ps
module tb_workload;
  import nav_pkg::*;

  localparam int  NRUN = 2;
  localparam int  CFG_W     [NRUN] = '{640, 1920};
  localparam int  CFG_H     [NRUN] = '{480, 1080};
  localparam int  CFG_LINE  [NRUN] = '{857, 2200};
  localparam int  CFG_LINES [NRUN] = '{525, 1125};
  localparam int  CFG_HSTART[NRUN] = '{100, 192};
  localparam int  CFG_NFR   [NRUN] = '{4, 2};
  localparam int  CFG_SLOW  [NRUN] = '{2, 2};     // first frame at the slow rate
  localparam real CFG_FPIX  [NRUN] = '{27.0e6, 148.5e6};
  localparam real T_FAST = 71.65e-6, T_SLOW = 120.65e-6;
  localparam int  FAST_T = 20;

  int checks = 0, failures = 0;

  localparam int CDX [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
  localparam int CDY [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};

  typedef struct { int x; int y; int s; } feat_t;

  for (genvar g = 0; g < NRUN; g++) begin : run
    localparam int  W = CFG_W[g], H = CFG_H[g];
    localparam int  LINE_CLK = CFG_LINE[g], FRAME_LINES = CFG_LINES[g];
    localparam int  HS = CFG_HSTART[g], NFR = CFG_NFR[g];
    localparam real F_PIX = CFG_FPIX[g];
    localparam real HALF_NS = 0.5e9 / F_PIX;

    logic        clk = 0, rst_n = 0;
    logic        cam_fv = 0, cam_lv = 0;
    logic [9:0]  cam_data = '0;
    logic [11:0] nms_t = '0;
    logic        sync_error, mb_overflow;
    logic [1:0]  s_address = '0;
    logic        s_read = 0, s_write = 0;
    logic [31:0] s_readdata, s_writedata = '0;
    logic        irq;
    logic [31:0] m_address, m_writedata;
    logic        m_write;
    bit          done = 0;
    int          rchecks = 0, rfail = 0;

    nav_fabric_top #(.IMG_W(W), .IMG_H(H)) dut (
      .clk, .rst_n, .cam_fv, .cam_lv, .cam_data,
      .fast_threshold(8'(FAST_T)), .nms_threshold(nms_t),
      .lut_we(1'b0), .lut_addr('0), .lut_wdata('0), .frame_base(32'h0), .status_clr(1'b0),
      .sync_error, .mb_overflow,
      .s_address, .s_read, .s_readdata, .s_write, .s_writedata, .irq,
      .m_address, .m_write, .m_writedata, .m_waitrequest(1'b0));

    always #(HALF_NS * 1ns) clk = ~clk;

    longint cyc = 0;
    always @(posedge clk) cyc++;

    task automatic check(input bit ok, input string what);
      rchecks++;
      if (!ok) begin rfail++; if (rfail < 20) $display("FAIL run %0d: %s", g, what); end
    endtask

    // ---------------- scene and reference model ----------------
    byte unsigned img [H][W];
    int           scr [H][W];
    int unsigned  rng;

    function automatic int unsigned rnd();
      rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
      return rng;
    endfunction

    // flat background, bright rectangles and small bright or dark spots;
    // the number of objects grows with the image area
    task automatic make_scene(input int unsigned seed);
      int scale;
      scale = (W * H + 640 * 480 - 1) / (640 * 480);
      rng = seed;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = 8'(90 + rnd() % 6);
      for (int k = 0; k < 12 * scale; k++) begin
        int x0, y0, w, h;
        x0 = int'(rnd() % (W - 80)); y0 = int'(rnd() % (H - 80));
        w = 20 + int'(rnd() % 60);   h = 20 + int'(rnd() % 60);
        for (int y = y0; y < y0 + h; y++)
          for (int x = x0; x < x0 + w; x++) img[y][x] = 8'(160 + rnd() % 4);
      end
      for (int k = 0; k < 260 * scale; k++) begin
        int x0, y0, sz, v;
        x0 = int'(rnd() % (W - 4)); y0 = int'(rnd() % (H - 4));
        sz = 1 + int'(rnd() % 3);
        v  = (rnd() % 2 == 0) ? 200 + int'(rnd() % 50) : int'(rnd() % 40);
        for (int y = y0; y < y0 + sz; y++)
          for (int x = x0; x < x0 + sz; x++) img[y][x] = 8'(v);
      end
    endtask

    function automatic int ref_score(input int x, input int y);
      int c, sb, sd, p;
      bit br [32];
      bit dk [32];
      bit corner;
      c = img[y][x]; sb = 0; sd = 0; corner = 0;
      for (int i = 0; i < 16; i++) begin
        p = img[y + CDY[i]][x + CDX[i]];
        br[i] = p > c + FAST_T;  br[i+16] = br[i];
        dk[i] = p < c - FAST_T;  dk[i+16] = dk[i];
        if (br[i]) sb += p - c - FAST_T;
        if (dk[i]) sd += c - FAST_T - p;
      end
      for (int j = 0; j < 16; j++) begin
        bit ab, ad;
        ab = 1; ad = 1;
        for (int k = 0; k < 12; k++) begin ab &= br[j+k]; ad &= dk[j+k]; end
        corner |= ab | ad;
      end
      return corner ? ((sb > sd) ? sb : sd) : 0;
    endfunction

    feat_t frame_feats [$];
    feat_t expected [$];

    // local maxima with their scores, then the threshold that keeps <= 200
    task automatic reference(output int thr);
      feat_t cand [$];
      int    sc [$];
      for (int y = 3; y < H - 3; y++)
        for (int x = 3; x < W - 3; x++) scr[y][x] = ref_score(x, y);
      for (int y = 4; y < H - 4; y++)
        for (int x = 4; x < W - 4; x++) begin
          int c;
          bit m;
          c = scr[y][x]; m = c > 0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              if (dy == 0 && dx == 0) continue;
              if (dy < 0 || (dy == 0 && dx < 0)) m &= c >  scr[y+dy][x+dx];
              else                               m &= c >= scr[y+dy][x+dx];
            end
          if (m) begin cand.push_back('{x, y, c}); sc.push_back(c); end
        end
      sc.rsort();
      thr = (sc.size() > 200) ? sc[200] : 0;   // strict: keeps scores above it
      foreach (cand[i])
        if (cand[i].s > thr) frame_feats.push_back(cand[i]);
    endtask

    // ---------------- processor model ----------------
    feat_t  got [$];
    longint busy_until = 0;
    int     per_feature = int'(T_FAST * F_PIX + 0.5);
    longint done_cyc [$];

    task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
      @(negedge clk);
      s_address = a; s_read = 1'b1;
      @(negedge clk);
      s_read = 1'b0;
      d = s_readdata;
    endtask

    task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
      wait (rst_n);
      @(negedge clk);
      s_address = a; s_write = 1'b1; s_writedata = d;
      @(negedge clk);
      s_write = 1'b0;
    endtask

    initial begin : cpu
      logic [31:0] xy, sc;
      bus_write(2'd3, 32'h1);
      forever begin
        @(negedge clk);
        if (irq && cyc >= busy_until) begin
          bus_read(2'd1, xy);
          bus_read(2'd2, sc);
          got.push_back('{int'(xy[15:0]), int'(xy[31:16]), int'(sc)});
          busy_until = cyc + per_feature;
          done_cyc.push_back(busy_until);
        end
      end
    end

    // FIFO occupancy and queue times, from the interface's status outputs
    int     peak = 0;
    longint push_cyc [$];
    always @(posedge clk) begin
      if (rst_n && int'(dut.u_det_if.count) > peak) peak = int'(dut.u_det_if.count);
      if (dut.u_det_if.do_push) push_cyc.push_back(cyc);
    end

    // ---------------- camera ----------------
    longint frame_end [NFR];
    task automatic send_lines(input int n_lines, input int active_lines);
      for (int l = 0; l < n_lines; l++) begin
        cam_fv = (l < active_lines);
        for (int c = 0; c < LINE_CLK; c++) begin
          cam_lv   = (l < active_lines) && (c >= HS) && (c < HS + W);
          cam_data = cam_lv ? {img[l][c - HS], 2'b00} : '0;
          @(negedge clk);
        end
      end
    endtask

    initial begin : main
      int thr, n;
      repeat (5) @(negedge clk);
      rst_n = 1;
      make_scene(32'h2468_ace1 + g);
      reference(thr);
      n = frame_feats.size();
      for (int f = 0; f < NFR; f++)
        foreach (frame_feats[i]) expected.push_back(frame_feats[i]);
      nms_t = 12'(thr);
      for (int f = 0; f < NFR; f++) begin
        if (f == CFG_SLOW[g]) per_feature = int'(T_SLOW * F_PIX + 0.5);
        send_lines(H, H);
        frame_end[f] = cyc;
        send_lines(FRAME_LINES - H, 0);
      end
      // a few lines of a further frame push the last features out
      send_lines(4, FRAME_LINES);
      cam_fv = 0; cam_lv = 0;
      wait (got.size() == expected.size() && cyc >= busy_until);

      $display("run %0d, %0dx%0d at %0.1f MHz: %0d features per frame, %0d read in %0d frames",
               g, W, H, F_PIX / 1e6, n, got.size(), NFR);
      for (int i = 0; i < got.size() && i < expected.size(); i++)
        check(got[i] == expected[i], $sformatf("feature %0d: got (%0d,%0d,%0d) want (%0d,%0d,%0d)",
              i, got[i].x, got[i].y, got[i].s, expected[i].x, expected[i].y, expected[i].s));
      for (int f = 0; f < NFR; f++) begin
        int last;
        last = (f + 1) * n - 1;
        if (last < push_cyc.size() && last < done_cyc.size())
          $display("run %0d frame %0d: last feature queued %0.3f ms and processed %0.3f ms after the end of readout",
                   g, f + 1, real'(push_cyc[last] - frame_end[f]) / F_PIX * 1e3,
                   real'(done_cyc[last] - frame_end[f]) / F_PIX * 1e3);
        if (f < CFG_SLOW[g] && last < done_cyc.size())
          check(done_cyc[last] < frame_end[f] + longint'((FRAME_LINES - H) * LINE_CLK),
                $sformatf("frame %0d processed before the next frame starts", f + 1));
      end
      $display("run %0d: peak feature FIFO occupancy %0d of 256", g, peak);
      check(got.size() == expected.size(), "all features delivered");
      check(peak < 256, "no feature FIFO overflow at the evaluated rate");
      check(dut.u_det_if.overflow == 1'b0, "overflow flag clear");
      check(n > 150 && n <= 200, $sformatf("%0d features per frame", n));
      check(!sync_error && !mb_overflow, "no sync error or memory-buffer overflow");
      done = 1;
    end
  end

  initial begin : finish
    wait (run[0].done && run[1].done);
    checks   = run[0].rchecks + run[1].rchecks;
    failures = run[0].rfail   + run[1].rfail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200ms;
    failures = run[0].rfail + run[1].rfail + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", run[0].rchecks + run[1].rchecks, failures);
    $finish;
  end
endmodule
