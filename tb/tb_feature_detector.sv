// tb_feature_detector: checks the detector chain on small images (40 x 24).
//
// Three frames of random images with bright and dark spots are streamed
// with random blanking inside and between lines. On the clock of active
// pixel s the outputs must describe pixel s - (4*W + 12) (counted over all
// frames): for every such pixel at least 4 pixels from the image edge,
// feat_valid must equal the model's FAST12 + 3x3 non-maxima decision and
// feat_score its response. The model is a direct computation on the image.
`timescale 1ns/1ps
module tb_feature_detector;
  import nav_pkg::*;
  localparam int W = 40, H = 24, NF = 3;
  localparam int FAST_T = 15, NMS_T = 5;
  localparam int LAT = FD_LAT_Y * W + FD_LAT_X;

  logic        clk = 0, rst_n = 0;
  logic [7:0]  in_data = '0;
  pix_sync_t   in_sync = '{blank: 1'b1, h_sync: 1'b0, x_cnt: '0, y_cnt: '0};
  logic        fv;
  logic [11:0] fs;

  feature_detector #(.DW(8), .RESP_W(12), .IMG_W(W)) dut (
    .clk, .rst_n, .in_data, .in_sync, .fast_threshold(8'(FAST_T)),
    .nms_threshold(12'(NMS_T)), .feat_valid(fv), .feat_score(fs));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, found = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int img [NF][H][W];
  int scr [NF][H][W];
  bit isf [NF][H][W];
  localparam int CDX [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
  localparam int CDY [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};

  function automatic int score(input int f, input int x, input int y);
    int c = img[f][y][x];
    int sb = 0, sd = 0, nb, nd;
    bit corner = 0;
    for (int j = 0; j < 16; j++) begin
      nb = 0; nd = 0;
      for (int k = 0; k < 12; k++) begin
        int p = img[f][y + CDY[(j+k)%16]][x + CDX[(j+k)%16]];
        nb += int'(p > c + FAST_T);
        nd += int'(p < c - FAST_T);
      end
      corner |= (nb == 12) || (nd == 12);
    end
    for (int i = 0; i < 16; i++) begin
      int p = img[f][y + CDY[i]][x + CDX[i]];
      if (p > c + FAST_T) sb += p - c - FAST_T;
      if (p < c - FAST_T) sd += c - FAST_T - p;
    end
    return corner ? ((sb > sd) ? sb : sd) : 0;
  endfunction

  initial begin
    int s;
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y][x] = 100 + int'($urandom % 8);
      for (int k = 0; k < 40; k++) begin
        int x0, y0, v;
        x0 = int'($urandom % (W - 2)); y0 = int'($urandom % (H - 2));
        v = ($urandom % 2) ? 230 : 10;
        img[f][y0][x0] = v;
        if ($urandom % 2) img[f][y0+1][x0] = v;
        if ($urandom % 2) img[f][y0][x0+1] = v;
      end
      for (int y = 3; y < H - 3; y++)
        for (int x = 3; x < W - 3; x++) scr[f][y][x] = score(f, x, y);
      for (int y = 4; y < H - 4; y++)
        for (int x = 4; x < W - 4; x++) begin
          int c;
          bit m;
          c = scr[f][y][x];
          m = c > NMS_T;
          m &= c > scr[f][y-1][x-1] && c > scr[f][y-1][x] && c > scr[f][y-1][x+1];
          m &= c > scr[f][y][x-1] && c >= scr[f][y][x+1];
          m &= c >= scr[f][y+1][x-1] && c >= scr[f][y+1][x] && c >= scr[f][y+1][x+1];
          isf[f][y][x] = m;
        end
    end

    @(negedge clk); rst_n = 1;
    s = 0;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++) begin
        repeat ($urandom % 6) @(negedge clk);
        for (int x = 0; x < W; x++) begin
          int p, pf, px, py;
          if ($urandom % 8 == 0) begin
            in_sync.blank = 1; in_sync.h_sync = 0; @(negedge clk);
          end
          in_data = 8'(img[f][y][x]);
          in_sync = '{blank: 1'b0, h_sync: x == 0, x_cnt: coord_t'(x), y_cnt: coord_t'(y)};
          // outputs seen on this clock describe pixel s - LAT
          p = s - LAT;
          if (p >= 0) begin
            pf = p / (W * H); py = (p / W) % H; px = p % W;
            if (px >= 4 && px < W - 4 && py >= 4 && py < H - 4) begin
              check(fv == isf[pf][py][px],
                    $sformatf("frame %0d (%0d,%0d): valid %0d want %0d", pf, px, py, fv, isf[pf][py][px]));
              if (isf[pf][py][px]) begin
                found++;
                check(int'(fs) == scr[pf][py][px], "score");
              end
            end
          end
          s++;
          @(negedge clk);
          in_sync.blank = 1; in_sync.h_sync = 0;
        end
      end
    $display("features checked: %0d", found);
    check(found > 10, "features exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
