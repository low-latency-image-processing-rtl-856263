// fast_response: pipelined FAST12 corner response over a 7x7 window.
//
// The seven vertically aligned pixels from a 7-line line buffer are shifted
// into a 7x7 register window, one column per active pixel. The FAST12 test
// looks at the 16 pixels on a Bresenham circle of radius 3 around the centre
// c: a pixel is "bright" if it exceeds c + t and "dark" if it is below c - t.
// The centre is a corner when 12 contiguous circle pixels (circularly) are
// all bright or all dark. The response is the corner score
//   V = max( sum over bright p of (p - c - t), sum over dark p of (c - p - t) )
// for corners and 0 elsewhere, so a stronger corner has a larger response
// and non-maxima suppression can pick the best one in a neighbourhood.
// FAST12 on a 7x7 window follows the reference architecture; the score formula (the one
// of the original FAST paper) and the pipeline cut are this design's choice.
//
// Pipeline, all stages advancing on en (active pixel):
//   stage 1  per-pixel bright/dark flags and their excess over the threshold
//   stage 2  12-of-16 contiguity test, partial sums of four pixels each
//   stage 3  final sums and selection of the score
// Timing: after the clock edge of active pixel s, resp belongs to the window
// centre of pixel s - (LAT_X + 3*IMG_W), with LAT_X = 7 (3 stages, 1 window
// register, 3 columns to the centre); taps change on the same edges.
module fast_response #(
  parameter int unsigned DW     = 8,
  parameter int unsigned RESP_W = DW + 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DW-1:0]     threshold,   // FAST intensity threshold t
  input  logic [DW-1:0]     taps [7],    // taps[0]: newest line
  output logic [RESP_W-1:0] resp
);

  localparam int unsigned N = 7;
  localparam int unsigned R = 3;

  // Circle offsets (dx, dy), clockwise from the top.
  localparam int CDX [16] = '{ 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3,-3,-3,-2,-1};
  localparam int CDY [16] = '{-3,-3,-2,-1, 0, 1, 2, 3, 3, 3, 2, 1, 0,-1,-2,-3};

  // win[r][c]: r = 0 is the newest (lowest) line, c = 0 the newest (rightmost)
  // column, so image offset (dx, dy) from the centre sits at [R-dy][R-dx].
  logic [DW-1:0] win [N][N];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int r = 0; r < N; r++) begin
        win[r][0] <= taps[r];
        for (int c = 1; c < N; c++) win[r][c] <= win[r][c-1];
      end
    end
  end

  // ---------------- stage 1 ----------------
  logic [15:0]   s1_b, s1_d, b_n, d_n;
  logic [DW-1:0] s1_eb [16];
  logic [DW-1:0] s1_ed [16];
  logic [DW-1:0] eb_n  [16];
  logic [DW-1:0] ed_n  [16];

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      logic [DW:0] p, c, ct_hi, ct_lo;
      p      = {1'b0, win[R-CDY[i]][R-CDX[i]]};
      c      = {1'b0, win[R][R]};
      ct_hi  = c + {1'b0, threshold};
      ct_lo  = c - {1'b0, threshold};          // wraps when c < t
      b_n[i]  = p > ct_hi;
      d_n[i]  = (c > {1'b0, threshold}) && (p < ct_lo);
      eb_n[i] = b_n[i] ? DW'(p - ct_hi) : '0;
      ed_n[i] = d_n[i] ? DW'(ct_lo - p) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_b <= '0;
      s1_d <= '0;
      for (int i = 0; i < 16; i++) begin
        s1_eb[i] <= '0;
        s1_ed[i] <= '0;
      end
    end else if (en) begin
      s1_b <= b_n;
      s1_d <= d_n;
      for (int i = 0; i < 16; i++) begin
        s1_eb[i] <= eb_n[i];
        s1_ed[i] <= ed_n[i];
      end
    end
  end

  // ---------------- stage 2 ----------------
  function automatic logic arc12(input logic [15:0] f);
    logic hit;
    hit = 1'b0;
    for (int j = 0; j < 16; j++) begin
      logic all;
      all = 1'b1;
      for (int k = 0; k < 12; k++) all &= f[(j + k) % 16];
      hit |= all;
    end
    return hit;
  endfunction

  logic              cb_n, cd_n;
  assign cb_n = arc12(s1_b);
  assign cd_n = arc12(s1_d);

  logic              s2_cb, s2_cd;
  logic [DW+1:0]     s2_sb [4];
  logic [DW+1:0]     s2_sd [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_cb <= 1'b0;
      s2_cd <= 1'b0;
      for (int g = 0; g < 4; g++) begin
        s2_sb[g] <= '0;
        s2_sd[g] <= '0;
      end
    end else if (en) begin
      s2_cb <= cb_n;
      s2_cd <= cd_n;
      for (int g = 0; g < 4; g++) begin
        s2_sb[g] <= (DW+2)'(s1_eb[4*g]) + (DW+2)'(s1_eb[4*g+1])
                  + (DW+2)'(s1_eb[4*g+2]) + (DW+2)'(s1_eb[4*g+3]);
        s2_sd[g] <= (DW+2)'(s1_ed[4*g]) + (DW+2)'(s1_ed[4*g+1])
                  + (DW+2)'(s1_ed[4*g+2]) + (DW+2)'(s1_ed[4*g+3]);
      end
    end
  end

  // ---------------- stage 3 ----------------
  logic [DW+3:0] sum_b, sum_d, best;

  always_comb begin
    sum_b = (DW+4)'(s2_sb[0]) + (DW+4)'(s2_sb[1]) + (DW+4)'(s2_sb[2]) + (DW+4)'(s2_sb[3]);
    sum_d = (DW+4)'(s2_sd[0]) + (DW+4)'(s2_sd[1]) + (DW+4)'(s2_sd[2]) + (DW+4)'(s2_sd[3]);
    best  = (sum_b > sum_d) ? sum_b : sum_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  resp <= '0;
    else if (en) resp <= (s2_cb || s2_cd) ? RESP_W'(best) : '0;
  end

endmodule
