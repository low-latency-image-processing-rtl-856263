// nms_core: 3x3 non-maxima suppression of the response stream.
//
// Three vertically aligned responses from a 3-line line buffer are shifted
// into a 3x3 register window, one column per active pixel. The centre is
// reported as a feature when it is above the user threshold and is a local
// maximum of its eight-neighbourhood, as the reference architecture specifies. For equal
// values the tie is broken by raster order (this design's choice): the
// centre must be strictly greater than the neighbours that come earlier in
// the scan (the row above and the left neighbour) and at least equal to the
// later ones (right neighbour and the row below), so of two equal adjacent
// maxima exactly the earlier one is kept.
//
// Timing: decision and score are registered on en. After the clock edge of
// active pixel s, feat_valid / feat_score describe the window centre that was
// fed in as input element s - (3 + IMG_W) (2 columns to the centre plus the
// output register), counted on the stream entering the line buffer.
module nms_core #(
  parameter int unsigned RESP_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [RESP_W-1:0] threshold,
  input  logic [RESP_W-1:0] taps [3],    // taps[0]: newest line
  output logic              feat_valid,
  output logic [RESP_W-1:0] feat_score
);

  logic [RESP_W-1:0] w [3][3];   // [row: 0 = newest][col: 0 = newest]
  logic              is_max;

  always_ff @(posedge clk) begin
    if (en) begin
      for (int r = 0; r < 3; r++) begin
        w[r][0] <= taps[r];
        w[r][1] <= w[r][0];
        w[r][2] <= w[r][1];
      end
    end
  end

  always_comb begin
    logic [RESP_W-1:0] c;
    c      = w[1][1];
    is_max = c > threshold;
    // earlier in raster order: whole upper row and the left neighbour
    for (int j = 0; j < 3; j++) is_max &= c > w[2][j];
    is_max &= c > w[1][2];
    // later: right neighbour and the whole lower row
    is_max &= c >= w[1][0];
    for (int j = 0; j < 3; j++) is_max &= c >= w[0][j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_valid <= 1'b0;
      feat_score <= '0;
    end else if (en) begin
      feat_valid <= is_max;
      feat_score <= w[1][1];
    end
  end

endmodule
