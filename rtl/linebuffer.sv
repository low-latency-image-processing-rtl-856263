// linebuffer: gives N vertically aligned pixels from a raster-order stream.
//
// N-1 line FIFOs (line_fifo, one image line each) are chained: the k-th
// FIFO's output feeds the (k+1)-th FIFO's input, and the same holds for the
// enables. A small state machine counts h_sync pulses after reset; once the
// k-th FIFO holds a whole line it turns on that FIFO's read_enable, and the
// write_enable of the next FIFO follows one pixel later, when the read data
// has come out of the block RAM. From line N-1 on every FIFO reads and
// writes once per pixel and so stays one line deep. The chaining and the
// h_sync-triggered control follow the reference architecture; the
// register timing is this design's.
//
// The whole block advances only on active pixels (en = !pixel_blank), so the
// blanking intervals of any length pass without effect and the data stay a
// pure function of the active-pixel sequence; every line must carry exactly
// IMG_W active pixels. h_sync must be high with the first pixel of a line.
//
// Output: taps[0] is the newest line (the registered input pixel), taps[k]
// the pixel k lines above it in the same column. All taps change on the
// clock edge of an active pixel: after the edge of active pixel number s,
// taps[k] holds pixel s - k*IMG_W. Until N-1 lines have passed the upper
// taps hold stale values; users mask the image border by coordinates.
module linebuffer #(
  parameter int unsigned DW    = 8,
  parameter int unsigned N     = 7,    // lines delivered (window height)
  parameter int unsigned IMG_W = 640   // pixels per line
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,      // active pixel on this clock
  input  logic          h_sync,  // first pixel of a line (with en)
  input  logic [DW-1:0] din,
  output logic [DW-1:0] taps [N]
);

  localparam int unsigned NF = N - 1;
  localparam int unsigned LW = $clog2(N + 1);
  localparam int unsigned CW = $clog2(IMG_W + 1);

  // lines_seen: h_sync pulses seen so far, saturating at N.
  logic [LW-1:0] lines_seen, lines_now;
  logic [DW-1:0] in_q;
  logic          rd_en  [NF];
  logic          wr_en  [NF];
  logic          rd_d   [NF];
  logic [DW-1:0] f_din  [NF];
  logic [DW-1:0] f_dout [NF];
  logic [CW-1:0] f_cnt  [NF];

  always_comb begin
    lines_now = lines_seen;
    if (en && h_sync && 32'(lines_seen) < N) lines_now = lines_seen + LW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lines_seen <= '0;
      in_q       <= '0;
      for (int k = 0; k < NF; k++) rd_d[k] <= 1'b0;
    end else begin
      lines_seen <= lines_now;
      if (en) begin
        in_q <= din;
        for (int k = 0; k < NF; k++) rd_d[k] <= rd_en[k];
      end
    end
  end

  for (genvar k = 0; k < NF; k++) begin : g_fifo
    // Read FIFO k once the current line is line k+1 or later.
    assign rd_en[k] = en && (32'(lines_now) >= k + 2);
    if (k == 0) begin : g_first
      assign wr_en[k] = en;
      assign f_din[k] = din;
    end else begin : g_chain
      assign wr_en[k] = en && rd_d[k-1];
      assign f_din[k] = f_dout[k-1];
    end

    line_fifo #(.DW(DW), .DEPTH(IMG_W)) u_fifo (
      .clk          (clk),
      .rst_n        (rst_n),
      .write_enable (wr_en[k]),
      .din          (f_din[k]),
      .read_enable  (rd_en[k]),
      .dout         (f_dout[k]),
      .count        (f_cnt[k])
    );

    assign taps[k+1] = f_dout[k];

    // Once running, FIFO 0 holds a whole line before each pixel and every
    // later FIFO one pixel less (its write trails its read by one pixel).
    a_fill: assert property (@(posedge clk) disable iff (!rst_n)
                             en && 32'(lines_seen) == N |-> 32'(f_cnt[k]) == IMG_W - (k == 0 ? 0 : 1))
      else $error("linebuffer: FIFO %0d holds %0d pixels", k, f_cnt[k]);
  end

  assign taps[0] = in_q;

endmodule
