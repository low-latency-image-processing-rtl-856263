// preprocessor: pixel-wise intensity mapping of the video stream.
//
// Low-level per-pixel processing such as colour conversion or histogram
// equalisation belongs here; the block takes the stream in and gives the same
// stream format out, so it can be replaced or left out. This implementation
// is a programmable look-up table from IN_W-bit sensor values to OUT_W-bit
// pipeline values: loading the table with an equalisation curve gives
// histogram equalisation, loading it with a gamma curve gives gamma
// correction. Its initial contents are a plain scaling, value >> (IN_W-OUT_W).
// The choice of a table, its widths and the write port are this design's.
//
// Interface: the table is written through lut_we / lut_addr / lut_wdata (one
// entry per clock, e.g. from a CPU GPIO or register port); writes may happen
// while the stream runs.
//
// Timing: one clock of latency; the pix_sync_t bundle is delayed by the same
// clock so data and coordinates stay aligned.
module preprocessor
  import nav_pkg::*;
#(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  in_data,
  input  pix_sync_t        in_sync,
  output logic [OUT_W-1:0] out_data,
  output pix_sync_t        out_sync,
  input  logic             lut_we,
  input  logic [IN_W-1:0]  lut_addr,
  input  logic [OUT_W-1:0] lut_wdata
);

  localparam int unsigned ENTRIES = 1 << IN_W;

  logic [OUT_W-1:0] lut [ENTRIES];

  initial begin
    for (int unsigned i = 0; i < ENTRIES; i++)
      lut[i] = OUT_W'(i >> (IN_W - OUT_W));
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_wdata;
  end

  always_ff @(posedge clk) begin
    out_data <= lut[in_data];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_sync <= '{blank: 1'b1, h_sync: 1'b0, x_cnt: '0, y_cnt: '0};
    else        out_sync <= in_sync;
  end

endmodule
