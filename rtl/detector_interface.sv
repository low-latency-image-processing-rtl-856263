// detector_interface: hands detected features to the processor.
//
// Coordinates: the detector's latency is fixed in active pixels, so instead
// of carrying coordinates through the pipeline this block subtracts it from
// the coordinates x_cnt / y_cnt of the pixel entering the detector on the
// same clock: LAT_X columns with a borrow into the row, and LAT_Y rows,
// modulo the image height (a feature near the bottom of a frame may come out
// while the next frame starts). Features within BORDER pixels of the image
// edge are dropped, since their windows were incomplete. This subtraction is
// the method of the reference architecture.
//
// Storage: accepted features {x, y, score} go into a FIFO of FIFO_DEPTH
// entries that holds them until the CPU reads them. When it is full, new
// features are dropped and the sticky overflow flag is set.
//
// Memory-mapped slave (word addresses, 32-bit data, one clock read latency,
// never stalls). The register map is this design's choice:
//   0 STATUS  r  [15:0] features waiting, [16] empty, [17] overflow,
//                [18] interrupt enable
//   1 FEAT_XY r  [15:0] x, [31:16] y of the oldest feature (no side effect)
//   2 SCORE   r  response of the oldest feature; the read removes it
//   3 CONTROL rw [0] interrupt enable; writing 1 to [1] clears overflow
// The CPU can poll STATUS or enable the interrupt: irq is a level that is
// high while the interrupt is enabled and the FIFO is not empty.
module detector_interface
  import nav_pkg::*;
#(
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned IMG_H      = 480,
  parameter int unsigned LAT_X      = FD_LAT_X,
  parameter int unsigned LAT_Y      = FD_LAT_Y,
  parameter int unsigned BORDER     = FD_BORDER,
  parameter int unsigned RESP_W     = 12,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // stream entering the detector, and the detector's output
  input  pix_sync_t         in_sync,
  input  logic              feat_valid,
  input  logic [RESP_W-1:0] feat_score,
  // memory-mapped slave
  input  logic [1:0]        s_address,
  input  logic              s_read,
  output logic [31:0]       s_readdata,
  input  logic              s_write,
  input  logic [31:0]       s_writedata,
  output logic              irq
);

  localparam int unsigned AW = (FIFO_DEPTH < 2) ? 1 : $clog2(FIFO_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  typedef struct packed {
    coord_t            x;
    coord_t            y;
    logic [RESP_W-1:0] score;
  } feature_t;

  // ---------------- coordinate recalculation ----------------
  int     fx, fy;
  logic   in_area, push;
  coord_t fx_c, fy_c;

  always_comb begin
    fx = int'(in_sync.x_cnt) - int'(LAT_X);
    fy = int'(in_sync.y_cnt) - int'(LAT_Y);
    if (fx < 0) begin
      fx += int'(IMG_W);
      fy -= 1;
    end
    if (fy < 0) fy += int'(IMG_H);
    in_area = (fx >= int'(BORDER)) && (fx < int'(IMG_W - BORDER)) &&
              (fy >= int'(BORDER)) && (fy < int'(IMG_H - BORDER));
    push    = !in_sync.blank && feat_valid && in_area;
    fx_c    = coord_t'(fx);
    fy_c    = coord_t'(fy);
  end

  // ---------------- feature FIFO ----------------
  feature_t      mem [FIFO_DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic          full, empty, pop, do_push;
  logic          overflow, irq_en;
  feature_t      head;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (32'(p) == FIFO_DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  assign full    = 32'(count) == FIFO_DEPTH;
  assign empty   = count == '0;
  assign pop     = s_read && s_address == 2'd2 && !empty;
  assign do_push = push && !full;
  assign head    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= '{x: fx_c, y: fy_c, score: feat_score};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
      irq_en   <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)     rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_push) - CW'(pop);
      if (push && full)
        overflow <= 1'b1;
      else if (s_write && s_address == 2'd3 && s_writedata[1])
        overflow <= 1'b0;
      if (s_write && s_address == 2'd3) irq_en <= s_writedata[0];
    end
  end

  // ---------------- register read ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_readdata <= '0;
    end else if (s_read) begin
      unique case (s_address)
        2'd0: s_readdata <= {13'd0, irq_en, overflow, empty, 16'(count)};
        2'd1: s_readdata <= {16'(head.y), 16'(head.x)};
        2'd2: s_readdata <= 32'(head.score);
        2'd3: s_readdata <= {31'd0, irq_en};
      endcase
    end
  end

  assign irq = irq_en && !empty;

endmodule
