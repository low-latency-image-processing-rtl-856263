// memory_buffer: copies the preprocessed image into external memory.
//
// The FPGA's internal memory holds only a few lines, but the processor needs
// the image around each detected feature to compute its descriptor. This
// block therefore streams every active pixel into a frame buffer in external
// memory, through a write-only master port on the memory controller.
// Pixels are packed four to a 32-bit word, little-endian (the pixel at the
// lowest column in bits 7:0), and the word for pixels x..x+3 of row y goes
// to byte address frame_base + y*IMG_W + x. The address counter restarts at
// frame_base with the first pixel of row 0. The packing, the word size and
// the address layout are this design's choices.
//
// A FIFO of FIFO_DEPTH words absorbs the memory's wait states. If it is full
// when a word is complete, the word is lost and the sticky overflow flag is
// set (cleared by overflow_clr).
//
// Master port: address / write / writedata are held while waitrequest is
// high; a word is accepted on a clock with write high and waitrequest low.
// IMG_W must be a multiple of 4 and PIX_W must be 8.
module memory_buffer
  import nav_pkg::*;
#(
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] in_data,
  input  pix_sync_t        in_sync,
  input  logic [31:0]      frame_base,   // byte address of pixel (0,0)
  // write master towards the memory controller
  output logic [31:0]      m_address,
  output logic             m_write,
  output logic [31:0]      m_writedata,
  input  logic             m_waitrequest,
  output logic             overflow,
  input  logic             overflow_clr
);

  localparam int unsigned AW = (FIFO_DEPTH < 2) ? 1 : $clog2(FIFO_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] data;
  } mem_word_t;

  logic        active, frame_first, word_done;
  logic [23:0] pack;        // the three earlier pixels of the word
  logic [31:0] next_addr;   // address of the word being packed
  logic [31:0] word_addr;
  mem_word_t   fifo [FIFO_DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic        full, empty, push, pop;

  assign active      = !in_sync.blank;
  assign frame_first = active && in_sync.x_cnt == '0 && in_sync.y_cnt == '0;
  assign word_done   = active && in_sync.x_cnt[1:0] == 2'd3;
  assign word_addr   = frame_first ? frame_base : next_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack      <= '0;
      next_addr <= '0;
    end else if (active) begin
      pack <= {in_data, pack[23:8]};
      if (frame_first)
        next_addr <= frame_base;
      if (word_done)
        next_addr <= word_addr + 32'd4;
    end
  end

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (32'(p) == FIFO_DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  assign full  = 32'(count) == FIFO_DEPTH;
  assign empty = count == '0;
  assign push  = word_done && !full;
  assign pop   = !empty && !m_waitrequest;

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= '{addr: word_addr, data: {in_data, pack}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
      if (word_done && full) overflow <= 1'b1;
      else if (overflow_clr) overflow <= 1'b0;
    end
  end

  assign m_write     = !empty;
  assign m_address   = fifo[rd_ptr].addr;
  assign m_writedata = fifo[rd_ptr].data;

  // Master handshake rules: a pending write stays asserted and unchanged
  // until the memory accepts it.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      m_write && m_waitrequest |=> m_write && $stable(m_address) && $stable(m_writedata);
  endproperty
  a_hold: assert property (p_hold) else $error("memory_buffer: write dropped under waitrequest");

  initial begin
    if (IMG_W % 4 != 0) $error("memory_buffer: IMG_W must be a multiple of 4");
    if (PIX_W != 8)     $error("memory_buffer: PIX_W must be 8");
  end

endmodule
