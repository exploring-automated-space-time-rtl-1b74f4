// Line buffer and window former for 3x3 Window2Pixel kernels.
//
// Input is a raster stream of a IMG_H x IMG_W image, W_T pixels per beat.
// Output is, per output beat, W_T+2 pixel columns, each a vertical stack of
// three pixels (top row in the low byte): exactly what W_T outputs of a 3x3
// kernel need. Borders are replicated (this design's choice).
//
// Stage 1, vertical: two line buffers hold the previous two rows, one W_T-pixel
// word per beat position. When input row r arrives (r >= 1) each beat is
// stacked with the words of rows r-1 and r-2 and becomes the column beat of
// output row r-1; row 0 only fills the buffer. After the last input row one
// extra row is issued from the buffers alone, with the last row repeated
// below. In row 1 the top pixel repeats the middle one.
// Stage 2, horizontal: keeps the current column beat and the last column of
// the one before it. A column beat leaves together with the first column of
// the next beat; the last beat of a row leaves on its own one cycle later with
// its last column repeated. So a frame of B = IMG_H*IMG_W/W_T input beats
// gives B output beats, at one per cycle apart from one extra cycle per row
// and one extra row per frame.
module window_former #(
  parameter int W_T   = 4,
  parameter int IMG_W = 640,
  parameter int IMG_H = 480
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          s_valid,
  output logic                          s_ready,
  input  logic [W_T-1:0][7:0]           s_data,
  output logic                          m_valid,
  input  logic                          m_ready,
  output logic [W_T+1:0][2:0][7:0]      m_data
);
  localparam int NB = IMG_W / W_T;          // beats per row
  localparam int BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int RW = $clog2(IMG_H + 1);

  initial begin
    if (IMG_W % W_T != 0) $error("window_former: IMG_W must be a multiple of W_T");
    if (IMG_H < 2) $error("window_former: IMG_H must be at least 2");
  end

  typedef logic [W_T-1:0][2:0][7:0] colbeat_t;   // W_T columns of 3 pixels

  // ---------------- stage 1: line buffers ----------------
  logic [W_T-1:0][7:0] lb0 [NB];   // row r-1
  logic [W_T-1:0][7:0] lb1 [NB];   // row r-2
  logic [RW-1:0] row;              // input row, IMG_H = flush row
  logic [BW-1:0] blk;

  logic     c_valid, c_ready, c_last;
  colbeat_t c_data;

  wire flush   = (row == RW'(IMG_H));
  wire first   = (row == '0);
  wire blk_end = (blk == BW'(NB-1));

  logic [W_T-1:0][7:0] top_w, mid_w, bot_w;
  always_comb begin
    mid_w = lb0[blk];
    top_w = (row == RW'(1)) ? mid_w : lb1[blk];
    bot_w = flush ? mid_w : s_data;
    for (int c = 0; c < W_T; c++) begin
      c_data[c][0] = top_w[c];
      c_data[c][1] = mid_w[c];
      c_data[c][2] = bot_w[c];
    end
    c_last  = blk_end;
    c_valid = flush ? 1'b1 : (!first && s_valid);
    s_ready = flush ? 1'b0 : (first || c_ready);
  end

  wire in_fire = s_valid && s_ready;
  wire advance = in_fire || (flush && c_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row <= '0;
      blk <= '0;
    end else if (advance) begin
      blk <= blk_end ? '0 : blk + 1'b1;
      if (blk_end) row <= flush ? '0 : row + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire) begin
      lb0[blk] <= s_data;
      lb1[blk] <= lb0[blk];
    end
  end

  // ---------------- stage 2: horizontal overlap ----------------
  colbeat_t       cur;
  logic [2:0][7:0] left;
  logic           cur_valid, cur_last;

  always_comb begin
    logic [2:0][7:0] right;
    right   = cur_last ? cur[W_T-1] : c_data[0];
    m_valid = cur_valid && (cur_last || c_valid);
    m_data  = {right, cur, left};
    // Take a new column beat when the register is empty, or when the held
    // beat leaves together with this one's first column.
    c_ready = !cur_valid || (!cur_last && m_ready);
  end

  wire c_fire = c_valid && c_ready;
  wire m_fire = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_valid <= 1'b0;
      cur_last  <= 1'b0;
    end else begin
      if (c_fire) begin
        cur_valid <= 1'b1;
        cur_last  <= c_last;
      end else if (m_fire) begin
        cur_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (c_fire) begin
      cur  <= c_data;
      left <= cur_valid ? cur[W_T-1] : c_data[0];
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           m_valid && !m_ready |=> m_valid && $stable(m_data));
endmodule
