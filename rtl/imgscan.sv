// imgscan: Sobel edge-detection kernel, the second of the three kernels.
//
// On start it streams the packed gray image (width x height bytes, from
// gray_addr) in raster order, unpacks it to one pixel per cycle and keeps the
// two previous rows in line buffers, so that every arriving pixel completes
// one column of a 3x3 window. With the two preceding columns held in
// registers, the window centred one row up and one column left of the
// arriving pixel is complete once the pixel is at row >= 2 and column >= 2.
// For that centre the kernel computes |Gx| + |Gy| with the 3x3 Sobel operator
// and writes 0xFF to the edge image if it exceeds T, 0x00 otherwise.
// Edge bytes are gathered into PACK_BITS-wide words and written with byte
// strobes, so only the interior of the edge image (rows 1..height-2,
// columns 1..width-2) is written; the one-pixel frame is left to borderscan.
// One pixel is processed per cycle. done pulses once all writes are
// acknowledged.
// The row-wise scan, the horizontal kernel of the Sobel operator, the
// threshold argument T and the kernel's ports follow the specification. The
// vertical kernel, the |Gx|+|Gy| magnitude with a binary output, one pixel
// per cycle and the requirement that width be a multiple of PACK_BITS/8 and
// at most MAX_WIDTH are this design's choices.
module imgscan
  import sobel_pkg::*;
#(
  parameter int unsigned PACK_BITS = 512,
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned MAX_WIDTH = 512,
  parameter int unsigned RD_DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] gray_addr,
  input  logic [ADDR_W-1:0] ee_addr,
  input  logic [DIM_W-1:0]  width,
  input  logic [DIM_W-1:0]  height,
  input  logic [THR_W-1:0]  thr,      // T
  mem_if.master             m
);
  localparam int unsigned GPW   = PACK_BITS / PIX_W;
  localparam int unsigned BYTES = PACK_BITS / 8;
  localparam int unsigned GL    = $clog2(GPW);
  localparam int unsigned XW    = $clog2(MAX_WIDTH);
  localparam int unsigned WW    = SIZE_W;   // word-index width

  // ---------------- argument registers and control
  logic             running;
  logic [DIM_W-1:0] w_r, h_r;
  logic [THR_W-1:0] thr_r;
  logic [ADDR_W-1:0] ee_r;
  logic [WW-1:0]    wpr;             // words per row
  logic [SIZE_W-1:0] acks_pending;
  logic             all_in;          // every pixel consumed

  logic go;
  assign go = start && !running;

  // ---------------- reader
  logic                 rd_valid, rd_ready, rd_busy;
  logic [PACK_BITS-1:0] rd_data;
  logic [SIZE_W-1:0]    n_words;
  assign n_words = SIZE_W'((32'(width) * 32'(height)) >> GL);

  mem_reader #(
    .DATA_W(PACK_BITS), .ADDR_W(ADDR_W), .CNT_W(SIZE_W), .DEPTH(RD_DEPTH)
  ) u_reader (
    .clk, .rst_n,
    .start    (go),
    .base     (gray_addr),
    .count    (n_words),
    .busy     (rd_busy),
    .ar_valid (m.ar_valid),
    .ar_ready (m.ar_ready),
    .ar_addr  (m.ar_addr),
    .r_valid  (m.r_valid),
    .r_data   (m.r_data),
    .out_valid(rd_valid),
    .out_ready(rd_ready),
    .out_data (rd_data)
  );

  // ---------------- unpacker: one pixel per cycle
  logic                 ub_valid;
  logic [PACK_BITS-1:0] ub_data;
  logic [GL-1:0]        ub_idx;
  pix_t                 pix;
  logic                 pix_fire;
  assign pix = ub_data[ub_idx*PIX_W +: PIX_W];
  assign rd_ready = !ub_valid || (pix_fire && ub_idx == GL'(GPW - 1));

  // ---------------- window position of the arriving pixel
  logic [DIM_W-1:0] row, col;
  logic [WW-1:0]    row_base;          // row * wpr
  col_t             col_a, col_b, col_c;  // columns col-2, col-1, col
  pix_t             lb0 [MAX_WIDTH];   // row-1
  pix_t             lb1 [MAX_WIDTH];   // row-2

  assign col_c = '{top: lb1[col[XW-1:0]], mid: lb0[col[XW-1:0]], bot: pix};

  logic emit, row_end, flush;
  logic [DIM_W-1:0] ox;                // output column = col-1
  logic [GL-1:0]    obyte;
  assign emit    = (row >= DIM_W'(2)) && (col >= DIM_W'(2));
  assign row_end = (col == w_r - 1'b1);
  assign ox      = col - 1'b1;
  assign obyte   = ox[GL-1:0];
  assign flush   = emit && (obyte == GL'(GPW - 1) || ox == w_r - DIM_W'(2));

  logic aw_fire, stage_ready;
  assign aw_fire     = m.aw_valid && m.aw_ready;
  assign stage_ready = !flush || !m.aw_valid || m.aw_ready;
  assign pix_fire    = running && ub_valid && stage_ready;

  pix_t edge_px;
  assign edge_px = edge_of(col_a, col_b, col_c, thr_r);

  // ---------------- output packer
  logic [PACK_BITS-1:0] acc;
  logic [BYTES-1:0]     acc_strb;
  logic [WW-1:0]        out_word;
  assign out_word = row_base - wpr + WW'(ox >> GL);

  always_ff @(posedge clk) begin
    if (pix_fire) begin
      lb1[col[XW-1:0]] <= col_c.mid;
      lb0[col[XW-1:0]] <= pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      done         <= 1'b0;
      w_r          <= '0;
      h_r          <= '0;
      thr_r        <= '0;
      ee_r         <= '0;
      wpr          <= '0;
      acks_pending <= '0;
      all_in       <= 1'b0;
      ub_valid     <= 1'b0;
      ub_data      <= '0;
      ub_idx       <= '0;
      row          <= '0;
      col          <= '0;
      row_base     <= '0;
      col_a        <= '0;
      col_b        <= '0;
      acc          <= '0;
      acc_strb     <= '0;
      m.aw_valid   <= 1'b0;
      m.aw_addr    <= '0;
      m.w_data     <= '0;
      m.w_strb     <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        running  <= 1'b1;
        w_r      <= width;
        h_r      <= height;
        thr_r    <= thr;
        ee_r     <= ee_addr;
        wpr      <= WW'(width >> GL);
        all_in   <= (n_words == '0);
        ub_valid <= 1'b0;
        ub_idx   <= '0;
        row      <= '0;
        col      <= '0;
        row_base <= '0;
        acc_strb <= '0;
      end

      // unpacker
      if (rd_valid && rd_ready && running) begin
        ub_valid <= 1'b1;
        ub_data  <= rd_data;
        ub_idx   <= '0;
      end else if (pix_fire) begin
        if (ub_idx == GL'(GPW - 1)) ub_valid <= 1'b0;
        ub_idx <= ub_idx + 1'b1;
      end

      if (aw_fire) m.aw_valid <= 1'b0;

      if (pix_fire) begin
        col_a <= col_b;
        col_b <= col_c;
        if (row_end) begin
          col      <= '0;
          row      <= row + 1'b1;
          row_base <= row_base + wpr;
          if (row == h_r - 1'b1) all_in <= 1'b1;
        end else begin
          col <= col + 1'b1;
        end
        if (emit) begin
          if (flush) begin
            m.aw_valid <= 1'b1;
            m.aw_addr  <= ee_r + ADDR_W'(out_word) * ADDR_W'(BYTES);
            m.w_data   <= acc;
            m.w_data[obyte*PIX_W +: PIX_W] <= edge_px;
            m.w_strb   <= acc_strb | (BYTES'(1) << obyte);
            acc_strb   <= '0;
          end else begin
            acc[obyte*PIX_W +: PIX_W] <= edge_px;
            acc_strb[obyte]           <= 1'b1;
          end
        end
      end

      acks_pending <= acks_pending + SIZE_W'(aw_fire) - SIZE_W'(m.b_valid);
      if (running && !go && all_in && !rd_busy && !m.aw_valid
          && acks_pending == '0 && !m.b_valid) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign busy = running;

  // Argument limits: rows start on word boundaries and fit the line buffers
  a_args: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> width[GL-1:0] == '0 && width <= DIM_W'(MAX_WIDTH) && height >= DIM_W'(3));

endmodule
