// borderscan: border-correction kernel, the third of the three kernels.
//
// The 3x3 window of imgscan never centres on the outermost rows and columns,
// so the edge image leaves that one-pixel frame unwritten. borderscan fills
// it by copying the nearest interior pixel outwards: column 0 takes column 1,
// column width-1 takes column width-2, row 0 takes (corrected) row 1 and row
// height-1 takes (corrected) row height-2, so each corner takes its diagonal
// interior neighbour. It touches only words that hold border pixels: every
// word of rows 1 and height-2, and the first and last word of each row in
// between. Each such word is read, corrected in its first and/or last byte,
// written back with strobes on the corrected bytes only, and, for rows 1 and
// height-2, written whole into row 0 or height-1. Words are handled one at a
// time, with one request outstanding. done pulses after the last write has
// been acknowledged.
// The kernel's name, ports and purpose (correcting the frame of imgscan's
// result from sparse data around the border) follow the specification; the
// replicate-the-neighbour rule and the word-by-word sequence are this
// design's. It needs height >= 3 and width a multiple of PACK_BITS/8.
module borderscan
  import sobel_pkg::*;
#(
  parameter int unsigned PACK_BITS = 512,
  parameter int unsigned ADDR_W    = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] ee_addr,
  input  logic [DIM_W-1:0]  width,
  input  logic [DIM_W-1:0]  height,
  mem_if.master             m
);
  localparam int unsigned GPW   = PACK_BITS / PIX_W;
  localparam int unsigned BYTES = PACK_BITS / 8;
  localparam int unsigned GL    = $clog2(GPW);
  localparam int unsigned BL    = $clog2(BYTES);
  localparam int unsigned WW    = SIZE_W;

  typedef enum logic [2:0] {S_IDLE, S_SEL, S_RD, S_WAIT, S_WR, S_DRAIN} state_t;
  state_t state;

  // write targets for the corrected word
  typedef enum logic [1:0] {T_SELF, T_UP, T_DOWN} tgt_t;

  logic [ADDR_W-1:0] ee_r;
  logic [DIM_W-1:0]  h_r, y;
  logic [WW-1:0]     wpr, i, row_base;   // row_base = y * wpr
  logic [PACK_BITS-1:0] word;
  logic [BYTES-1:0]  self_strb;
  logic [2:0]        todo;               // pending targets, indexed by tgt_t
  logic [SIZE_W-1:0] acks_pending;

  logic first_w, last_w, edge_row_top, edge_row_bot;
  assign first_w      = (i == '0);
  assign last_w       = (i == wpr - 1'b1);
  assign edge_row_top = (y == DIM_W'(1));
  assign edge_row_bot = (y == h_r - DIM_W'(2));

  function automatic logic [ADDR_W-1:0] word_addr(logic [WW-1:0] w);
    return ee_r + (ADDR_W'(w) << BL);
  endfunction

  logic aw_fire;
  assign aw_fire = m.aw_valid && m.aw_ready;

  tgt_t cur;
  always_comb begin
    if (todo[T_SELF])     cur = T_SELF;
    else if (todo[T_UP])  cur = T_UP;
    else                  cur = T_DOWN;
  end

  assign m.ar_valid = (state == S_RD);
  assign m.ar_addr  = word_addr(row_base + i);
  assign m.aw_valid = (state == S_WR) && (todo != '0);
  assign m.w_data   = word;
  assign m.w_strb   = (cur == T_SELF) ? self_strb : '1;
  always_comb begin
    unique case (cur)
      T_SELF:  m.aw_addr = word_addr(row_base + i);
      T_UP:    m.aw_addr = word_addr(row_base - wpr + i);
      default: m.aw_addr = word_addr(row_base + wpr + i);
    endcase
  end

  // word with its border bytes replaced by their inner neighbours
  logic [PACK_BITS-1:0] fixed;
  logic [BYTES-1:0]     fixed_strb;
  always_comb begin
    fixed      = m.r_data;
    fixed_strb = '0;
    if (first_w) begin
      fixed[0 +: PIX_W] = m.r_data[PIX_W +: PIX_W];
      fixed_strb[0]     = 1'b1;
    end
    if (last_w) begin
      fixed[(GPW-1)*PIX_W +: PIX_W] = m.r_data[(GPW-2)*PIX_W +: PIX_W];
      fixed_strb[GPW-1]             = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      done         <= 1'b0;
      ee_r         <= '0;
      h_r          <= '0;
      y            <= '0;
      wpr          <= '0;
      i            <= '0;
      row_base     <= '0;
      word         <= '0;
      self_strb    <= '0;
      todo         <= '0;
      acks_pending <= '0;
    end else begin
      done <= 1'b0;
      acks_pending <= acks_pending + SIZE_W'(aw_fire) - SIZE_W'(m.b_valid);
      unique case (state)
        S_IDLE: if (start) begin
          ee_r     <= ee_addr;
          h_r      <= height;
          wpr      <= WW'(width >> GL);
          y        <= DIM_W'(1);
          i        <= '0;
          row_base <= WW'(width >> GL);
          state    <= S_SEL;
        end
        S_SEL: begin
          if (y > h_r - DIM_W'(2))
            state <= S_DRAIN;
          else if (edge_row_top || edge_row_bot || first_w || last_w)
            state <= S_RD;
          else
            i <= wpr - 1'b1;           // skip the inner words of this row
        end
        S_RD: if (m.ar_ready) state <= S_WAIT;
        S_WAIT: if (m.r_valid) begin
          word      <= fixed;
          self_strb <= fixed_strb;
          todo      <= {edge_row_bot, edge_row_top, (fixed_strb != '0)};
          state     <= S_WR;
        end
        S_WR: begin
          if (todo == '0 || (aw_fire && (todo & ~(3'b1 << cur)) == '0)) begin
            if (last_w) begin
              i        <= '0;
              y        <= y + 1'b1;
              row_base <= row_base + wpr;
            end else begin
              i <= i + 1'b1;
            end
            todo  <= '0;
            state <= S_SEL;
          end else if (aw_fire) begin
            todo[cur] <= 1'b0;
          end
        end
        S_DRAIN: if (acks_pending == '0 && !m.b_valid) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Argument limits: rows start on word boundaries, at least one interior row
  a_args: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IDLE && start |-> width[GL-1:0] == '0 && width != '0 && height >= DIM_W'(3));

endmodule
