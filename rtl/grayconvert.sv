// grayconvert: RGB-to-gray kernel, the first of the three Sobel kernels.
//
// On start it reads `size` packed RGB pixels from image_addr, converts every
// pixel of a bus word in the same cycle (PACK_BITS/32 converters working side
// by side) with p_g = (19 R + 37 G + 7 B) / 64, and writes the gray bytes,
// packed PACK_BITS/8 to a word, from gray_addr on. One RGB word yields a
// quarter of a gray word, so four input words are gathered before a write;
// the last, possibly partial, gray word is written with byte strobes.
// Throughput is one RGB word per cycle when memory keeps up. done pulses for
// one cycle after every write has been acknowledged; busy is high meanwhile.
// The conversion formula, the parallel per-word conversion and the packing
// width follow the specification; the pixel layout, the control handshake and
// the requirement that size be a multiple of PACK_BITS/32 are this design's.
module grayconvert
  import sobel_pkg::*;
#(
  parameter int unsigned PACK_BITS = 512,
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned RD_DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] image_addr,
  input  logic [ADDR_W-1:0] gray_addr,
  input  logic [SIZE_W-1:0] size,
  mem_if.master             m
);
  localparam int unsigned RPW   = PACK_BITS / RGB_W;  // RGB pixels per word
  localparam int unsigned GPW   = PACK_BITS / PIX_W;  // gray pixels per word
  localparam int unsigned BYTES = PACK_BITS / 8;
  localparam int unsigned SLOTS = GPW / RPW;          // input words per gray word
  localparam int unsigned SW    = $clog2(SLOTS);
  localparam int unsigned RPW_L = $clog2(RPW);

  logic              running;
  logic [SIZE_W-1:0] beats_left;   // RGB words still to convert
  logic [SIZE_W-1:0] acks_pending;
  logic [SW-1:0]     slot;
  logic [PACK_BITS-1:0]   acc;
  logic [BYTES-1:0]       acc_strb;

  logic                 in_valid, in_ready;
  logic [PACK_BITS-1:0] in_data;
  logic                 rd_busy;

  mem_reader #(
    .DATA_W(PACK_BITS), .ADDR_W(ADDR_W), .CNT_W(SIZE_W), .DEPTH(RD_DEPTH)
  ) u_reader (
    .clk, .rst_n,
    .start    (start && !running),
    .base     (image_addr),
    .count    (size >> RPW_L),
    .busy     (rd_busy),
    .ar_valid (m.ar_valid),
    .ar_ready (m.ar_ready),
    .ar_addr  (m.ar_addr),
    .r_valid  (m.r_valid),
    .r_data   (m.r_data),
    .out_valid(in_valid),
    .out_ready(in_ready),
    .out_data (in_data)
  );

  // All converters of one word, in parallel
  logic [RPW*PIX_W-1:0] gray_bytes;
  always_comb
    for (int p = 0; p < RPW; p++)
      gray_bytes[p*PIX_W +: PIX_W] = gray_of(rgb_t'(in_data[p*RGB_W +: RGB_W]));

  logic in_last, flush, in_fire, aw_fire;
  assign in_last  = (beats_left == SIZE_W'(1));
  assign flush    = (slot == SW'(SLOTS - 1)) || in_last;
  assign in_ready = running && (!flush || !m.aw_valid || m.aw_ready);
  assign in_fire  = in_valid && in_ready;
  assign aw_fire  = m.aw_valid && m.aw_ready;

  logic [PACK_BITS-1:0] acc_next;
  logic [BYTES-1:0]     strb_next;
  always_comb begin
    acc_next  = acc;
    strb_next = acc_strb;
    acc_next [slot*RPW*PIX_W +: RPW*PIX_W] = gray_bytes;
    strb_next[slot*RPW       +: RPW]       = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      done         <= 1'b0;
      beats_left   <= '0;
      acks_pending <= '0;
      slot         <= '0;
      acc          <= '0;
      acc_strb     <= '0;
      m.aw_valid   <= 1'b0;
      m.aw_addr    <= '0;
      m.w_data     <= '0;
      m.w_strb     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running      <= 1'b1;
        beats_left   <= size >> RPW_L;
        slot         <= '0;
        acc_strb     <= '0;
        m.aw_addr    <= gray_addr - ADDR_W'(BYTES);  // advanced before each write
      end
      if (aw_fire) m.aw_valid <= 1'b0;
      if (in_fire) begin
        beats_left <= beats_left - 1'b1;
        if (flush) begin
          m.aw_valid <= 1'b1;
          m.aw_addr  <= m.aw_addr + ADDR_W'(BYTES);
          m.w_data   <= acc_next;
          m.w_strb   <= strb_next;
          slot       <= '0;
          acc_strb   <= '0;
        end else begin
          acc      <= acc_next;
          acc_strb <= strb_next;
          slot     <= slot + 1'b1;
        end
      end
      acks_pending <= acks_pending + SIZE_W'(aw_fire) - SIZE_W'(m.b_valid);
      if (running && !(start && !running) && beats_left == '0 && !rd_busy
          && !m.aw_valid && acks_pending == '0 && !m.b_valid) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign busy = running;

  // Argument limit: whole RGB words only
  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    start && !running |-> size[RPW_L-1:0] == '0);

endmodule
