// sobel_accel_top: the Sobel edge-detection accelerator.
//
// Three kernels run one after the other on frames held in global memory:
// grayconvert turns the packed RGB frame into a packed gray frame, imgscan
// applies the thresholded 3x3 Sobel operator to the interior of the gray
// frame, and borderscan fills the edge frame's one-pixel border. Each kernel
// has its own memory master; hp0_interconnect merges the three onto the single
// HP0 port of the processing system, brought out here as plain signals (byte
// addresses, PACK_BITS-wide data, in-order read data and write
// acknowledgements). The host starts each kernel with a one-cycle start pulse
// and its arguments, and waits for its done pulse before starting the next,
// which is the in-order command queue of the global-memory-only transfer mode.
// Buffers exchanged between kernels are never copied into on-chip memory first.
// The kernel split, their arguments, the shared HP0 port, the global-memory
// data exchange and the 512-bit default packing follow the specification.
module sobel_accel_top
  import sobel_pkg::*;
#(
  parameter int unsigned PACK_BITS = 512,
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned MAX_WIDTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // grayconvert control
  input  logic              gc_start,
  output logic              gc_busy,
  output logic              gc_done,
  input  logic [ADDR_W-1:0] gc_image,
  input  logic [ADDR_W-1:0] gc_gray_image,
  input  logic [SIZE_W-1:0] gc_size,
  // imgscan control
  input  logic              is_start,
  output logic              is_busy,
  output logic              is_done,
  input  logic [ADDR_W-1:0] is_gray_image,
  input  logic [ADDR_W-1:0] is_ee_image,
  input  logic [DIM_W-1:0]  is_width,
  input  logic [DIM_W-1:0]  is_height,
  input  logic [THR_W-1:0]  is_t,
  // borderscan control
  input  logic              bs_start,
  output logic              bs_busy,
  output logic              bs_done,
  input  logic [ADDR_W-1:0] bs_ee_image,
  input  logic [DIM_W-1:0]  bs_width,
  input  logic [DIM_W-1:0]  bs_height,
  // HP0 port to global memory
  output logic                   hp_ar_valid,
  input  logic                   hp_ar_ready,
  output logic [ADDR_W-1:0]      hp_ar_addr,
  input  logic                   hp_r_valid,
  input  logic [PACK_BITS-1:0]   hp_r_data,
  output logic                   hp_aw_valid,
  input  logic                   hp_aw_ready,
  output logic [ADDR_W-1:0]      hp_aw_addr,
  output logic [PACK_BITS-1:0]   hp_w_data,
  output logic [PACK_BITS/8-1:0] hp_w_strb,
  input  logic                   hp_b_valid
);
  localparam int unsigned NK = 3;

  mem_if #(.DATA_W(PACK_BITS), .ADDR_W(ADDR_W)) gc_m (.clk, .rst_n);
  mem_if #(.DATA_W(PACK_BITS), .ADDR_W(ADDR_W)) is_m (.clk, .rst_n);
  mem_if #(.DATA_W(PACK_BITS), .ADDR_W(ADDR_W)) bs_m (.clk, .rst_n);

  grayconvert #(.PACK_BITS(PACK_BITS), .ADDR_W(ADDR_W)) u_grayconvert (
    .clk, .rst_n,
    .start     (gc_start),
    .busy      (gc_busy),
    .done      (gc_done),
    .image_addr(gc_image),
    .gray_addr (gc_gray_image),
    .size      (gc_size),
    .m         (gc_m)
  );

  imgscan #(.PACK_BITS(PACK_BITS), .ADDR_W(ADDR_W), .MAX_WIDTH(MAX_WIDTH)) u_imgscan (
    .clk, .rst_n,
    .start    (is_start),
    .busy     (is_busy),
    .done     (is_done),
    .gray_addr(is_gray_image),
    .ee_addr  (is_ee_image),
    .width    (is_width),
    .height   (is_height),
    .thr      (is_t),
    .m        (is_m)
  );

  borderscan #(.PACK_BITS(PACK_BITS), .ADDR_W(ADDR_W)) u_borderscan (
    .clk, .rst_n,
    .start  (bs_start),
    .busy   (bs_busy),
    .done   (bs_done),
    .ee_addr(bs_ee_image),
    .width  (bs_width),
    .height (bs_height),
    .m      (bs_m)
  );

  // master 0: grayconvert, 1: imgscan, 2: borderscan
  logic                   ar_valid [NK];
  logic                   ar_ready [NK];
  logic [ADDR_W-1:0]      ar_addr  [NK];
  logic                   r_valid  [NK];
  logic [PACK_BITS-1:0]   r_data;
  logic                   aw_valid [NK];
  logic                   aw_ready [NK];
  logic [ADDR_W-1:0]      aw_addr  [NK];
  logic [PACK_BITS-1:0]   w_data   [NK];
  logic [PACK_BITS/8-1:0] w_strb   [NK];
  logic                   b_valid  [NK];

  assign ar_valid[0] = gc_m.ar_valid;  assign ar_addr[0] = gc_m.ar_addr;
  assign ar_valid[1] = is_m.ar_valid;  assign ar_addr[1] = is_m.ar_addr;
  assign ar_valid[2] = bs_m.ar_valid;  assign ar_addr[2] = bs_m.ar_addr;
  assign aw_valid[0] = gc_m.aw_valid;  assign aw_addr[0] = gc_m.aw_addr;
  assign aw_valid[1] = is_m.aw_valid;  assign aw_addr[1] = is_m.aw_addr;
  assign aw_valid[2] = bs_m.aw_valid;  assign aw_addr[2] = bs_m.aw_addr;
  assign w_data[0]   = gc_m.w_data;    assign w_strb[0]  = gc_m.w_strb;
  assign w_data[1]   = is_m.w_data;    assign w_strb[1]  = is_m.w_strb;
  assign w_data[2]   = bs_m.w_data;    assign w_strb[2]  = bs_m.w_strb;

  assign gc_m.ar_ready = ar_ready[0];  assign gc_m.r_valid = r_valid[0];
  assign is_m.ar_ready = ar_ready[1];  assign is_m.r_valid = r_valid[1];
  assign bs_m.ar_ready = ar_ready[2];  assign bs_m.r_valid = r_valid[2];
  assign gc_m.r_data   = r_data;
  assign is_m.r_data   = r_data;
  assign bs_m.r_data   = r_data;
  assign gc_m.aw_ready = aw_ready[0];  assign gc_m.b_valid = b_valid[0];
  assign is_m.aw_ready = aw_ready[1];  assign is_m.b_valid = b_valid[1];
  assign bs_m.aw_ready = aw_ready[2];  assign bs_m.b_valid = b_valid[2];

  hp0_interconnect #(.N(NK), .DATA_W(PACK_BITS), .ADDR_W(ADDR_W)) u_hp0 (
    .clk, .rst_n,
    .s_ar_valid(ar_valid),
    .s_ar_ready(ar_ready),
    .s_ar_addr (ar_addr),
    .s_r_valid (r_valid),
    .s_r_data  (r_data),
    .s_aw_valid(aw_valid),
    .s_aw_ready(aw_ready),
    .s_aw_addr (aw_addr),
    .s_w_data  (w_data),
    .s_w_strb  (w_strb),
    .s_b_valid (b_valid),
    .m_ar_valid(hp_ar_valid),
    .m_ar_ready(hp_ar_ready),
    .m_ar_addr (hp_ar_addr),
    .m_r_valid (hp_r_valid),
    .m_r_data  (hp_r_data),
    .m_aw_valid(hp_aw_valid),
    .m_aw_ready(hp_aw_ready),
    .m_aw_addr (hp_aw_addr),
    .m_w_data  (hp_w_data),
    .m_w_strb  (hp_w_strb),
    .m_b_valid (hp_b_valid)
  );

endmodule
