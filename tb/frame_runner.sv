// frame_runner: test harness around one sobel_accel_top with its own
// global-memory model, for testbenches that compare configurations.
//
// Its task frame(w, h, t) plays the host for one frame: it writes a synthetic
// RGB scene into memory, starts grayconvert, imgscan and borderscan in turn,
// waiting for each done, and compares the gray and edge images byte for byte
// with the reference model. Results accumulate in checks and failures; the
// cycles spent in the grayconvert+imgscan pair and in the whole frame are
// left in last_pair_cycles and last_total_cycles.
module frame_runner
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
#(
  parameter int unsigned PACK  = 512,
  parameter int unsigned WORDS = 32768
) (
  input logic clk,
  input logic rst_n
);
  localparam int unsigned AW    = 40;
  localparam int unsigned BYTES = PACK / 8;
  localparam int unsigned RPW   = PACK / 32;
  localparam int unsigned IMG_W = 0;
  localparam int unsigned GRY_W = WORDS / 2;
  localparam int unsigned EE_W  = WORDS / 2 + WORDS / 8;

  logic gc_start = 0, gc_busy, gc_done;
  logic is_start = 0, is_busy, is_done;
  logic bs_start = 0, bs_busy, bs_done;
  logic [AW-1:0] gc_image, gc_gray_image, is_gray_image, is_ee_image, bs_ee_image;
  logic [SIZE_W-1:0] gc_size;
  logic [DIM_W-1:0] is_width, is_height, bs_width, bs_height;
  logic [THR_W-1:0] is_t;
  logic hp_ar_valid, hp_ar_ready, hp_r_valid, hp_aw_valid, hp_aw_ready, hp_b_valid;
  logic [AW-1:0] hp_ar_addr, hp_aw_addr;
  logic [PACK-1:0] hp_r_data, hp_w_data;
  logic [PACK/8-1:0] hp_w_strb;

  sobel_accel_top #(.PACK_BITS(PACK)) dut (.*);

  global_mem_model #(.DATA_W(PACK), .ADDR_W(AW), .WORDS(WORDS), .STALL_PCT(10)) mem (
    .clk, .rst_n,
    .ar_valid(hp_ar_valid), .ar_ready(hp_ar_ready), .ar_addr(hp_ar_addr),
    .r_valid(hp_r_valid), .r_data(hp_r_data),
    .aw_valid(hp_aw_valid), .aw_ready(hp_aw_ready), .aw_addr(hp_aw_addr),
    .w_data(hp_w_data), .w_strb(hp_w_strb), .b_valid(hp_b_valid));

  int checks = 0, failures = 0;
  int last_pair_cycles = 0, last_total_cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (%0d-bit packing): %s", PACK, what);
    end
  endtask

  task automatic wait_done(ref logic done_sig, inout int cycles);
    do begin
      @(posedge clk);
      cycles++;
    end while (!done_sig);
  endtask

  task automatic frame(int w, int h, int t);
    int unsigned rgb;
    byte unsigned gray [], ee [];
    int cyc;
    gray = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int i, r, g, b;
        i = y * w + x;
        r = (x * 255) / w; g = (y * 255) / h; b = 90;
        if ((x - w / 2) * (x - w / 2) + (y - h / 2) * (y - h / 2) < (h / 4) * (h / 4)) begin
          r = 250; g = 240; b = 30;
        end
        rgb = {8'h00, 8'(b), 8'(g + int'($urandom % 8)), 8'(r + int'($urandom % 8))};
        gray[i] = ref_gray(rgb);
        mem.mem[IMG_W + i / RPW][(i % RPW) * 32 +: 32] = rgb;
      end
    ref_frame(gray, w, h, t, ee);
    cyc = 0;
    gc_image = AW'(IMG_W * BYTES); gc_gray_image = AW'(GRY_W * BYTES); gc_size = SIZE_W'(w * h);
    @(posedge clk) gc_start <= 1;
    @(posedge clk) gc_start <= 0;
    wait_done(gc_done, cyc);
    is_gray_image = AW'(GRY_W * BYTES); is_ee_image = AW'(EE_W * BYTES);
    is_width = DIM_W'(w); is_height = DIM_W'(h); is_t = THR_W'(t);
    @(posedge clk) is_start <= 1;
    @(posedge clk) is_start <= 0;
    wait_done(is_done, cyc);
    last_pair_cycles = cyc;
    bs_ee_image = AW'(EE_W * BYTES); bs_width = DIM_W'(w); bs_height = DIM_W'(h);
    @(posedge clk) bs_start <= 1;
    @(posedge clk) bs_start <= 0;
    wait_done(bs_done, cyc);
    last_total_cycles = cyc;
    for (int i = 0; i < w * h; i++) begin
      check(mem.mem[GRY_W + i / BYTES][(i % BYTES) * 8 +: 8] == gray[i],
            $sformatf("%0dx%0d gray pixel %0d", w, h, i));
      check(mem.mem[EE_W + i / BYTES][(i % BYTES) * 8 +: 8] == ee[i],
            $sformatf("%0dx%0d edge pixel (%0d,%0d)", w, h, i / w, i % w));
    end
  endtask
endmodule
