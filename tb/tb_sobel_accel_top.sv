// tb_sobel_accel_top: end-to-end test of the Sobel accelerator at its default
// parameters (512-bit packing, 512-pixel maximum width).
//
// The testbench plays the host: it places an RGB frame in the global-memory
// model behind the HP0 port, then starts grayconvert, imgscan and borderscan
// one after the other, each after the previous one's done, as an in-order
// command queue does. The frames are a full 512x512 synthetic scene (shapes
// on a gradient with noise) and a small 64x8 frame of noise. After each frame
// the gray image and the complete edge image are compared, byte for byte,
// with the reference model. Every mechanism of the design must occur at
// least once: port stalls on reads and writes, several reads in flight,
// partial-strobe writes, traffic of all three kernels through the
// interconnect, and both edge and non-edge results. The cycles each kernel
// takes are printed; imgscan must stay within its one-pixel-per-cycle rate
// plus the stall share.
module tb_sobel_accel_top;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int unsigned PACK  = 512;
  localparam int unsigned AW    = 40;
  localparam int unsigned BYTES = PACK / 8;
  localparam int unsigned RPW   = PACK / 32;
  localparam int unsigned WORDS = 32768;
  localparam int unsigned IMG_W = 0;        // word indices of the three buffers
  localparam int unsigned GRY_W = 16384;
  localparam int unsigned EE_W  = 20480;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  sobel_accel_top dut (.*);

  global_mem_model #(.DATA_W(PACK), .ADDR_W(AW), .WORDS(WORDS), .STALL_PCT(20)) mem (
    .clk, .rst_n,
    .ar_valid(hp_ar_valid), .ar_ready(hp_ar_ready), .ar_addr(hp_ar_addr),
    .r_valid(hp_r_valid), .r_data(hp_r_data),
    .aw_valid(hp_aw_valid), .aw_ready(hp_aw_ready), .aw_addr(hp_aw_addr),
    .w_data(hp_w_data), .w_strb(hp_w_strb), .b_valid(hp_b_valid));

  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0;
  int kernel_reads [3] = '{0, 0, 0}, kernel_writes [3] = '{0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // The kernels run one at a time, so port traffic is attributed to the busy one
  always @(posedge clk) if (rst_n) begin
    int k;
    k = gc_busy ? 0 : is_busy ? 1 : bs_busy ? 2 : -1;
    if (k >= 0 && hp_ar_valid && hp_ar_ready) kernel_reads[k]++;
    if (k >= 0 && hp_aw_valid && hp_aw_ready) kernel_writes[k]++;
  end

  function automatic int unsigned scene(int y, int x, int w, int h);
    int r, g, b, cx, cy;
    cx = x - w / 2;
    cy = y - h / 2;
    r = (x * 255) / w;
    g = (y * 255) / h;
    b = 128;
    if (cx * cx + cy * cy < (w / 4) * (w / 4)) begin r = 240; g = 230; b = 40; end
    if (x > w / 8 && x < w / 3 && y > h / 10 && y < h / 3) begin r = 10; g = 20; b = 200; end
    r = (r + int'($urandom % 16)) & 255;
    g = (g + int'($urandom % 16)) & 255;
    return {8'h00, 8'(b), 8'(g), 8'(r)};
  endfunction

  task automatic wait_done(ref logic done_sig, output int cycles);
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!done_sig);
  endtask

  task automatic frame(int w, int h, int t, bit noise_only);
    int unsigned rgb [];
    byte unsigned gray [], ee [];
    int c_gc, c_is, c_bs;
    rgb  = new[w * h];
    gray = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int i;
        i = y * w + x;
        rgb[i] = noise_only ? $urandom : scene(y, x, w, h);
        gray[i] = ref_gray(rgb[i]);
        mem.mem[IMG_W + i / RPW][(i % RPW) * 32 +: 32] = rgb[i];
      end
    ref_frame(gray, w, h, t, ee);

    // host: grayconvert, then imgscan, then borderscan
    gc_image = AW'(IMG_W * BYTES); gc_gray_image = AW'(GRY_W * BYTES); gc_size = SIZE_W'(w * h);
    @(posedge clk) gc_start <= 1;
    @(posedge clk) gc_start <= 0;
    wait_done(gc_done, c_gc);

    is_gray_image = AW'(GRY_W * BYTES); is_ee_image = AW'(EE_W * BYTES);
    is_width = DIM_W'(w); is_height = DIM_W'(h); is_t = THR_W'(t);
    @(posedge clk) is_start <= 1;
    @(posedge clk) is_start <= 0;
    wait_done(is_done, c_is);

    bs_ee_image = AW'(EE_W * BYTES); bs_width = DIM_W'(w); bs_height = DIM_W'(h);
    @(posedge clk) bs_start <= 1;
    @(posedge clk) bs_start <= 0;
    wait_done(bs_done, c_bs);

    for (int i = 0; i < w * h; i++) begin
      byte unsigned g, e;
      g = mem.mem[GRY_W + i / BYTES][(i % BYTES) * 8 +: 8];
      e = mem.mem[EE_W + i / BYTES][(i % BYTES) * 8 +: 8];
      check(g == gray[i], $sformatf("%0dx%0d gray pixel %0d: %0d expected %0d", w, h, i, g, gray[i]));
      check(e == ee[i], $sformatf("%0dx%0d edge pixel (%0d,%0d): %h expected %h", w, h, i / w, i % w, e, ee[i]));
      if (ee[i] == 8'hFF) n_on++; else n_off++;
    end
    // imgscan handles one pixel per cycle; the port stalls about a fifth of
    // its write requests, which costs at most a few cycles per written word
    check(c_is <= w * h + 8 * (w * h / BYTES) + 100,
          $sformatf("%0dx%0d: imgscan took %0d cycles for %0d pixels", w, h, c_is, w * h));
    $display("%0dx%0d T=%0d: grayconvert %0d, imgscan %0d, borderscan %0d cycles", w, h, t, c_gc, c_is, c_bs);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    frame(512, 512, 150, 0);
    frame(64, 8, 400, 1);
    check(mem.ar_stalls > 0,       "port never stalled a read");
    check(mem.aw_stalls > 0,       "port never stalled a write");
    check(mem.max_inflight > 1,    "never more than one read in flight");
    check(mem.partial_writes > 0,  "no write with partial strobes");
    for (int k = 0; k < 3; k++)
      check(kernel_reads[k] > 0 && kernel_writes[k] > 0,
            $sformatf("kernel %0d had no traffic through the interconnect", k));
    check(n_on > 0 && n_off > 0, "edge and non-edge outputs both seen");
    $display("read stalls %0d, write stalls %0d, max reads in flight %0d, partial writes %0d",
             mem.ar_stalls, mem.aw_stalls, mem.max_inflight, mem.partial_writes);
    $display("reads per kernel %0d/%0d/%0d, writes per kernel %0d/%0d/%0d, edge %0d non-edge %0d",
             kernel_reads[0], kernel_reads[1], kernel_reads[2],
             kernel_writes[0], kernel_writes[1], kernel_writes[2], n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
