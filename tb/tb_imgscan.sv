// tb_imgscan: self-checking test of the imgscan (Sobel) kernel.
//
// Fills the gray image with a mix of flat blocks, ramps and noise so that
// both edge and non-edge pixels occur, runs the kernel for several frame
// shapes and thresholds, and compares every interior byte of the edge image
// with the reference operator. The one-pixel frame, which borderscan owns,
// must be left as it was. With a memory that never stalls the kernel must
// process one pixel per cycle (pixel count plus a small fixed overhead).
module tb_imgscan;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int unsigned PACK  = 512;
  localparam int unsigned AW    = 40;
  localparam int unsigned BYTES = PACK / 8;
  localparam int unsigned GRY_W = 0;
  localparam int unsigned EE_W  = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_if #(.DATA_W(PACK), .ADDR_W(AW)) m (.clk, .rst_n);

  logic start = 0, busy, done;
  logic [AW-1:0] gray_addr, ee_addr;
  logic [DIM_W-1:0] width, height;
  logic [THR_W-1:0] thr;

  imgscan #(.PACK_BITS(PACK), .ADDR_W(AW), .MAX_WIDTH(256)) dut (
    .clk, .rst_n, .start, .busy, .done, .gray_addr, .ee_addr, .width, .height, .thr, .m(m));

  global_mem_model #(.DATA_W(PACK), .ADDR_W(AW), .WORDS(128)) mem (
    .clk, .rst_n,
    .ar_valid(m.ar_valid), .ar_ready(m.ar_ready), .ar_addr(m.ar_addr),
    .r_valid(m.r_valid), .r_data(m.r_data),
    .aw_valid(m.aw_valid), .aw_ready(m.aw_ready), .aw_addr(m.aw_addr),
    .w_data(m.w_data), .w_strb(m.w_strb), .b_valid(m.b_valid));

  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int w, int h, int t, int stall);
    byte unsigned g [];
    int cycles;
    g = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int i;
        i = y * w + x;
        case ((x / 8 + y) % 4)
          0: g[i] = 8'd20;
          1: g[i] = 8'd200;
          2: g[i] = byte'(x * 3 + y);
          default: g[i] = byte'($urandom);
        endcase
        mem.mem[GRY_W + i / BYTES][(i % BYTES) * 8 +: 8] = g[i];
      end
    for (int wd = EE_W; wd < EE_W + (w * h) / BYTES; wd++) mem.mem[wd] = {BYTES{8'h5A}};
    mem.stall_pct = stall;
    gray_addr = AW'(GRY_W * BYTES);
    ee_addr   = AW'(EE_W * BYTES);
    width = DIM_W'(w); height = DIM_W'(h); thr = THR_W'(t);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int i;
        byte unsigned got, exp;
        i = y * w + x;
        got = mem.mem[EE_W + i / BYTES][(i % BYTES) * 8 +: 8];
        if (y == 0 || y == h - 1 || x == 0 || x == w - 1) exp = 8'h5A;
        else begin
          exp = ref_edge(g, w, y, x, t);
          if (exp == 8'hFF) n_on++; else n_off++;
        end
        check(got == exp, $sformatf("%0dx%0d T=%0d (%0d,%0d): got %h expected %h", w, h, t, y, x, got, exp));
      end
    if (stall == 0)
      check(cycles <= w * h + 40, $sformatf("%0dx%0d: %0d cycles for %0d pixels without stalls", w, h, cycles, w * h));
    $display("%0dx%0d T=%0d stall %0d%%: %0d cycles", w, h, t, stall, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    run(64, 6, 100, 20);
    run(128, 5, 300, 35);
    run(192, 3, 0, 10);
    run(64, 16, 600, 0);
    check(n_on > 0 && n_off > 0, "both edge and non-edge pixels exercised");
    $display("edge pixels %0d, non-edge pixels %0d", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
