// tb_borderscan: self-checking test of the borderscan kernel.
//
// Fills an edge image with random bytes, runs the kernel, and checks that
// every border pixel now holds its nearest interior pixel (corners the
// diagonal one) while every interior pixel is unchanged. It also checks that
// the kernel reads only the words that hold border pixels: all words of rows
// 1 and height-2 and the first and last word of the rows between.
module tb_borderscan;
  import sobel_pkg::*;

  localparam int unsigned PACK  = 512;
  localparam int unsigned AW    = 40;
  localparam int unsigned BYTES = PACK / 8;
  localparam int unsigned EE_W  = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_if #(.DATA_W(PACK), .ADDR_W(AW)) m (.clk, .rst_n);

  logic start = 0, busy, done;
  logic [AW-1:0] ee_addr;
  logic [DIM_W-1:0] width, height;

  borderscan #(.PACK_BITS(PACK), .ADDR_W(AW)) dut (
    .clk, .rst_n, .start, .busy, .done, .ee_addr, .width, .height, .m(m));

  global_mem_model #(.DATA_W(PACK), .ADDR_W(AW), .WORDS(128)) mem (
    .clk, .rst_n,
    .ar_valid(m.ar_valid), .ar_ready(m.ar_ready), .ar_addr(m.ar_addr),
    .r_valid(m.r_valid), .r_data(m.r_data),
    .aw_valid(m.aw_valid), .aw_ready(m.aw_ready), .aw_addr(m.aw_addr),
    .w_data(m.w_data), .w_strb(m.w_strb), .b_valid(m.b_valid));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int w, int h, int stall);
    byte unsigned img [];
    int wpr, reads0, exp_reads;
    wpr = w / BYTES;
    img = new[w * h];
    for (int i = 0; i < w * h; i++) begin
      img[i] = byte'($urandom);
      mem.mem[EE_W + i / BYTES][(i % BYTES) * 8 +: 8] = img[i];
    end
    mem.stall_pct = stall;
    reads0 = mem.n_reads;
    ee_addr = AW'(EE_W * BYTES);
    width = DIM_W'(w); height = DIM_W'(h);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int sy, sx, i;
        byte unsigned got;
        sy = (y < 1) ? 1 : (y > h - 2) ? h - 2 : y;
        sx = (x < 1) ? 1 : (x > w - 2) ? w - 2 : x;
        i = y * w + x;
        got = mem.mem[EE_W + i / BYTES][(i % BYTES) * 8 +: 8];
        check(got == img[sy * w + sx],
              $sformatf("%0dx%0d (%0d,%0d): got %h expected %h", w, h, y, x, got, img[sy * w + sx]));
      end
    if (h == 3) exp_reads = wpr;
    else        exp_reads = 2 * wpr + (h - 4) * ((wpr == 1) ? 1 : 2);
    check(mem.n_reads - reads0 == exp_reads,
          $sformatf("%0dx%0d: %0d words read, expected %0d", w, h, mem.n_reads - reads0, exp_reads));
    $display("%0dx%0d stall %0d%%: %0d words read", w, h, stall, mem.n_reads - reads0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    run(64, 6, 20);
    run(192, 7, 40);
    run(128, 3, 0);
    run(64, 4, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
