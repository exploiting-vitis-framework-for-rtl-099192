// tb_grayconvert: self-checking test of the grayconvert kernel.
//
// Loads random packed RGB pixels (with the extreme values mixed in) into the
// memory model, runs the kernel for several sizes, one of them ending in a
// partial gray word, and compares every gray byte with the reference formula.
// Bytes just past the end of the gray image must stay untouched. One run is
// made with a memory that never stalls, where the kernel must sustain one RGB
// word per cycle (checked against the beat count plus a small fixed overhead).
module tb_grayconvert;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int unsigned PACK  = 512;
  localparam int unsigned AW    = 40;
  localparam int unsigned BYTES = PACK / 8;
  localparam int unsigned RPW   = PACK / 32;
  localparam int unsigned IMG_W = 0;      // word index of the RGB image
  localparam int unsigned GRY_W = 200;    // word index of the gray image

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_if #(.DATA_W(PACK), .ADDR_W(AW)) m (.clk, .rst_n);

  logic start = 0, busy, done;
  logic [AW-1:0] image_addr, gray_addr;
  logic [SIZE_W-1:0] size;

  grayconvert #(.PACK_BITS(PACK), .ADDR_W(AW)) dut (
    .clk, .rst_n, .start, .busy, .done, .image_addr, .gray_addr, .size, .m(m));

  global_mem_model #(.DATA_W(PACK), .ADDR_W(AW), .WORDS(256)) mem (
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
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int n, int stall);
    int unsigned px [];
    int cycles;
    px = new[n];
    for (int i = 0; i < n; i++) begin
      case (i % 37)
        0: px[i] = 32'h00FF_FFFF;
        1: px[i] = 32'h0000_0000;
        default: px[i] = $urandom;
      endcase
      mem.mem[IMG_W + i / RPW][(i % RPW) * 32 +: 32] = px[i];
    end
    for (int w = GRY_W; w < GRY_W + 16; w++) mem.mem[w] = {BYTES{8'hA5}};
    mem.stall_pct = stall;
    image_addr = AW'(IMG_W * BYTES);
    gray_addr  = AW'(GRY_W * BYTES);
    size       = SIZE_W'(n);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    for (int i = 0; i < n; i++) begin
      byte unsigned got;
      got = mem.mem[GRY_W + i / BYTES][(i % BYTES) * 8 +: 8];
      check(got == ref_gray(px[i]),
            $sformatf("size %0d pixel %0d rgb %h: gray %0d, expected %0d", n, i, px[i], got, ref_gray(px[i])));
    end
    for (int i = n; i < ((n + BYTES - 1) / BYTES + 1) * BYTES; i++)
      check(mem.mem[GRY_W + i / BYTES][(i % BYTES) * 8 +: 8] == 8'hA5,
            $sformatf("size %0d: byte %0d past the image was written", n, i));
    if (stall == 0)
      check(cycles <= n / RPW + 30,
            $sformatf("size %0d: %0d cycles for %0d RGB words without stalls", n, cycles, n / RPW));
    $display("size %0d stall %0d%%: %0d cycles", n, stall, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    run(64 * 5, 25);
    run(64 * 3 + 16 * 2, 40);   // ends with a half-filled gray word
    run(64 * 8, 0);
    run(16, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
