// tb_pack_widths: runs the 512x512 frame through the accelerator built with
// each of the three bus packings the design supports (128, 256 and 512 bits)
// and checks every gray and edge pixel against the reference model. It
// prints, for each packing, the cycles of the grayconvert+imgscan pair and of
// the whole three-kernel sequence, and checks that wider packing never makes
// the pair slower: grayconvert moves PACK_BITS/32 pixels per memory word, so
// its share shrinks as the word grows, while imgscan stays at one pixel per
// cycle whatever the packing.
module tb_pack_widths;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  frame_runner #(.PACK(128), .WORDS(131072)) r128 (.clk, .rst_n);
  frame_runner #(.PACK(256), .WORDS(65536))  r256 (.clk, .rst_n);
  frame_runner #(.PACK(512), .WORDS(32768))  r512 (.clk, .rst_n);

  int checks = 0, failures = 0;
  int pair [3], total [3];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    fork
      begin r128.frame(512, 512, 160); pair[0] = r128.last_pair_cycles; total[0] = r128.last_total_cycles; end
      begin r256.frame(512, 512, 160); pair[1] = r256.last_pair_cycles; total[1] = r256.last_total_cycles; end
      begin r512.frame(512, 512, 160); pair[2] = r512.last_pair_cycles; total[2] = r512.last_total_cycles; end
    join
    checks   = r128.checks + r256.checks + r512.checks;
    failures = r128.failures + r256.failures + r512.failures;
    for (int k = 0; k < 3; k++)
      $display("%0d-bit packing: grayconvert+imgscan %0d cycles, all three kernels %0d cycles",
               128 << k, pair[k], total[k]);
    checks += 2;
    if (!(pair[1] <= pair[0])) begin failures++; $display("FAIL: 256-bit pair slower than 128-bit"); end
    if (!(pair[2] <= pair[1])) begin failures++; $display("FAIL: 512-bit pair slower than 256-bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
