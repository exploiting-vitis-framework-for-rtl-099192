// tb_hp0_interconnect: self-checking test of the HP0 port arbiter.
//
// Three traffic generators issue random reads and writes, at random moments,
// through the interconnect into the memory model. Memory word k initially
// holds a pattern derived from k; each generator writes only its own words
// and remembers what it wrote, so every read reply can be predicted. Checked:
// each read reply reaches the master that asked, in order, with the expected
// data; each master gets exactly as many write acknowledgements as it issued;
// the final memory holds every write. Also counted and required: cycles in
// which several masters compete, and cycles in which the order FIFO is full
// and holds requests back (ID_DEPTH is kept small for that).
module tb_hp0_interconnect;

  localparam int unsigned N     = 3;
  localparam int unsigned DW    = 64;
  localparam int unsigned AW    = 16;
  localparam int unsigned BYTES = DW / 8;
  localparam int unsigned WORDS = 64;
  localparam int unsigned OPS   = 300;   // requests per master and channel

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          s_ar_valid [N], s_ar_ready [N], s_r_valid [N];
  logic [AW-1:0] s_ar_addr  [N];
  logic [DW-1:0] s_r_data;
  logic          s_aw_valid [N], s_aw_ready [N], s_b_valid [N];
  logic [AW-1:0] s_aw_addr  [N];
  logic [DW-1:0] s_w_data   [N];
  logic [DW/8-1:0] s_w_strb [N];
  logic          m_ar_valid, m_ar_ready, m_r_valid, m_aw_valid, m_aw_ready, m_b_valid;
  logic [AW-1:0] m_ar_addr, m_aw_addr;
  logic [DW-1:0] m_r_data, m_w_data;
  logic [DW/8-1:0] m_w_strb;

  hp0_interconnect #(.N(N), .DATA_W(DW), .ADDR_W(AW), .ID_DEPTH(4)) dut (.*);

  global_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(WORDS), .STALL_PCT(15), .LAT(3)) mem (
    .clk, .rst_n,
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar_addr(m_ar_addr),
    .r_valid(m_r_valid), .r_data(m_r_data),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw_addr(m_aw_addr),
    .w_data(m_w_data), .w_strb(m_w_strb), .b_valid(m_b_valid));

  int checks = 0, failures = 0, contention = 0, fifo_full = 0;
  int masters_done = 0;
  logic [DW-1:0] shadow [WORDS];   // expected memory contents

  function automatic logic [DW-1:0] pattern(int k);
    return {32'(k) * 32'h9E37_79B9, 32'(k) ^ 32'h5A5A_0000};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    int nr, nw;
    nr = 0; nw = 0;
    for (int k = 0; k < N; k++) begin
      nr += int'(s_ar_valid[k]);
      nw += int'(s_aw_valid[k]);
    end
    if (nr > 1 || nw > 1) contention++;
    if ((nr > 0 && !m_ar_valid) || (nw > 0 && !m_aw_valid)) fifo_full++;
  end

  // Master k owns the words with index % N == k; it reads any word whose
  // contents are settled (its own words, or everybody's before any write).
  for (genvar k = 0; k < N; k++) begin : g_master
    logic [DW-1:0] expq [$];
    int acks = 0, issued_w = 0;

    initial begin
      s_ar_valid[k] = 0;
      s_ar_addr[k]  = '0;
      wait (rst_n);
      for (int op = 0; op < OPS; op++) begin
        int wd;
        repeat ($urandom % 3) @(posedge clk);
        wd = ($urandom % (WORDS / N)) * N + k;
        s_ar_valid[k] <= 1;
        s_ar_addr[k]  <= AW'(wd * BYTES);
        @(posedge clk);
        while (!s_ar_ready[k]) @(posedge clk);
        s_ar_valid[k] <= 0;
      end
    end

    // Handshakes are sampled here, at the edge, reads before writes, as the
    // memory orders them
    always @(posedge clk) begin
      if (s_ar_valid[k] && s_ar_ready[k])
        expq.push_back(shadow[int'(s_ar_addr[k]) / BYTES]);
      if (s_aw_valid[k] && s_aw_ready[k])
        for (int b = 0; b < DW / 8; b++)
          if (s_w_strb[k][b]) shadow[int'(s_aw_addr[k]) / BYTES][b*8 +: 8] = s_w_data[k][b*8 +: 8];
    end

    always @(posedge clk) if (s_r_valid[k]) begin
      check(expq.size() != 0, $sformatf("master %0d: read data nobody asked for", k));
      if (expq.size() != 0) begin
        logic [DW-1:0] e;
        e = expq.pop_front();
        check(s_r_data == e, $sformatf("master %0d: read %h expected %h", k, s_r_data, e));
      end
    end

    always @(posedge clk) if (s_b_valid[k]) acks++;

    initial begin
      s_aw_valid[k] = 0;
      s_aw_addr[k]  = '0;
      s_w_data[k]   = '0;
      s_w_strb[k]   = '0;
      wait (rst_n);
      for (int op = 0; op < OPS; op++) begin
        int wd;
        logic [DW-1:0] d;
        logic [DW/8-1:0] st;
        repeat ($urandom % 4) @(posedge clk);
        wd = ($urandom % (WORDS / N)) * N + k;
        d  = {$urandom, $urandom};
        st = (DW/8)'($urandom);
        s_aw_valid[k] <= 1;
        s_aw_addr[k]  <= AW'(wd * BYTES);
        s_w_data[k]   <= d;
        s_w_strb[k]   <= st;
        @(posedge clk);
        while (!s_aw_ready[k]) @(posedge clk);
        issued_w++;
        s_aw_valid[k] <= 0;
      end
      while (acks != issued_w || expq.size() != 0) @(posedge clk);
      repeat (20) @(posedge clk);
      check(acks == OPS, $sformatf("master %0d: %0d write acks for %0d writes", k, acks, OPS));
      masters_done++;
    end
  end

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      mem.mem[w] = pattern(w);
      shadow[w]  = pattern(w);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (masters_done == N);
    for (int w = 0; w < WORDS; w++)
      check(mem.mem[w] == shadow[w], $sformatf("word %0d: %h expected %h", w, mem.mem[w], shadow[w]));
    check(contention > 0, "no cycle with competing masters");
    check(fifo_full > 0, "order FIFO never filled");
    $display("contention cycles %0d, held-back cycles %0d", contention, fifo_full);
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
