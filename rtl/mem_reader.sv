// mem_reader: streams a run of consecutive words out of global memory.
//
// After a one-cycle start with a byte base address and a word count, it issues
// read requests for base, base+BYTES, ... and delivers the returned words, in
// order, on a valid/ready stream. Read data cannot be refused on the memory
// port, so the reader keeps a DEPTH-entry buffer and only issues a request
// while the words in flight plus the words buffered are fewer than DEPTH;
// with DEPTH at least the memory's read latency it sustains one word per
// cycle. busy is high from start until the last word has left the stream.
// The burst-style prefetch is this design's choice of how a kernel's memory
// interface feeds it.
module mem_reader #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [CNT_W-1:0]  count,
  output logic              busy,
  // memory read channel
  output logic              ar_valid,
  input  logic              ar_ready,
  output logic [ADDR_W-1:0] ar_addr,
  input  logic              r_valid,
  input  logic [DATA_W-1:0] r_data,
  // word stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);
  localparam int unsigned BYTES = DATA_W / 8;
  localparam int unsigned PW    = $clog2(DEPTH);
  localparam int unsigned UW    = $clog2(DEPTH + 1);

  logic [CNT_W-1:0]  to_issue;   // requests not yet issued
  logic [CNT_W-1:0]  to_deliver; // words not yet delivered
  logic [UW-1:0]     used;       // in flight + buffered
  logic [UW-1:0]     fill;       // buffered
  logic [PW-1:0]     wr_ptr, rd_ptr;
  logic [DATA_W-1:0] buffer [DEPTH];

  logic ar_fire, out_fire;

  assign ar_valid  = (to_issue != '0) && (used < UW'(DEPTH));
  assign ar_fire   = ar_valid && ar_ready;
  assign out_valid = (fill != '0);
  assign out_data  = buffer[rd_ptr];
  assign out_fire  = out_valid && out_ready;
  assign busy      = (to_deliver != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      to_issue   <= '0;
      to_deliver <= '0;
      used       <= '0;
      fill       <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      ar_addr    <= '0;
    end else if (start) begin
      to_issue   <= count;
      to_deliver <= count;
      used       <= '0;
      fill       <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      ar_addr    <= base;
    end else begin
      if (ar_fire) begin
        to_issue <= to_issue - 1'b1;
        ar_addr  <= ar_addr + ADDR_W'(BYTES);
      end
      if (out_fire) begin
        to_deliver <= to_deliver - 1'b1;
        rd_ptr     <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      if (r_valid)
        wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      used <= used + UW'(ar_fire) - UW'(out_fire);
      fill <= fill + UW'(r_valid) - UW'(out_fire);
    end
  end

  always_ff @(posedge clk)
    if (r_valid) buffer[wr_ptr] <= r_data;

endmodule
