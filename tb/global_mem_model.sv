// global_mem_model: behavioural model of the off-chip global memory seen
// through the HP0 port (not synthesizable; for testbenches only).
//
// WORDS words of DATA_W bits, addressed by byte address (the low bits below
// the word size are ignored; addresses wrap at WORDS). A request is accepted
// when ready, which drops at random in stall_pct (default STALL_PCT)
// percent of cycles. A read
// takes its data when it is accepted and returns it LAT..LAT+3 cycles later,
// in order; a write is applied, under its byte strobes, when accepted and is
// acknowledged LAT..LAT+3 cycles later, in order. Testbenches load and
// inspect the contents through the array `mem` and read the counters below.
module global_mem_model #(
  parameter int unsigned DATA_W    = 512,
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned STALL_PCT = 20,
  parameter int unsigned LAT       = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ar_valid,
  output logic                ar_ready,
  input  logic [ADDR_W-1:0]   ar_addr,
  output logic                r_valid,
  output logic [DATA_W-1:0]   r_data,
  input  logic                aw_valid,
  output logic                aw_ready,
  input  logic [ADDR_W-1:0]   aw_addr,
  input  logic [DATA_W-1:0]   w_data,
  input  logic [DATA_W/8-1:0] w_strb,
  output logic                b_valid
);
  localparam int unsigned BL = $clog2(DATA_W / 8);
  localparam longint LAT_L = longint'(LAT);

  logic [DATA_W-1:0] mem [WORDS];

  typedef struct { longint due; logic [DATA_W-1:0] data; } rsp_t;
  rsp_t   rq [$];
  longint bq [$];
  longint cycle = 0, last_r = 0, last_b = 0;

  int unsigned stall_pct = STALL_PCT;  // may be changed at run time
  int unsigned n_reads = 0, n_writes = 0, ar_stalls = 0, aw_stalls = 0;
  int unsigned max_inflight = 0, partial_writes = 0;

  function automatic int unsigned idx(logic [ADDR_W-1:0] a);
    return int'(64'(a >> BL) % 64'(WORDS));
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      ar_ready <= 1'b0;
      aw_ready <= 1'b0;
      r_valid  <= 1'b0;
      b_valid  <= 1'b0;
      r_data   <= '0;
      rq.delete();
      bq.delete();
    end else begin
      if (ar_valid && ar_ready) begin
        rsp_t e;
        longint d;
        longint jitter;
        jitter = longint'(64'($urandom) & 64'd3);
        d = cycle + LAT_L + jitter;
        if (d <= last_r) d = last_r + 1;
        last_r = d;
        e.due  = d;
        e.data = mem[idx(ar_addr)];
        rq.push_back(e);
        n_reads++;
        if (rq.size() > max_inflight) max_inflight = rq.size();
      end
      if (ar_valid && !ar_ready) ar_stalls++;
      if (aw_valid && aw_ready) begin
        longint d;
        longint jitter;
        for (int b = 0; b < DATA_W / 8; b++)
          if (w_strb[b]) mem[idx(aw_addr)][b*8 +: 8] = w_data[b*8 +: 8];
        if (w_strb != '1) partial_writes++;
        jitter = longint'(64'($urandom) & 64'd3);
        d = cycle + LAT_L + jitter;
        if (d <= last_b) d = last_b + 1;
        last_b = d;
        bq.push_back(d);
        n_writes++;
      end
      if (aw_valid && !aw_ready) aw_stalls++;
      ar_ready <= ($urandom % 100) >= stall_pct;
      aw_ready <= ($urandom % 100) >= stall_pct;
      r_valid  <= 1'b0;
      b_valid  <= 1'b0;
      if (rq.size() != 0 && rq[0].due <= cycle) begin
        r_valid <= 1'b1;
        r_data  <= rq[0].data;
        void'(rq.pop_front());
      end
      if (bq.size() != 0 && bq[0] <= cycle) begin
        b_valid <= 1'b1;
        void'(bq.pop_front());
      end
    end
  end
endmodule
