// hp0_interconnect: shares the one high-performance (HP0) memory port of the
// processing system between the kernels' memory masters.
//
// Read and write channels are arbitrated independently, each round-robin
// among the masters that are requesting. The winner's request is passed
// through combinationally; its index is pushed into an order FIFO when the
// port accepts the request. Because the port answers reads and acknowledges
// writes in request order, the head of each FIFO names the master that the
// next r_valid / b_valid belongs to. A channel stops granting while its FIFO
// is full, which bounds the requests in flight at ID_DEPTH.
// The specification only shows the kernels meeting at this port; the
// round-robin policy and the in-order routing are this design's.
module hp0_interconnect #(
  parameter int unsigned N        = 3,
  parameter int unsigned DATA_W   = 512,
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned ID_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // masters
  input  logic              s_ar_valid [N],
  output logic              s_ar_ready [N],
  input  logic [ADDR_W-1:0] s_ar_addr  [N],
  output logic              s_r_valid  [N],
  output logic [DATA_W-1:0] s_r_data,
  input  logic              s_aw_valid [N],
  output logic              s_aw_ready [N],
  input  logic [ADDR_W-1:0] s_aw_addr  [N],
  input  logic [DATA_W-1:0] s_w_data   [N],
  input  logic [DATA_W/8-1:0] s_w_strb [N],
  output logic              s_b_valid  [N],
  // HP0 port
  output logic              m_ar_valid,
  input  logic              m_ar_ready,
  output logic [ADDR_W-1:0] m_ar_addr,
  input  logic              m_r_valid,
  input  logic [DATA_W-1:0] m_r_data,
  output logic              m_aw_valid,
  input  logic              m_aw_ready,
  output logic [ADDR_W-1:0] m_aw_addr,
  output logic [DATA_W-1:0] m_w_data,
  output logic [DATA_W/8-1:0] m_w_strb,
  input  logic              m_b_valid
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW = $clog2(ID_DEPTH);
  localparam int unsigned CW = $clog2(ID_DEPTH + 1);

  // ------------------------------------------------------------ read channel
  logic [IW-1:0] r_prio, r_gnt;
  logic          r_any;
  logic [IW-1:0] r_ids [ID_DEPTH];
  logic [PW-1:0] r_wp, r_rp;
  logic [CW-1:0] r_cnt;
  logic          r_full;

  always_comb begin
    r_any = 1'b0;
    r_gnt = r_prio;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(r_prio) + k) % N);
      if (s_ar_valid[idx]) begin
        r_any = 1'b1;
        r_gnt = IW'(idx);
      end
    end
  end

  assign r_full     = (r_cnt == CW'(ID_DEPTH));
  assign m_ar_valid = r_any && !r_full;
  assign m_ar_addr  = s_ar_addr[r_gnt];
  assign s_r_data   = m_r_data;

  always_comb
    for (int k = 0; k < N; k++) begin
      s_ar_ready[k] = m_ar_ready && !r_full && r_any && (r_gnt == IW'(k));
      s_r_valid[k]  = m_r_valid && (r_ids[r_rp] == IW'(k));
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_prio <= '0;
      r_wp   <= '0;
      r_rp   <= '0;
      r_cnt  <= '0;
    end else begin
      if (m_ar_valid && m_ar_ready) begin
        r_prio <= (r_gnt == IW'(N - 1)) ? '0 : r_gnt + 1'b1;
        r_wp   <= (r_wp == PW'(ID_DEPTH - 1)) ? '0 : r_wp + 1'b1;
      end
      if (m_r_valid)
        r_rp <= (r_rp == PW'(ID_DEPTH - 1)) ? '0 : r_rp + 1'b1;
      r_cnt <= r_cnt + CW'(m_ar_valid && m_ar_ready) - CW'(m_r_valid);
    end
  end

  always_ff @(posedge clk)
    if (m_ar_valid && m_ar_ready) r_ids[r_wp] <= r_gnt;

  // ----------------------------------------------------------- write channel
  logic [IW-1:0] w_prio, w_gnt;
  logic          w_any;
  logic [IW-1:0] w_ids [ID_DEPTH];
  logic [PW-1:0] w_wp, w_rp;
  logic [CW-1:0] w_cnt;
  logic          w_full;

  always_comb begin
    w_any = 1'b0;
    w_gnt = w_prio;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(w_prio) + k) % N);
      if (s_aw_valid[idx]) begin
        w_any = 1'b1;
        w_gnt = IW'(idx);
      end
    end
  end

  assign w_full     = (w_cnt == CW'(ID_DEPTH));
  assign m_aw_valid = w_any && !w_full;
  assign m_aw_addr  = s_aw_addr[w_gnt];
  assign m_w_data   = s_w_data[w_gnt];
  assign m_w_strb   = s_w_strb[w_gnt];

  always_comb
    for (int k = 0; k < N; k++) begin
      s_aw_ready[k] = m_aw_ready && !w_full && w_any && (w_gnt == IW'(k));
      s_b_valid[k]  = m_b_valid && (w_ids[w_rp] == IW'(k));
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_prio <= '0;
      w_wp   <= '0;
      w_rp   <= '0;
      w_cnt  <= '0;
    end else begin
      if (m_aw_valid && m_aw_ready) begin
        w_prio <= (w_gnt == IW'(N - 1)) ? '0 : w_gnt + 1'b1;
        w_wp   <= (w_wp == PW'(ID_DEPTH - 1)) ? '0 : w_wp + 1'b1;
      end
      if (m_b_valid)
        w_rp <= (w_rp == PW'(ID_DEPTH - 1)) ? '0 : w_rp + 1'b1;
      w_cnt <= w_cnt + CW'(m_aw_valid && m_aw_ready) - CW'(m_b_valid);
    end
  end

  always_ff @(posedge clk)
    if (m_aw_valid && m_aw_ready) w_ids[w_wp] <= w_gnt;

  a_no_stray_r: assert property (@(posedge clk) disable iff (!rst_n) m_r_valid |-> r_cnt != '0);
  a_no_stray_b: assert property (@(posedge clk) disable iff (!rst_n) m_b_valid |-> w_cnt != '0);

endmodule
