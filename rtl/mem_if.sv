// mem_if: a kernel's memory-mapped master port onto global memory.
//
// Reads and writes use separate channels, as on an AXI port. A read request
// (ar_valid/ar_ready, byte address ar_addr) is answered, in request order, by
// one r_valid cycle carrying the whole DATA_W-bit word; the master must take
// read data whenever it comes, so it may only have as many reads in flight as
// it has room for. A write request carries address, data and byte strobes in
// one beat (aw_valid/aw_ready) and is acknowledged, in order, by one b_valid
// cycle. Addresses are byte addresses aligned to DATA_W/8. The handshake rule
// (a request, once raised, holds its contents until accepted) is asserted here.
interface mem_if #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned ADDR_W = 40
) (
  input logic clk,
  input logic rst_n
);
  localparam int unsigned STRB_W = DATA_W / 8;

  logic              ar_valid;
  logic              ar_ready;
  logic [ADDR_W-1:0] ar_addr;
  logic              r_valid;
  logic [DATA_W-1:0] r_data;
  logic              aw_valid;
  logic              aw_ready;
  logic [ADDR_W-1:0] aw_addr;
  logic [DATA_W-1:0] w_data;
  logic [STRB_W-1:0] w_strb;
  logic              b_valid;

  modport master (
    output ar_valid, ar_addr, aw_valid, aw_addr, w_data, w_strb,
    input  ar_ready, r_valid, r_data, aw_ready, b_valid
  );
  modport slave (
    input  ar_valid, ar_addr, aw_valid, aw_addr, w_data, w_strb,
    output ar_ready, r_valid, r_data, aw_ready, b_valid
  );

  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar_addr));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    aw_valid && !aw_ready |=> aw_valid && $stable(aw_addr) && $stable(w_data) && $stable(w_strb));
endinterface
