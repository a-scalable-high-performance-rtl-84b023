// ipsb_ale - IP-Split-Bucket address lookup engine (top).
//
// Longest-prefix-match lookup of IPv4 destination addresses against a
// forwarding table (FIB) that is compiled into logic rather than stored in
// a memory. The address is cut into K-bit segments that are fully decoded
// once (decoder block); every route is a constant AND over decoder outputs
// and a few raw bits (comparator block). The routes are split into 2^n
// buckets by an n-bit field of the address, the bucket identifier, so only
// one bucket's results need a priority encoder, which keeps that encoder
// at the size m of the largest bucket instead of the whole FIB. Inside a
// bucket the routes are sorted by decreasing prefix length, so the first
// match is the longest one. Its global address selects the next hop.
//
// Pipeline, one lookup accepted per clock, result six cycles later:
//   1 decoder block      2 comparator block    3 bucket multiplexer
//   4 priority encoder   5 base address adder  6 next-hop table
// in_valid is carried along with each address; out_valid marks results.
// out_found is 0 only if no route (not even a default route) matched.
// out_addr is the global address of the matching FIB slot.
//
// Defaults: N = 524,287 routes, k = 8 (v = 4 segments), bucket identifier
// bits 9..16 (BI_S = 9, n = 8, 256 buckets), 8-bit next hop, as in the
// original design's main configuration. The FIB itself is the synthetic table of
// ipsb_pkg; asynchronous active-low reset of the valid bits is this
// design's own choice.
module ipsb_ale
  import ipsb_pkg::*;
#(
  parameter int unsigned N     = 524287,    // FIB size
  parameter int unsigned K     = 8,         // decoder size k
  parameter int unsigned BI_S  = 9,         // first identifier bit (1 = MSB)
  parameter int unsigned NB    = 8,         // identifier width n
  parameter int unsigned NHI_W = 8,         // next-hop width
  localparam int unsigned V    = IP_W / K,
  localparam int unsigned M    = max_bucket_size(N, BI_S, NB),
  localparam int unsigned GAW  = clog2_min1(total_slots(N, BI_S, NB))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  ip_t              in_ip,           // destination address
  output logic             out_valid,
  output logic             out_found,
  output logic [NHI_W-1:0] out_nhi,         // next hop of the longest match
  output logic [GAW-1:0]   out_addr         // global address of that match
);
  logic                   v1, v2, v5, f5;
  ip_t                    ip1, ip2;
  logic [V-1:0][2**K-1:0] dec1;
  logic [M-1:0]           hits [2**NB];
  logic [GAW-1:0]         a5, a6;

  ipsb_decoder_block #(.K(K), .BI_S(BI_S), .NB(NB)) u_db (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ip(in_ip),
    .valid_q(v1), .ip_q(ip1), .dec_q(dec1)
  );

  ipsb_comparator_block #(.N(N), .K(K), .BI_S(BI_S), .NB(NB), .M(M)) u_cb (
    .clk(clk), .rst_n(rst_n), .valid_q(v1), .ip_q(ip1), .dec_q(dec1),
    .valid_q2(v2), .ip_q2(ip2), .hits(hits)
  );

  ipsb_peb #(.N(N), .BI_S(BI_S), .NB(NB)) u_peb (
    .clk(clk), .rst_n(rst_n), .valid_q2(v2), .ip_q2(ip2), .hits(hits),
    .valid_q5(v5), .found_q5(f5), .addr_q5(a5)
  );

  ipsb_nhib #(.N(N), .BI_S(BI_S), .NB(NB), .NHI_W(NHI_W)) u_nhib (
    .clk(clk), .rst_n(rst_n), .valid(v5), .found(f5), .addr(a5),
    .valid_q(out_valid), .found_q(out_found), .nhi_q(out_nhi)
  );

  always_ff @(posedge clk) a6 <= a5;
  assign out_addr = a6;
endmodule
