// ipsb_comparator_block - comparator block (CB), pipeline stage 2.
//
// 2^n comparator buckets working in parallel on the same registered
// address and decoder outputs; bucket b compares against the routes whose
// bucket identifier is b. All buckets produce results every cycle, only the
// one named by the address's own identifier is used by the priority encoder
// block. The address and the valid bit are carried along one stage so that
// the next stage can extract the bucket identifier.
//
// Timing: hits/ip_q2/valid_q2 are registered, one cycle after the decoder
// block. Only the valid bit is reset.
module ipsb_comparator_block
  import ipsb_pkg::*;
#(
  parameter int unsigned N    = 524287,
  parameter int unsigned K    = 8,
  parameter int unsigned BI_S = 9,
  parameter int unsigned NB   = 8,
  parameter int unsigned M    = max_bucket_size(N, BI_S, NB),
  localparam int unsigned V   = IP_W / K
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid_q,
  input  ip_t                    ip_q,
  input  logic [V-1:0][2**K-1:0] dec_q,
  output logic                   valid_q2,
  output ip_t                    ip_q2,
  output logic [M-1:0]           hits [2**NB]   // per bucket, per slot
);
  for (genvar b = 0; b < 2**NB; b++) begin : g_bucket
    ipsb_cbucket #(
      .N(N), .K(K), .BI_S(BI_S), .NB(NB), .M(M)
    ) u_cbucket (
      .clk  (clk),
      .bucket(NB'(b)),
      .ip_q (ip_q),
      .dec_q(dec_q),
      .hit_q(hits[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q2 <= 1'b0;
    else        valid_q2 <= valid_q;
  end

  always_ff @(posedge clk) ip_q2 <= ip_q;
endmodule
