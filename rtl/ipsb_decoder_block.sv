// ipsb_decoder_block - decoder block (DB), pipeline stage 1.
//
// Splits the 32-bit incoming address into V = 32/K segments of K bits
// (segment 0 holds the most significant bits) and decodes each with its own
// K-to-2^K decoder. A segment whose bits all lie inside the bucket
// identifier, or overlap it, is never compared through a decoder: which
// bucket is read already fixes those bits. Its decoder is left out and its
// outputs are zero; with the default K = 8, BI_S = 9, n = 8 that removes the
// second of the four decoders. The decoded segments and the raw address are
// registered together with a valid bit; the raw address feeds the direct
// comparisons of partial segments and the bucket identifier.
//
// Timing: one cycle from in_ip/in_valid to dec/ip_q/valid_q. Only valid_q
// is reset.
module ipsb_decoder_block
  import ipsb_pkg::*;
#(
  parameter int unsigned K    = 8,          // decoder size k
  parameter int unsigned BI_S = 9,          // first identifier bit (1 = MSB)
  parameter int unsigned NB   = 8,          // identifier width n
  localparam int unsigned V   = IP_W / K    // number of segments v
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  ip_t                    in_ip,
  output logic                   valid_q,
  output ip_t                    ip_q,
  output logic [V-1:0][2**K-1:0] dec_q      // registered one-hot segments
);
  initial assert (IP_W % K == 0) else $error("K must divide 32");

  localparam ip_t BMASK = bid_mask(BI_S, NB);

  // Segment s is decoded only when no identifier bit falls inside it.
  function automatic bit seg_decoded(input int unsigned s);
    return (BMASK & (ip_t'((64'd1 << K) - 1) << (IP_W - (s + 1) * K))) == '0;
  endfunction

  logic [V-1:0][2**K-1:0] dec_d;

  for (genvar s = 0; s < V; s++) begin : g_seg
    if (seg_decoded(s)) begin : g_dec
      ipsb_decoder #(.K(K)) u_dec (
        .seg   (in_ip[IP_W-1-s*K -: K]),
        .onehot(dec_d[s])
      );
    end else begin : g_nodec
      assign dec_d[s] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    ip_q  <= in_ip;
    dec_q <= dec_d;
  end
endmodule
