// ipsb_cbucket - one comparator bucket (CBucket) of the comparator block.
//
// Bucket B holds every FIB route whose bucket identifier equals B (short
// routes appear here once for each bucket they cover). Each route is one
// hard-coded AND term; term j is 1 when the registered incoming address
// matches route j of the bucket. Routes are ordered by decreasing prefix
// length, so the lowest matching j is the longest prefix match.
//
// Building one term from a route of length len: every K-bit segment that
// lies wholly inside the prefix contributes one input, the decoder output
// selected by the route's value of that segment; the len mod K trailing
// bits of a segment the prefix only partly covers are compared directly
// with the raw address bits. This is the AND size floor(len/K) + len mod K
// of the architecture. Bits of the bucket identifier are not compared at all,
// since only the bucket named by the identifier is read later.
//
// The routes come from ipsb_pkg. The bucket number is an input that the
// comparator block ties to a constant, so that all 2^n buckets share one
// module body; once the hierarchy is flattened, that constant and the
// constant routes reduce the loop below to nothing but AND gates. Slots
// beyond the bucket's size (up to the common width M) are 0.
//
// Timing: the terms are registered (pipeline stage 2), one cycle after the
// decoder block's registers.
module ipsb_cbucket
  import ipsb_pkg::*;
#(
  parameter int unsigned N    = 524287,     // FIB size (routes before expansion)
  parameter int unsigned K    = 8,          // decoder size k
  parameter int unsigned BI_S = 9,          // first identifier bit (1 = MSB)
  parameter int unsigned NB   = 8,          // identifier width n
  parameter int unsigned M    = max_bucket_size(N, BI_S, NB),  // output width m
  localparam int unsigned V   = IP_W / K
) (
  input  logic                   clk,
  input  logic [NB-1:0]          bucket,    // this bucket's number (constant)
  input  ip_t                    ip_q,      // registered incoming address
  input  logic [V-1:0][2**K-1:0] dec_q,     // registered decoder outputs
  output logic [M-1:0]           hit_q      // per-slot match, slot 0 = longest
);
  localparam ip_t         BMASK = bid_mask(BI_S, NB);
  localparam ip_t         SEGM  = ip_t'((64'd1 << K) - 1);

  // One AND term: decoder outputs for whole segments, direct compare for
  // the trailing partial segment.
  function automatic logic and_term(input route_t r, input ip_t ip,
                                    input logic [V-1:0][2**K-1:0] dec);
    ip_t cmp, sm;
    int unsigned sh;
    logic t;
    cmp = len_mask(32'(r.len)) & ~BMASK;
    t   = 1'b1;
    for (int unsigned s = 0; s < V; s++) begin
      sh = IP_W - (s + 1) * K;
      sm = (cmp >> sh) & SEGM;
      if (sm == SEGM)
        t &= dec[s][(r.ip >> sh) & SEGM];
      else if (sm != '0)
        t &= (((ip ^ r.ip) >> sh) & sm) == '0;
    end
    return t;
  endfunction

  logic [M-1:0] hit_d;

  localparam int unsigned BIE = bi_end(BI_S, NB);
  localparam int unsigned LWS = long_weight_sum(BI_S, NB);

  // Walk the bucket in slot order: long routes by decreasing length, then
  // the short-route copies by decreasing length. Long routes of length l
  // occupy indices [long_first(acc before l), long_first(acc after l)).
  // The slot count never exceeds M.
  always_comb begin
    int unsigned j, lc, lo, hi;
    longint unsigned acc;
    hit_d = '0;
    lc  = long_count(N, BI_S, NB, 32'(bucket));
    acc = 0;
    for (int l = IP_W; l >= int'(BIE); l--) begin
      lo   = long_first(acc, lc, LWS);
      acc += longint'(len_weight(l));
      hi   = long_first(acc, lc, LWS);
      for (int unsigned i = lo; i < hi; i++)
        hit_d[i] = and_term('{ip: long_ip(BI_S, NB, 32'(bucket), i, l), len: LEN_W'(l)},
                            ip_q, dec_q);
    end
    j = lc;
    for (int l = int'(BIE) - 1; l >= 0; l--)
      for (int unsigned i = 0; i < short_in_bucket(N, BI_S, NB, l, 32'(bucket)); i++) begin
        hit_d[j] = and_term(short_route_in(BI_S, NB, l, 32'(bucket), i), ip_q, dec_q);
        j++;
      end
  end

  always_ff @(posedge clk) hit_q <= hit_d;
endmodule
