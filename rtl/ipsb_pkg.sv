// ipsb_pkg - shared constants, types and the hard-coded forwarding table
// (FIB) of the IP-Split-Bucket address lookup engine.
//
// The engine keeps no FIB in memory: every route becomes a constant AND
// term in the comparator block, so the table has to be known when the
// design is elaborated. A real deployment regenerates these constants from
// its routing table and re-synthesizes. This package stands in for that
// step with a deterministic synthetic IPv4 FIB of any size N, built by
// closed-form functions so that no file has to be read:
//
//  * Prefix lengths follow a fixed weight table shaped like a real backbone
//    table (about half of all routes are /24, a few per mille shorter than
//    /16, a default route 0.0.0.0/0).
//  * The bucket identifier is the n-bit field of the address starting at
//    bit BI_S, bits numbered 1..32 from the most significant end.
//  * A "long" route (length >= BI_E = BI_S+n-1) lies in exactly one bucket.
//    Bucket b holds L(b) long routes; L(b) varies by up to +/-5/8 of the
//    mean, opposite in the two buckets of a pair (2i, 2i+1), so the buckets
//    are unequal, as in a real table, while their sum stays N minus the
//    short routes. Inside a bucket the long routes are already ordered by
//    decreasing length.
//  * A "short" route (length < BI_E) covers c = len-(BI_S-1) bits of the
//    identifier (c >= 0) and is expanded into 2^(n-c) copies, one in every
//    bucket it covers. Copies are placed after the long routes of a bucket,
//    again by decreasing length, so each bucket stays sorted.
//  * Inside a bucket, long routes j and j+16 share the address bits ahead
//    of the identifier, so shorter routes often contain longer ones.
//  * The next hop of a route is a hash of (masked address, length), so two
//    copies or accidental duplicates of one prefix always agree.
//
// Slot (b, j) is position j of bucket b: first the L(b) long routes, then
// for each short length, longest first, the copies of that length. The
// global address of a slot is BaseAddr_b + j with BaseAddr_b the sum of the
// sizes of buckets 0..b-1.
// Functions are cheap per call (no loop over the whole table) so that they
// can be evaluated per slot both at elaboration and in simulation.
package ipsb_pkg;

  localparam int unsigned IP_W = 32;      // IPv4 address width
  localparam int unsigned LEN_W = 6;      // prefix length 0..32

  typedef logic [IP_W-1:0] ip_t;

  typedef struct packed {
    ip_t              ip;   // prefix value, bits beyond len are zero
    logic [LEN_W-1:0] len;  // prefix length
  } route_t;

  // ---------------------------------------------------------------------
  // Helpers
  // ---------------------------------------------------------------------
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x ^ 32'h9e37_79b9;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  function automatic ip_t len_mask(input int unsigned len);
    return (len == 0) ? '0 : ~(ip_t'((64'd1 << (IP_W - len)) - 1));
  endfunction

  // Mask of the bucket identifier field: bits bis..bis+nb-1 counted from 1
  // at the most significant end.
  function automatic ip_t bid_mask(input int unsigned bis, input int unsigned nb);
    return len_mask(bis - 1 + nb) & ~len_mask(bis - 1);
  endfunction

  function automatic int unsigned bid_of(input ip_t ip, input int unsigned bis,
                                         input int unsigned nb);
    return int'((ip >> (IP_W - (bis - 1 + nb))) & ((32'd1 << nb) - 1));
  endfunction

  // Relative weight of each prefix length (per 100 000 routes).
  function automatic int unsigned len_weight(input int unsigned len);
    case (len)
      8: return 3;      9: return 5;      10: return 10;    11: return 20;
      12: return 50;    13: return 90;    14: return 160;   15: return 340;
      16: return 2200;  17: return 1300;  18: return 2300;  19: return 4700;
      20: return 6600;  21: return 7100;  22: return 10900; 23: return 9600;
      24: return 53900; 25: return 300;   26: return 200;   27: return 100;
      28: return 50;    29: return 50;    30: return 50;    31: return 10;
      32: return 160;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned bi_end(input int unsigned bis, input int unsigned nb);
    return bis - 1 + nb;
  endfunction

  // ---------------------------------------------------------------------
  // Short routes (length < BI_E): count per length, bucket coverage
  // ---------------------------------------------------------------------
  function automatic int unsigned short_count(input int unsigned n_fib,
                                              input int unsigned len);
    longint unsigned c;
    if (len == 0) return 1;                    // default route
    if (len_weight(len) == 0) return 0;
    c = longint'(n_fib) * len_weight(len) / 100000;
    return (c == 0) ? 1 : int'(c);
  endfunction

  // Identifier bits covered by a short route of this length.
  function automatic int unsigned short_cov(input int unsigned len, input int unsigned bis,
                                            input int unsigned nb);
    if (len + 1 <= bis) return 0;
    return (len - (bis - 1) > nb) ? nb : len - (bis - 1);
  endfunction

  function automatic int unsigned short_total(input int unsigned n_fib, input int unsigned bis,
                                              input int unsigned nb);
    int unsigned s = 0;
    for (int unsigned l = 0; l < bi_end(bis, nb); l++) s += short_count(n_fib, l);
    return s;
  endfunction

  // Copies of length-len short routes that fall in bucket b.
  function automatic int unsigned short_in_bucket(input int unsigned n_fib, input int unsigned bis,
                                                  input int unsigned nb, input int unsigned len,
                                                  input int unsigned b);
    int unsigned c, v, cnt;
    c   = short_cov(len, bis, nb);
    v   = b >> (nb - c);
    cnt = short_count(n_fib, len);
    if (v >= cnt) return 0;
    return (cnt - 1 - v) / (32'd1 << c) + 1;
  endfunction

  // Short route number t of length len.
  function automatic route_t short_route(input int unsigned bis, input int unsigned nb,
                                         input int unsigned len, input int unsigned t);
    route_t r;
    int unsigned c;
    ip_t v;
    c = short_cov(len, bis, nb);
    v = mix32(32'(t) ^ (32'(len) << 24) ^ 32'h5a5a_0000);
    if (c > 0) begin
      v &= ~bid_mask(bis, nb);
      v |= ip_t'(t & ((32'd1 << c) - 1)) << (IP_W - (bis - 1) - nb + (nb - c));
    end
    r.ip  = v & len_mask(len);
    r.len = LEN_W'(len);
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Long routes (length >= BI_E): per-bucket count and order
  // ---------------------------------------------------------------------
  function automatic int unsigned long_avg(input int unsigned n_fib, input int unsigned bis,
                                           input int unsigned nb);
    return (n_fib - short_total(n_fib, bis, nb)) >> nb;
  endfunction

  function automatic int unsigned long_count(input int unsigned n_fib, input int unsigned bis,
                                             input int unsigned nb, input int unsigned b);
    int unsigned avg, d, nl;
    nl  = n_fib - short_total(n_fib, bis, nb);
    avg = nl >> nb;
    d   = mix32(32'(b >> 1) ^ 32'h00c0_ffee) % (avg * 5 / 8 + 1);
    // the remainder of the division goes one route each to the first buckets
    if (b < nl - (avg << nb)) avg++;
    return ((b & 1) != 0) ? avg - d : avg + d;
  endfunction

  function automatic int unsigned long_weight_sum(input int unsigned bis, input int unsigned nb);
    int unsigned s = 0;
    for (int unsigned l = bi_end(bis, nb); l <= IP_W; l++) s += len_weight(l);
    return s;
  endfunction

  // Length of long route j of a bucket holding lc long routes.
  function automatic int unsigned long_len(input int unsigned bis, input int unsigned nb,
                                           input int unsigned lc, input int unsigned j);
    longint unsigned u, acc;
    u   = longint'(j) * long_weight_sum(bis, nb) / longint'(lc);
    acc = 0;
    for (int l = IP_W; l >= int'(bi_end(bis, nb)); l--) begin
      acc += longint'(len_weight(l));
      if (u < acc) return l;
    end
    return bi_end(bis, nb);
  endfunction

  function automatic route_t long_route(input int unsigned n_fib, input int unsigned bis,
                                        input int unsigned nb, input int unsigned b,
                                        input int unsigned j);
    return long_route_lc(bis, nb, long_count(n_fib, bis, nb, b), b, j);
  endfunction

  // Same, with the bucket's long-route count lc already known.
  function automatic route_t long_route_lc(input int unsigned bis, input int unsigned nb,
                                           input int unsigned lc, input int unsigned b,
                                           input int unsigned j);
    route_t r;
    int unsigned len;
    len = long_len(bis, nb, lc, j);
    r.ip  = long_ip(bis, nb, b, j, len);
    r.len = LEN_W'(len);
    return r;
  endfunction

  // First long-route index of bucket with lc long routes whose length is
  // below the lengths whose weights add up to acc: ceil(acc * lc / sum).
  function automatic int unsigned long_first(input longint unsigned acc, input int unsigned lc,
                                             input int unsigned wsum);
    return int'((acc * longint'(lc) + longint'(wsum) - 1) / longint'(wsum));
  endfunction

  // Address of long route j (length len) of bucket b.
  function automatic ip_t long_ip(input int unsigned bis, input int unsigned nb,
                                  input int unsigned b, input int unsigned j,
                                  input int unsigned len);
    ip_t v;
    // Bits ahead of the identifier repeat every 16 routes of a bucket, so
    // shorter routes of a bucket often contain longer ones (nested prefixes).
    v   = (mix32(32'(j) ^ (32'(b) << 20) ^ 32'h0123_0000) & ~len_mask(bis - 1))
        | (mix32(32'(j % 16) ^ (32'(b) << 20) ^ 32'h0456_0000) & len_mask(bis - 1));
    v   = (v & ~bid_mask(bis, nb)) | (ip_t'(b) << (IP_W - (bis - 1) - nb));
    return v & len_mask(len);
  endfunction

  // ---------------------------------------------------------------------
  // Buckets and slots
  // ---------------------------------------------------------------------
  function automatic int unsigned bucket_size(input int unsigned n_fib, input int unsigned bis,
                                              input int unsigned nb, input int unsigned b);
    int unsigned s;
    s = long_count(n_fib, bis, nb, b);
    for (int unsigned l = 0; l < bi_end(bis, nb); l++) s += short_in_bucket(n_fib, bis, nb, l, b);
    return s;
  endfunction

  // m: the size of the largest bucket.
  function automatic int unsigned max_bucket_size(input int unsigned n_fib, input int unsigned bis,
                                                  input int unsigned nb);
    int unsigned m = 1;
    for (int unsigned b = 0; b < (32'd1 << nb); b++)
      if (bucket_size(n_fib, bis, nb, b) > m) m = bucket_size(n_fib, bis, nb, b);
    return m;
  endfunction

  // N + E: slots over all buckets, short routes counted once per copy.
  function automatic int unsigned total_slots(input int unsigned n_fib, input int unsigned bis,
                                              input int unsigned nb);
    int unsigned s = 0;
    for (int unsigned b = 0; b < (32'd1 << nb); b++) s += bucket_size(n_fib, bis, nb, b);
    return s;
  endfunction

  // Route number i of length l as copied into bucket b (i < short_in_bucket).
  function automatic route_t short_route_in(input int unsigned bis, input int unsigned nb,
                                            input int unsigned l, input int unsigned b,
                                            input int unsigned i);
    int unsigned c;
    c = short_cov(l, bis, nb);
    return short_route(bis, nb, l, (b >> (nb - c)) + i * (32'd1 << c));
  endfunction

  // Next-hop information of a route.
  function automatic logic [31:0] route_nhi(input route_t r);
    return mix32(r.ip ^ (32'(r.len) * 32'h0101_0101) ^ 32'h7777_0000);
  endfunction

  function automatic int unsigned clog2_min1(input int unsigned x);
    return (x <= 2) ? 1 : $clog2(x);
  endfunction

endpackage
