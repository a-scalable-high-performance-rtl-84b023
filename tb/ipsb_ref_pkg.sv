// ipsb_ref_pkg - reference longest-prefix-match model for the testbenches.
//
// Searches the route list of the synthetic FIB of ipsb_pkg one route at a
// time, without decoders, buckets, expansion or sorting, and returns the
// longest matching route. It also draws test addresses: addresses inside a
// random long route, inside a random short route, or fully random.
package ipsb_ref_pkg;
  import ipsb_pkg::*;

  typedef struct {
    bit          found;
    int unsigned len;        // length of the longest match
    logic [31:0] nhi;        // its next hop, full hash width
    int unsigned nmatch;     // how many routes matched
  } ref_result_t;

  function automatic bit route_hit(input route_t r, input ip_t ip);
    return ((ip & len_mask(32'(r.len))) == r.ip);
  endfunction

  function automatic ref_result_t ref_lookup(input int unsigned n, input int unsigned bis,
                                             input int unsigned nb, input ip_t ip);
    ref_result_t res;
    route_t r;
    res.found = 0; res.len = 0; res.nhi = 0; res.nmatch = 0;
    for (int unsigned bb = 0; bb < (32'd1 << nb); bb++) begin
      for (int unsigned j = 0; j < long_count(n, bis, nb, bb); j++) begin
        r = long_route(n, bis, nb, bb, j);
        if (route_hit(r, ip)) begin
          res.nmatch++;
          if (!res.found || r.len > res.len) begin
            res.found = 1; res.len = r.len; res.nhi = route_nhi(r);
          end
        end
      end
    end
    for (int unsigned l = 0; l < bi_end(bis, nb); l++)
      for (int unsigned t = 0; t < short_count(n, l); t++) begin
        r = short_route(bis, nb, l, t);
        if (route_hit(r, ip)) begin
          res.nmatch++;
          if (!res.found || r.len > res.len) begin
            res.found = 1; res.len = r.len; res.nhi = route_nhi(r);
          end
        end
      end
    return res;
  endfunction

  // Route in slot j of bucket b, by the slot order of the synthetic FIB:
  // the bucket's long routes, then short-route copies, longest first.
  function automatic route_t ref_slot_route(input int unsigned n, input int unsigned bis,
                                            input int unsigned nb, input int unsigned b,
                                            input int unsigned j);
    int unsigned k;
    if (j < long_count(n, bis, nb, b)) return long_route(n, bis, nb, b, j);
    k = long_count(n, bis, nb, b);
    for (int l = int'(bi_end(bis, nb)) - 1; l >= 0; l--)
      for (int unsigned t = 0; t < short_count(n, l); t++) begin
        route_t r = short_route(bis, nb, l, t);
        if (bid_of(r.ip | (ip_t'(b) << (IP_W - (bis - 1) - nb)) , bis, nb) == b &&
            ((r.ip & bid_mask(bis, nb)) == ((ip_t'(b) << (IP_W - (bis - 1) - nb)) & bid_mask(bis, nb)
                                             & len_mask(32'(r.len))))) begin
          if (k == j) return r;
          k++;
        end
      end
    return '0;
  endfunction

  // kind 0: inside a long route, 1: inside a short route, else random.
  function automatic ip_t draw_ip(input int unsigned n, input int unsigned bis,
                                  input int unsigned nb, input int unsigned kind);
    route_t r;
    int unsigned b, l;
    ip_t rnd;
    rnd = $urandom();
    if (kind == 0) begin
      b = $urandom_range((32'd1 << nb) - 1);
      if (long_count(n, bis, nb, b) == 0) return rnd;
      r = long_route(n, bis, nb, b, $urandom_range(long_count(n, bis, nb, b) - 1));
    end else if (kind == 1) begin
      do l = $urandom_range(bi_end(bis, nb) - 1); while (short_count(n, l) == 0);
      r = short_route(bis, nb, l, $urandom_range(short_count(n, l) - 1));
    end else return rnd;
    return r.ip | (rnd & ~len_mask(32'(r.len)));
  endfunction
endpackage
