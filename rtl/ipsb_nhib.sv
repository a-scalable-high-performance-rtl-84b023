// ipsb_nhib - next hop information block (NHIB), pipeline stage 6.
//
// A read-only table holding the next-hop information (the output port) of
// every slot of the expanded FIB, in global-address order: bucket 0 first,
// inside a bucket by decreasing prefix length. It is addressed by the
// global match address from the priority encoder block and has a
// registered read. The contents are computed from the FIB in ipsb_pkg
// when simulation or synthesis starts (an initialised array, so a
// synthesis tool may map it to block RAM or to LUTs). When the lookup found
// no match at all the next hop is forced to 0.
//
// Timing: one cycle from addr/found/valid to nhi_q/found_q/valid_q.
module ipsb_nhib
  import ipsb_pkg::*;
#(
  parameter int unsigned N     = 524287,
  parameter int unsigned BI_S  = 9,
  parameter int unsigned NB    = 8,
  parameter int unsigned NHI_W = 8,         // next-hop width (egress port id)
  localparam int unsigned TOTAL = total_slots(N, BI_S, NB),
  localparam int unsigned GAW   = clog2_min1(TOTAL)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             found,
  input  logic [GAW-1:0]   addr,
  output logic             valid_q,
  output logic             found_q,
  output logic [NHI_W-1:0] nhi_q
);
  logic [NHI_W-1:0] rom [TOTAL];

  // Same slot order as the comparator buckets.
  initial begin
    automatic int unsigned g = 0;
    for (int unsigned b = 0; b < 2**NB; b++) begin
      automatic int unsigned lc = long_count(N, BI_S, NB, b);
      for (int unsigned i = 0; i < lc; i++) begin
        rom[g] = NHI_W'(route_nhi(long_route_lc(BI_S, NB, lc, b, i)));
        g++;
      end
      for (int l = int'(bi_end(BI_S, NB)) - 1; l >= 0; l--)
        for (int unsigned i = 0; i < short_in_bucket(N, BI_S, NB, l, b); i++) begin
          rom[g] = NHI_W'(route_nhi(short_route_in(BI_S, NB, l, b, i)));
          g++;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= valid;
  end

  always_ff @(posedge clk) begin
    found_q <= found;
    nhi_q   <= (found && addr < GAW'(TOTAL)) ? rom[addr] : '0;
  end
endmodule
