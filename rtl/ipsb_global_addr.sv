// ipsb_global_addr - base address table and adder of the priority encoder
// block.
//
// Turns the position of a match inside its bucket (Addr_Local) into its
// position in the whole expanded FIB (Addr_Global):
//     Addr_Global = Addr_Local + BaseAddr_b,
//     BaseAddr_0 = 0, BaseAddr_b = size(bucket 0) + ... + size(bucket b-1).
// The base address table is a constant array computed from the FIB at
// elaboration time. Combinational; the priority encoder block registers the
// sum.
module ipsb_global_addr
  import ipsb_pkg::*;
#(
  parameter int unsigned N    = 524287,
  parameter int unsigned BI_S = 9,
  parameter int unsigned NB   = 8,
  localparam int unsigned M   = max_bucket_size(N, BI_S, NB),
  localparam int unsigned LAW = clog2_min1(M),
  localparam int unsigned GAW = clog2_min1(total_slots(N, BI_S, NB))
) (
  input  logic [NB-1:0]  bid,               // bucket of the match
  input  logic [LAW-1:0] addr_local,
  output logic [GAW-1:0] addr_global
);
  typedef logic [2**NB-1:0][GAW-1:0] base_tbl_t;

  function automatic base_tbl_t base_table();
    base_tbl_t   t;
    int unsigned acc = 0;
    for (int unsigned b = 0; b < 2**NB; b++) begin
      t[b] = GAW'(acc);
      acc += bucket_size(N, BI_S, NB, b);
    end
    return t;
  endfunction

  localparam base_tbl_t BASE = base_table();

  assign addr_global = BASE[bid] + GAW'(addr_local);
endmodule
