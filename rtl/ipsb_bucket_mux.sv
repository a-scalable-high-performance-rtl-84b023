// ipsb_bucket_mux - m x 2^n bucket multiplexer of the priority encoder block.
//
// Passes on the m comparison results of the comparator bucket named by the
// bucket identifier of the incoming address. Combinational; the priority
// encoder block registers its output.
module ipsb_bucket_mux #(
  parameter int unsigned M  = 4,            // results per bucket (m)
  parameter int unsigned NB = 2             // identifier width n
) (
  input  logic [M-1:0]  hits [2**NB],
  input  logic [NB-1:0] bid,                // bucket identifier
  output logic [M-1:0]  sel
);
  assign sel = hits[bid];
endmodule
