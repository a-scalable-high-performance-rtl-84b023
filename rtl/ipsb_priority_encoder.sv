// ipsb_priority_encoder - m-input priority encoder of the priority encoder
// block.
//
// The comparison results of a bucket are ordered by decreasing prefix
// length, so the match with the lowest index is the longest prefix match.
// Returns that index (Addr_Local) and whether any input was set. Written as
// a plain loop from the highest index down; combinational.
module ipsb_priority_encoder #(
  parameter int unsigned M  = 8,                        // inputs (m)
  localparam int unsigned AW = (M <= 2) ? 1 : $clog2(M)
) (
  input  logic [M-1:0]  req,
  output logic [AW-1:0] idx,                            // lowest set index
  output logic          found
);
  always_comb begin
    idx   = '0;
    found = 1'b0;
    for (int i = int'(M) - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx   = AW'(i);
        found = 1'b1;
      end
    end
  end
endmodule
