// ipsb_decoder - k-to-2^k binary decoder of the IP-Split-Bucket engine.
//
// Expands one k-bit segment of the incoming address into its fully decoded
// one-hot form: output bit i is 1 exactly when the segment equals i. Every
// AND term of the comparator block that needs to test this whole segment
// against a constant then reads a single decoder output instead of
// repeating a k-bit comparison, which is how equal segments shared by many
// routes are compared only once. Purely combinational; the decoder block
// registers the outputs.
module ipsb_decoder #(
  parameter int unsigned K = 8              // segment width (k)
) (
  input  logic [K-1:0]      seg,            // segment of the incoming address
  output logic [2**K-1:0]   onehot          // onehot[i] = (seg == i)
);
  always_comb begin
    onehot = '0;
    onehot[seg] = 1'b1;
  end
endmodule
