// ipsb_peb - priority encoder block (PEB), pipeline stages 3 to 5.
//
//   stage 3: the bucket multiplexer keeps the m results of the bucket named
//            by the address's identifier field IP(BI_S:BI_E);
//   stage 4: the priority encoder finds the first (longest-prefix) match in
//            it, Addr_Local, and whether there is any match;
//   stage 5: the base address of the bucket is added, giving Addr_Global.
// Each stage ends in a register; the valid bit travels with the data and is
// the only reset register.
module ipsb_peb
  import ipsb_pkg::*;
#(
  parameter int unsigned N    = 524287,
  parameter int unsigned BI_S = 9,
  parameter int unsigned NB   = 8,
  localparam int unsigned M   = max_bucket_size(N, BI_S, NB),
  localparam int unsigned LAW = clog2_min1(M),
  localparam int unsigned GAW = clog2_min1(total_slots(N, BI_S, NB))
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           valid_q2,
  input  ip_t            ip_q2,
  input  logic [M-1:0]   hits [2**NB],
  output logic           valid_q5,
  output logic           found_q5,
  output logic [GAW-1:0] addr_q5            // Addr_Global
);
  // stage 3: bucket multiplexer
  logic [M-1:0]  sel_d, sel_q3;
  logic [NB-1:0] bid_q3;
  logic          valid_q3;

  ipsb_bucket_mux #(.M(M), .NB(NB)) u_mux (
    .hits(hits),
    .bid (NB'(bid_of(ip_q2, BI_S, NB))),
    .sel (sel_d)
  );

  // stage 4: priority encoder
  logic [LAW-1:0] local_d, local_q4;
  logic           found_d, found_q4;
  logic [NB-1:0]  bid_q4;
  logic           valid_q4;

  ipsb_priority_encoder #(.M(M)) u_pe (
    .req  (sel_q3),
    .idx  (local_d),
    .found(found_d)
  );

  // stage 5: base address + local address
  logic [GAW-1:0] global_d;

  ipsb_global_addr #(.N(N), .BI_S(BI_S), .NB(NB)) u_ga (
    .bid        (bid_q4),
    .addr_local (local_q4),
    .addr_global(global_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q3 <= 1'b0;
      valid_q4 <= 1'b0;
      valid_q5 <= 1'b0;
    end else begin
      valid_q3 <= valid_q2;
      valid_q4 <= valid_q3;
      valid_q5 <= valid_q4;
    end
  end

  always_ff @(posedge clk) begin
    sel_q3   <= sel_d;
    bid_q3   <= NB'(bid_of(ip_q2, BI_S, NB));
    local_q4 <= local_d;
    found_q4 <= found_d;
    bid_q4   <= bid_q3;
    addr_q5  <= global_d;
    found_q5 <= found_q4;
  end
endmodule
