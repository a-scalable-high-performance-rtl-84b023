// tb_ipsb_cbucket - one comparator bucket (bucket 2 of 4, N = 1024). The
// bench decodes each address itself, drives the registered inputs and,
// one cycle later, checks every slot: it must be 1 exactly when the slot's
// route matches the address outside the identifier bits. For addresses
// of this bucket, the first set slot must also be a longest match.
module tb_ipsb_cbucket;
  import ipsb_pkg::*;
  import ipsb_ref_pkg::*;
  localparam int unsigned N = 1024, BI_S = 9, NB = 2, BKT = 2;
  localparam int unsigned M = max_bucket_size(N, BI_S, NB);
  logic clk = 0;
  always #5 clk = ~clk;
  ip_t ip_q;
  logic [3:0][255:0] dec_q;
  logic [M-1:0] hit_q;
  int checks = 0, failures = 0, n_hits = 0;

  ipsb_cbucket #(.N(N), .K(8), .BI_S(BI_S), .NB(NB), .M(M)) dut (
    .clk, .bucket(NB'(BKT)), .ip_q, .dec_q, .hit_q);

  initial begin
    ip_t ip;
    logic [M-1:0] e;
    route_t r;
    ref_result_t rr;
    int first;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ip = draw_ip(N, BI_S, NB, i % 3);
      if (i % 2 == 0) ip = (ip & ~bid_mask(BI_S, NB)) | (ip_t'(BKT) << (IP_W - (BI_S - 1) - NB));
      ip_q = ip;
      for (int s = 0; s < 4; s++) dec_q[s] = 256'd1 << ip[31 - 8*s -: 8];
      dec_q[1] = '0;   // identifier segment: no decoder
      e = '0;
      for (int unsigned j = 0; j < bucket_size(N, BI_S, NB, BKT); j++) begin
        r = ref_slot_route(N, BI_S, NB, BKT, j);
        e[j] = ((ip & len_mask(32'(r.len)) & ~bid_mask(BI_S, NB)) == (r.ip & ~bid_mask(BI_S, NB)));
      end
      @(posedge clk); #1;
      checks++;
      if (hit_q != e) begin
        failures++;
        if (failures < 10) $display("FAIL ip=%h", ip);
      end
      if (bid_of(ip, BI_S, NB) == BKT) begin
        rr = ref_lookup(N, BI_S, NB, ip);
        first = -1;
        for (int j = int'(M) - 1; j >= 0; j--) if (hit_q[j]) first = j;
        checks++;
        if (first < 0 || ref_slot_route(N, BI_S, NB, BKT, first).len != rr.len) begin
          failures++;
          $display("FAIL longest match ip=%h", ip);
        end
        n_hits++;
      end
    end
    checks++;
    if (n_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
