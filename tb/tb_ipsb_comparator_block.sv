// tb_ipsb_comparator_block - all 4 buckets of a 1024-route FIB. Each
// address is decoded by the bench; one cycle later every slot of every
// bucket must equal the route-versus-address comparison outside the
// identifier bits, and the address and valid bit must follow.
module tb_ipsb_comparator_block;
  import ipsb_pkg::*;
  import ipsb_ref_pkg::*;
  localparam int unsigned N = 1024, BI_S = 9, NB = 2;
  localparam int unsigned M = max_bucket_size(N, BI_S, NB);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_q, valid_q2;
  ip_t ip_q, ip_q2;
  logic [3:0][255:0] dec_q;
  logic [M-1:0] hits [2**NB];
  int checks = 0, failures = 0;

  ipsb_comparator_block #(.N(N), .K(8), .BI_S(BI_S), .NB(NB), .M(M)) dut (.*);

  initial begin
    ip_t ip;
    logic [M-1:0] e;
    route_t r;
    valid_q = 0; ip_q = '0; dec_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ip = draw_ip(N, BI_S, NB, i % 3);
      ip_q = ip; valid_q = (i % 5) != 2;
      for (int s = 0; s < 4; s++) dec_q[s] = 256'd1 << ip[31 - 8*s -: 8];
      dec_q[1] = '0;
      @(posedge clk); #1;
      checks++;
      if (ip_q2 != ip || valid_q2 != valid_q) failures++;
      for (int unsigned b = 0; b < 2**NB; b++) begin
        e = '0;
        for (int unsigned j = 0; j < bucket_size(N, BI_S, NB, b); j++) begin
          r = ref_slot_route(N, BI_S, NB, b, j);
          e[j] = ((ip & len_mask(32'(r.len)) & ~bid_mask(BI_S, NB)) == (r.ip & ~bid_mask(BI_S, NB)));
        end
        checks++;
        if (hits[b] != e) begin
          failures++;
          if (failures < 10) $display("FAIL bucket %0d ip=%h", b, ip);
        end
      end
    end
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
