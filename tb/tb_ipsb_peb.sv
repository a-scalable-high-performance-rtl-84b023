// tb_ipsb_peb - priority encoder block for a 1024-route FIB in 4 buckets.
// Random comparison results are presented every cycle for all buckets
// together with an address; three cycles later the block must report the
// base address of the address's bucket plus the lowest set result of that
// bucket, or no match when that bucket has none.
module tb_ipsb_peb;
  import ipsb_pkg::*;
  localparam int unsigned N = 1024, BI_S = 9, NB = 2;
  localparam int unsigned M = max_bucket_size(N, BI_S, NB);
  localparam int unsigned GAW = clog2_min1(total_slots(N, BI_S, NB));
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_q2, valid_q5, found_q5;
  ip_t ip_q2;
  logic [M-1:0] hits [2**NB];
  logic [GAW-1:0] addr_q5;
  int checks = 0, failures = 0, n_none = 0;

  ipsb_peb #(.N(N), .BI_S(BI_S), .NB(NB)) dut (.*);

  typedef struct { bit f; int unsigned a; bit v; int unsigned t; } e_t;
  e_t q[$];
  e_t eo;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // results are due three clock edges after the edge that takes the inputs
  always @(posedge clk) if (rst_n && q.size() > 0 && cyc - q[0].t == 3) begin
    e_t e;
    e = q.pop_front();
    checks++;
    if (valid_q5 != e.v || found_q5 != e.f || (e.f && addr_q5 != GAW'(e.a))) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d/%0d exp %0d/%0d", found_q5, addr_q5, e.f, e.a);
    end
  end

  initial begin
    int unsigned base [2**NB];
    int unsigned acc = 0;
    for (int unsigned b = 0; b < 2**NB; b++) begin base[b] = acc; acc += bucket_size(N, BI_S, NB, b); end
    valid_q2 = 0; ip_q2 = '0;
    for (int b = 0; b < 2**NB; b++) hits[b] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      e_t e;
      int unsigned b;
      @(negedge clk);
      ip_q2 = $urandom(); valid_q2 = (i % 9) != 4;
      b = bid_of(ip_q2, BI_S, NB);
      for (int k = 0; k < 2**NB; k++) begin
        hits[k] = '0;
        if (i % 6 != 0)
          for (int j = 0; j < int'(bucket_size(N, BI_S, NB, k)); j++)
            hits[k][j] = ($urandom_range(int'(bucket_size(N, BI_S, NB, k))) < 3);
      end
      e.v = valid_q2; e.f = 0; e.a = 0; e.t = cyc;
      for (int j = int'(M) - 1; j >= 0; j--) if (hits[b][j]) begin e.f = 1; e.a = base[b] + j; end
      if (!e.f) n_none++;
      q.push_back(e);
    end
    @(negedge clk); valid_q2 = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_none == 0 || q.size() != 0) failures++;
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
