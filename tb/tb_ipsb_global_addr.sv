// tb_ipsb_global_addr - base address table and adder for a 2048-route FIB
// in 16 buckets: Addr_Global must equal the sum of the sizes of all lower
// buckets plus the local address, for every bucket and local addresses 0,
// random and the last slot of the bucket.
module tb_ipsb_global_addr;
  import ipsb_pkg::*;
  localparam int unsigned N = 2048, BI_S = 9, NB = 4;
  localparam int unsigned M = max_bucket_size(N, BI_S, NB);
  localparam int unsigned LAW = clog2_min1(M);
  localparam int unsigned GAW = clog2_min1(total_slots(N, BI_S, NB));
  logic [NB-1:0]  bid;
  logic [LAW-1:0] addr_local;
  logic [GAW-1:0] addr_global;
  int checks = 0, failures = 0;

  ipsb_global_addr #(.N(N), .BI_S(BI_S), .NB(NB)) dut (.*);

  task automatic run(input int unsigned b, input int unsigned a, input int unsigned base);
    bid = NB'(b); addr_local = LAW'(a);
    #1;
    checks++;
    if (addr_global != GAW'(base + a)) begin
      failures++;
      $display("FAIL b=%0d local=%0d got %0d exp %0d", b, a, addr_global, base + a);
    end
  endtask

  initial begin
    int unsigned base = 0, sz;
    route_t r;
    ip_t bb;
    for (int unsigned b = 0; b < 2**NB; b++) begin
      sz = 0;
      // size of the bucket: its long routes plus every short route that
      // covers the bucket
      sz = long_count(N, BI_S, NB, b);
      for (int unsigned l = 0; l < bi_end(BI_S, NB); l++)
        for (int unsigned t = 0; t < short_count(N, l); t++) begin
          r  = short_route(BI_S, NB, l, t);
          bb = ip_t'(b) << (IP_W - (BI_S - 1) - NB);
          if ((r.ip & bid_mask(BI_S, NB)) == (bb & len_mask(l))) sz++;
        end
      run(b, 0, base);
      run(b, $urandom_range(sz - 1), base);
      run(b, sz - 1, base);
      base += sz;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
