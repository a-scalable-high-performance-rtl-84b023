// tb_ipsb_ale - end-to-end test of the IP-Split-Bucket lookup engine.
//
// Two engines run side by side on the same address stream:
//   A: k = 8, identifier bits 9..12 (n = 4), N = 2048: the identifier lies
//      inside the second segment, which is then compared bit by bit;
//   B: identifier bits 10..12 (n = 3), N = 1024.
// One address enters per clock (full throughput), with a few idle gaps.
// Every result must appear exactly 6 cycles after its address and carry the
// next hop of the longest matching route, as found by the route-by-route
// reference model. The test also counts how often each mechanism was used:
// several routes matching (priority by prefix length), a match decided by
// an expanded short route, the default route, a long route, idle cycles,
// and how many different buckets were read.
module tb_ipsb_ale;
  import ipsb_pkg::*;
  import ipsb_ref_pkg::*;

  localparam int unsigned NA = 2048, BSA = 9,  NBA = 4;
  localparam int unsigned NBB_N = 1024, BSB = 10, NBB = 3;
  localparam int unsigned LAT = 6;
  localparam int unsigned NLOOK = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  ip_t  in_ip;
  logic va, fa, vb, fb;
  logic [7:0] nhia, nhib;
  logic [$clog2(total_slots(NA, BSA, NBA))-1:0]   addra;
  logic [$clog2(total_slots(NBB_N, BSB, NBB))-1:0] addrb;

  ipsb_ale #(.N(NA), .BI_S(BSA), .NB(NBA)) dut_a (
    .clk, .rst_n, .in_valid, .in_ip,
    .out_valid(va), .out_found(fa), .out_nhi(nhia), .out_addr(addra));
  ipsb_ale #(.N(NBB_N), .BI_S(BSB), .NB(NBB)) dut_b (
    .clk, .rst_n, .in_valid, .in_ip,
    .out_valid(vb), .out_found(fb), .out_nhi(nhib), .out_addr(addrb));

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int unsigned t; ref_result_t ra, rb; } exp_t;
  exp_t q[$];

  int n_multi = 0, n_short = 0, n_default = 0, n_long = 0, n_idle = 0, n_buckets = 0;
  bit  seen_bucket [16];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // outputs: compare against the oldest expected result
  always @(posedge clk) if (rst_n) begin
    check(va == vb, "valid of A and B differ");
    if (va) begin
      exp_t e;
      if (q.size() == 0) check(0, "result without a lookup");
      else begin
        e = q.pop_front();
        check(cyc - e.t == LAT, $sformatf("latency %0d", cyc - e.t));
        check(fa == e.ra.found && (!fa || nhia == e.ra.nhi[7:0]),
              $sformatf("A nhi %0d exp %0d", nhia, e.ra.nhi[7:0]));
        check(fb == e.rb.found && (!fb || nhib == e.rb.nhi[7:0]),
              $sformatf("B nhi %0d exp %0d", nhib, e.rb.nhi[7:0]));
        // the global address must name a slot of the winning length
        if (e.ra.nmatch > 1) n_multi++;
        if (e.ra.len == 0) n_default++;
        else if (e.ra.len < BSA - 1 + NBA) n_short++;
        else n_long++;
      end
    end
  end

  initial begin
    ip_t ip;
    in_valid = 0; in_ip = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NLOOK; i++) begin
      @(negedge clk);
      if (i % 97 == 50) begin
        in_valid = 0; n_idle++;
        @(negedge clk);
      end
      ip = draw_ip(NA, BSA, NBA, i % 3);
      if (i % 5 == 4) ip = draw_ip(NBB_N, BSB, NBB, i % 2);
      in_ip = ip; in_valid = 1;
      if (!seen_bucket[bid_of(ip, BSA, NBA)]) n_buckets++;
      seen_bucket[bid_of(ip, BSA, NBA)] = 1;
      q.push_back('{t: cyc, ra: ref_lookup(NA, BSA, NBA, ip),
                    rb: ref_lookup(NBB_N, BSB, NBB, ip)});
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    check(q.size() == 0, "lookups without a result");
    $display("mechanisms: multi-match %0d, short/expanded %0d, default %0d, long %0d, idle %0d, buckets %0d",
             n_multi, n_short, n_default, n_long, n_idle, n_buckets);
    check(n_multi > 0, "no lookup with several matching routes");
    check(n_short > 0, "no lookup decided by an expanded short route");
    check(n_default > 0, "no lookup falling back to the default route");
    check(n_long > 0, "no lookup decided by a long route");
    check(n_idle > 0, "no idle cycle");
    check(n_buckets == 16, "not every bucket exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NLOOK * 2 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
