// tb_ipsb_nhib - next-hop table for a 1024-route FIB in 8 buckets. Every
// global address is read once; the next hop must be that of the route in
// the corresponding slot (bucket by bucket, slots in bucket order), one
// cycle later. Lookups without a match must give next hop 0.
module tb_ipsb_nhib;
  import ipsb_pkg::*;
  import ipsb_ref_pkg::*;
  localparam int unsigned N = 1024, BI_S = 9, NB = 3;
  localparam int unsigned TOTAL = total_slots(N, BI_S, NB);
  localparam int unsigned GAW = clog2_min1(TOTAL);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid, found, valid_q, found_q;
  logic [GAW-1:0] addr;
  logic [7:0] nhi_q;
  int checks = 0, failures = 0;

  ipsb_nhib #(.N(N), .BI_S(BI_S), .NB(NB), .NHI_W(8)) dut (.*);

  initial begin
    int unsigned g = 0;
    logic [7:0] e;
    valid = 0; found = 0; addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int unsigned b = 0; b < 2**NB; b++)
      for (int unsigned j = 0; j < bucket_size(N, BI_S, NB, b); j++) begin
        @(negedge clk);
        valid = 1; found = (g % 11) != 5; addr = GAW'(g);
        e = found ? 8'(route_nhi(ref_slot_route(N, BI_S, NB, b, j))) : 8'd0;
        @(posedge clk); #1;
        checks++;
        if (!valid_q || found_q != found || nhi_q != e) begin
          failures++;
          if (failures < 10) $display("FAIL g=%0d got %0d exp %0d", g, nhi_q, e);
        end
        g++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
