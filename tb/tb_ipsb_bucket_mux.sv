// tb_ipsb_bucket_mux - 8 buckets of 12 results: every identifier value must
// select exactly its own bucket's results.
module tb_ipsb_bucket_mux;
  localparam int M = 12, NB = 3;
  logic [M-1:0]  hits [2**NB];
  logic [NB-1:0] bid;
  logic [M-1:0]  sel;
  int checks = 0, failures = 0;

  ipsb_bucket_mux #(.M(M), .NB(NB)) dut (.hits, .bid, .sel);

  initial begin
    for (int it = 0; it < 50; it++) begin
      for (int b = 0; b < 2**NB; b++) hits[b] = M'($urandom());
      for (int b = 0; b < 2**NB; b++) begin
        bid = NB'(b);
        #1;
        checks++;
        if (sel != hits[b]) begin failures++; $display("FAIL bid=%0d", b); end
      end
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
