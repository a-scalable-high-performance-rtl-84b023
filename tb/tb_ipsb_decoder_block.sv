// tb_ipsb_decoder_block - decoder block with the default layout (k = 8,
// identifier bits 9..16). Random addresses enter every cycle; one cycle
// later each decoded segment must be one-hot at the segment's value, the
// identifier segment must have no decoder (all zero), and the raw address
// and valid bit must follow.
module tb_ipsb_decoder_block;
  import ipsb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, valid_q;
  ip_t  in_ip, ip_q;
  logic [3:0][255:0] dec_q;
  int checks = 0, failures = 0;

  ipsb_decoder_block #(.K(8), .BI_S(9), .NB(8)) dut (.*);

  ip_t  prev_ip;
  logic prev_v;

  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    in_valid = 0; in_ip = '0;
    repeat (2) @(posedge clk);
    #1 check(valid_q == 0, "valid during reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_ip = $urandom(); in_valid = (i % 7) != 3;
      prev_ip = in_ip; prev_v = in_valid;
      @(posedge clk); #1;
      check(valid_q == prev_v, "valid");
      check(ip_q == prev_ip, "ip");
      check(dec_q[0] == (256'd1 << prev_ip[31:24]), "segment 0");
      check(dec_q[1] == '0, "identifier segment decoded");
      check(dec_q[2] == (256'd1 << prev_ip[15:8]), "segment 2");
      check(dec_q[3] == (256'd1 << prev_ip[7:0]), "segment 3");
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
