// tb_ipsb_decoder - exhaustive test of the 8-to-256 decoder: every input
// value must give exactly one set output bit, at the position of the value.
module tb_ipsb_decoder;
  logic [7:0]   seg;
  logic [255:0] onehot;
  int checks = 0, failures = 0;

  ipsb_decoder #(.K(8)) dut (.seg, .onehot);

  initial begin
    for (int v = 0; v < 256; v++) begin
      seg = 8'(v);
      #1;
      checks++;
      if (onehot != (256'd1 << v) || $countones(onehot) != 1) begin
        failures++;
        $display("FAIL seg=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
