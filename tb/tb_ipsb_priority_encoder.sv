// tb_ipsb_priority_encoder - 37-input priority encoder against a search
// from index 0 upward, on random inputs of varying density, single bits and
// all-zero.
module tb_ipsb_priority_encoder;
  localparam int M = 37;
  logic [M-1:0] req;
  logic [5:0]   idx;
  logic         found;
  int checks = 0, failures = 0;

  ipsb_priority_encoder #(.M(M)) dut (.req, .idx, .found);

  task automatic run(input logic [M-1:0] r);
    int exp_i;
    req = r;
    #1;
    exp_i = -1;
    for (int i = 0; i < M; i++) if (r[i] && exp_i < 0) exp_i = i;
    checks++;
    if (found != (exp_i >= 0) || (exp_i >= 0 && idx != 6'(exp_i))) begin
      failures++;
      $display("FAIL req=%h idx=%0d found=%0d exp=%0d", r, idx, found, exp_i);
    end
  endtask

  initial begin
    run('0);
    for (int i = 0; i < M; i++) run(M'(1) << i);
    for (int i = 0; i < 300; i++) begin
      logic [M-1:0] r;
      r = {$urandom(), $urandom()};
      for (int k = 0; k < i % 4; k++) r &= M'({$urandom(), $urandom()});
      run(r);
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
