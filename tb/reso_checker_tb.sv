// reso_checker_tb: self-checking test of the RESO decoder and self-check.
// For every input x, a fault-free core gives res_act = x and
// res_shf = x << 1; the check must pass exactly when no bit is lost by the
// shift. Stuck bits on either result, and random pairs, are checked against
// the reference ((res_shf >> 1) == res_act) computed here.
module reso_checker_tb;
  localparam int W = 8;
  localparam int K = 1;
  logic [W-1:0] res_act, res_shf, res_dec;
  logic         ok;
  int checks = 0, failures = 0;

  reso_checker #(.W(W), .K(K)) dut (
    .res_act(res_act), .res_shf(res_shf), .res_dec(res_dec), .ok(ok));

  task automatic check(input logic exp_ok);
    logic [W-1:0] exp_dec;
    #1;
    exp_dec = {1'b0, res_shf[W-1:1]};
    checks++;
    if (ok !== exp_ok || res_dec !== exp_dec) begin
      failures++;
      $display("FAIL act=%h shf=%h ok=%b exp=%b dec=%h exp=%h",
               res_act, res_shf, ok, exp_ok, res_dec, exp_dec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fault free: passes for x < 2**(W-1), fails when the MSB is shifted out
    for (int x = 0; x < 256; x++) begin
      res_act = W'(x); res_shf = W'(x << K);
      check(x < 128);
    end
    // the figure's case: input 3, core with bit 0 stuck at 0
    res_act = 8'd2; res_shf = 8'd6; check(1'b0);
    res_act = 8'd3; res_shf = 8'd6; check(1'b1);
    // single stuck bit on the actual result of a fault-free pair
    for (int x = 0; x < 128; x++)
      for (int k = 0; k < W; k++) begin
        res_act = W'(x) ^ (W'(1) << k); res_shf = W'(x << K);
        check(1'b0);
      end
    for (int i = 0; i < 2000; i++) begin
      res_act = W'($urandom); res_shf = W'($urandom);
      check((res_shf >> K) == res_act);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
