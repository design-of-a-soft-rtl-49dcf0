// comparator_tb: self-checking test of the equality comparator.
// Drives equal words, words differing in exactly one bit (every position)
// and random pairs, and checks eq against a reference computed here.
module comparator_tb;
  localparam int W = 8;
  logic [W-1:0] a, b;
  logic         eq;
  int checks = 0, failures = 0;

  comparator #(.W(W)) dut (.a(a), .b(b), .eq(eq));

  task automatic check(input logic exp);
    #1;
    checks++;
    if (eq !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%b exp=%b", a, b, eq, exp);
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
    for (int i = 0; i < 256; i++) begin
      a = W'(i); b = W'(i); check(1'b1);
      for (int k = 0; k < W; k++) begin
        b = a ^ (W'(1) << k); check(1'b0);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = ($urandom_range(0, 3) == 0) ? a : W'($urandom);
      check(a == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
