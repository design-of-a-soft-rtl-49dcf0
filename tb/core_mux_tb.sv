// core_mux_tb: self-checking test of the 2:1 core output multiplexer.
module core_mux_tb;
  import reso_pkg::*;
  localparam int W = 8;
  core_sel_e    sel;
  logic [W-1:0] d1, d2, y;
  int checks = 0, failures = 0;

  core_mux #(.W(W)) dut (.sel(sel), .d1(d1), .d2(d2), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      d1  = W'($urandom);
      d2  = W'($urandom);
      sel = ($urandom_range(0, 1) == 1) ? CORE2 : CORE1;
      #1;
      checks++;
      if (y !== ((sel == CORE2) ? d2 : d1)) begin
        failures++;
        $display("FAIL sel=%s d1=%h d2=%h y=%h", sel.name(), d1, d2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
