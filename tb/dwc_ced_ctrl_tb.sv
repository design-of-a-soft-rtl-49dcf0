// dwc_ced_ctrl_tb: self-checking test of the DWC-CED output control.
// Drives match / ok1 / ok2 / mux_out directly and compares the controller
// with a reference written here: the output register follows mux_out with
// one clock of latency, except that the first mismatch seen while
// monitoring holds it for one clock; the RESO checks then select the
// fault-free core (or raise the unresolved alarm) until reconfig_done.
// A mismatch counts only in a clock where eval reports a new result pair.
// Covers the core-1 fault, core-2 fault, double-flag and no-flag cases,
// mismatches after isolation (no second hold) and random sequences.
module dwc_ced_ctrl_tb;
  import reso_pkg::*;
  localparam int W = 8;
  logic         clk = 1'b0;
  logic         rst_n;
  logic         eval, match, ok1, ok2, reconfig_done;
  logic [W-1:0] mux_out, out;
  core_sel_e    sel;
  logic [1:0]   faulty;
  logic         recover_req, unresolved, hold;
  ctrl_state_e  state;
  int checks = 0, failures = 0;
  int n_hold = 0, n_iso1 = 0, n_iso2 = 0, n_unres = 0;

  // reference
  ctrl_state_e  r_state;
  core_sel_e    r_sel;
  logic [1:0]   r_faulty;
  logic [W-1:0] r_out;

  dwc_ced_ctrl #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .eval(eval), .match(match), .ok1(ok1), .ok2(ok2),
    .mux_out(mux_out), .reconfig_done(reconfig_done), .sel(sel), .out(out),
    .faulty(faulty), .recover_req(recover_req), .unresolved(unresolved),
    .hold(hold), .state(state));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (out !== r_out || sel !== r_sel || faulty !== r_faulty || state !== r_state ||
        recover_req !== (r_state != ST_MONITOR) || unresolved !== (r_state == ST_UNRESOLVED)) begin
      failures++;
      $display("FAIL t=%0t out=%h/%h sel=%0d/%0d faulty=%b/%b state=%0d/%0d",
               $time, out, r_out, sel, r_sel, faulty, r_faulty, state, r_state);
    end
  endtask

  // apply one clock of inputs, step the reference, compare after the edge
  task automatic step(input logic m, input logic o1, input logic o2,
                      input logic [W-1:0] d, input logic rc, input logic ev = 1'b1);
    logic r_hold;
    @(negedge clk);
    eval = ev; match = m; ok1 = o1; ok2 = o2; mux_out = d; reconfig_done = rc;
    #1;
    r_hold = (r_state == ST_MONITOR) && !m && ev;
    checks++;
    if (hold !== r_hold) begin
      failures++;
      $display("FAIL hold=%b exp=%b t=%0t", hold, r_hold, $time);
    end
    @(posedge clk);
    if (!r_hold) r_out = d;
    if (r_hold) n_hold++;
    if (rc) begin
      r_state = ST_MONITOR; r_sel = CORE1; r_faulty = 2'b00;
    end else if (r_hold) begin
      if (o1 && !o2) begin
        r_state = ST_ISOLATED; r_sel = CORE1; r_faulty = 2'b10; n_iso2++;
      end else if (!o1 && o2) begin
        r_state = ST_ISOLATED; r_sel = CORE2; r_faulty = 2'b01; n_iso1++;
      end else begin
        r_state = ST_UNRESOLVED; r_sel = CORE1; r_faulty = {~o2, ~o1}; n_unres++;
      end
    end
    #1;
    compare();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    eval = 1'b0; match = 1'b1; ok1 = 1'b1; ok2 = 1'b1; mux_out = '0; reconfig_done = 1'b0;
    rst_n = 1'b0;
    r_state = ST_MONITOR; r_sel = CORE1; r_faulty = '0; r_out = '0;
    repeat (2) @(posedge clk);
    #1 compare();
    rst_n = 1'b1;

    // fault free: output follows with one clock latency, never held
    for (int i = 0; i < 20; i++) step(1'b1, 1'b1, 1'b1, W'($urandom), 1'b0);
    // core 2 faulty (the figure's case): hold once, then core 1 stays on
    step(1'b1, 1'b1, 1'b1, 8'd3, 1'b0);
    step(1'b0, 1'b1, 1'b0, 8'd3, 1'b0);
    checks++;
    if (out !== 8'd3 || sel !== CORE1 || faulty !== 2'b10) begin
      failures++; $display("FAIL core-2 isolation");
    end
    for (int i = 0; i < 5; i++) step(1'b0, 1'b1, 1'b0, W'($urandom), 1'b0);
    step(1'b1, 1'b1, 1'b1, 8'h11, 1'b1);   // repaired
    // core 1 faulty
    step(1'b1, 1'b1, 1'b1, 8'h22, 1'b0);
    step(1'b0, 1'b0, 1'b1, 8'h5a, 1'b0);   // held: out stays 22
    checks++;
    if (out !== 8'h22 || sel !== CORE2 || faulty !== 2'b01) begin
      failures++; $display("FAIL core-1 isolation out=%h", out);
    end
    step(1'b0, 1'b0, 1'b1, 8'h44, 1'b0);   // core 2 data now passes
    step(1'b1, 1'b1, 1'b1, 8'h00, 1'b1);
    // both flagged, then neither flagged
    step(1'b0, 1'b0, 1'b0, 8'h66, 1'b0);
    step(1'b0, 1'b0, 1'b0, 8'h67, 1'b0);
    step(1'b1, 1'b1, 1'b1, 8'h00, 1'b1);
    step(1'b0, 1'b1, 1'b1, 8'h77, 1'b0);
    step(1'b1, 1'b1, 1'b1, 8'h00, 1'b1);
    // a stale mismatch without a new pair is ignored
    step(1'b0, 1'b1, 1'b0, 8'h78, 1'b0, 1'b0);
    step(1'b0, 1'b1, 1'b0, 8'h79, 1'b0, 1'b0);
    checks++;
    if (out !== 8'h79 || state !== ST_MONITOR) begin
      failures++; $display("FAIL stale mismatch acted on");
    end
    // random
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 5) != 0, $urandom_range(0, 1), $urandom_range(0, 1),
           W'($urandom), $urandom_range(0, 9) == 0, $urandom_range(0, 2) != 0);
    if (n_hold == 0 || n_iso1 == 0 || n_iso2 == 0 || n_unres == 0) begin
      failures++;
      $display("FAIL coverage hold=%0d iso1=%0d iso2=%0d unres=%0d", n_hold, n_iso1, n_iso2, n_unres);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
