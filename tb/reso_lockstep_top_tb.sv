// reso_lockstep_top_tb: end-to-end test of the lockstep / RESO detector.
//
// Two KCPSM3 bus models run the RESO program in lockstep around the
// detector, at its default parameters. Stuck-at faults are injected into
// the cores' ALU results, and every result pair is checked against values
// computed here from the input and the injected faults:
//   out1 = (act1 == act2), out2 = ((shf1 >> 1) == act1),
//   out3 = ((shf2 >> 1) == act2),
// and out4 / sel / faulty follow the DWC-CED rule: the output follows the
// selected core one clock after each pair, a first mismatch holds it for one
// clock and selects the core whose RESO check passed, until reconfig_done.
//
// Directed phases replay the two documented simulations (input 3, core 2
// with bit 0 stuck at 0: outputs 3 and 2, core 1 kept on the output), then
// a core-1 fault, a double fault, reconfiguration, and a random phase with
// both programs (echo and doubling). Each mechanism is counted: fault-free
// pairs without hold, DWC mismatches, holds, isolation of core 1 and of
// core 2, unresolved alarms and repairs; one that never occurs is a failure.
// It also checks that the result of a fault-free pair reaches out4 on the
// clock after the pair is written (no latency penalty).
module reso_lockstep_top_tb;
  import reso_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] din;
  kcpsm_bus_t bus1, bus2;
  logic [7:0] in1, in2;
  logic       out1, out2, out3, hold, stb1, stb2, recover_req, unresolved, reconfig_done;
  logic [7:0] out4;
  logic [1:0] faulty;
  core_sel_e  sel;

  logic       op_double;
  logic [7:0] fm1, fv1, fm2, fv2;

  int checks = 0, failures = 0;
  int n_clean = 0, n_mismatch = 0, n_hold = 0, n_iso1 = 0, n_iso2 = 0, n_unres = 0, n_repair = 0;

  // reference controller state
  ctrl_state_e r_state;
  core_sel_e   r_sel;
  logic [1:0]  r_faulty;

  reso_lockstep_top dut (
    .clk(clk), .rst_n(rst_n), .din(din),
    .core1_bus(bus1), .core1_in_port(in1),
    .core2_bus(bus2), .core2_in_port(in2),
    .out1(out1), .out2(out2), .out3(out3), .out4(out4), .sel(sel),
    .faulty(faulty), .recover_req(recover_req), .unresolved(unresolved),
    .reconfig_done(reconfig_done), .hold(hold),
    .core1_pair_stb(stb1), .core2_pair_stb(stb2));

  kcpsm3_model core1 (
    .clk(clk), .reset(!rst_n), .in_port(in1), .port_id(bus1.port_id),
    .out_port(bus1.out_port), .write_strobe(bus1.write_strobe),
    .read_strobe(bus1.read_strobe), .op_double(op_double),
    .fault_mask(fm1), .fault_val(fv1));

  kcpsm3_model core2 (
    .clk(clk), .reset(!rst_n), .in_port(in2), .port_id(bus2.port_id),
    .out_port(bus2.out_port), .write_strobe(bus2.write_strobe),
    .read_strobe(bus2.read_strobe), .op_double(op_double),
    .fault_mask(fm2), .fault_val(fv2));

  always #5 clk = ~clk;

  function automatic logic [7:0] f(input logic [7:0] x, input logic [7:0] m, input logic [7:0] v);
    logic [7:0] r;
    r = op_double ? 8'(2 * x) : x;
    return (r & ~m) | (v & m);
  endfunction

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h din=%h t=%0t", what, got, exp, din, $time);
    end
  endtask

  // Run one program iteration on input x and check the result pair.
  task automatic run_pair(input logic [7:0] x);
    logic [7:0] a1, s1, a2, s2, prev_out, exp_out;
    logic       e1, e2, e3, r_hold;
    @(negedge clk);
    din = x;
    // wait for the pair written from this input
    do begin
      @(posedge clk); #1;
    end while (!stb1);
    a1 = f(x, fm1, fv1); s1 = f(8'(x << 1), fm1, fv1);
    a2 = f(x, fm2, fv2); s2 = f(8'(x << 1), fm2, fv2);
    e1 = (a1 == a2); e2 = ((s1 >> 1) == a1); e3 = ((s2 >> 1) == a2);
    chk("pair strobes in lockstep", {7'd0, stb2}, 8'd1);
    chk("out1", {7'd0, out1}, {7'd0, e1});
    chk("out2", {7'd0, out2}, {7'd0, e2});
    chk("out3", {7'd0, out3}, {7'd0, e3});
    r_hold = (r_state == ST_MONITOR) && !e1;
    chk("hold", {7'd0, hold}, {7'd0, r_hold});
    if (!e1) n_mismatch++;
    prev_out = out4;
    @(posedge clk); #1;
    if (r_hold) begin
      n_hold++;
      chk("out4 held", out4, prev_out);
      if (e2 && !e3) begin
        r_state = ST_ISOLATED; r_sel = CORE1; r_faulty = 2'b10; n_iso2++;
      end else if (!e2 && e3) begin
        r_state = ST_ISOLATED; r_sel = CORE2; r_faulty = 2'b01; n_iso1++;
      end else begin
        r_state = ST_UNRESOLVED; r_sel = CORE1; r_faulty = {~e3, ~e2}; n_unres++;
      end
      @(posedge clk); #1;
    end else if (e1 && r_state == ST_MONITOR) begin
      n_clean++;
    end
    exp_out = (r_sel == CORE2) ? a2 : a1;
    chk("out4", out4, exp_out);
    chk("sel", {7'd0, sel}, {7'd0, r_sel});
    chk("faulty", {6'd0, faulty}, {6'd0, r_faulty});
    chk("recover_req", {7'd0, recover_req}, {7'd0, r_state != ST_MONITOR});
    chk("unresolved", {7'd0, unresolved}, {7'd0, r_state == ST_UNRESOLVED});
  endtask

  // The configuration engine repairs the cores and reports it.
  task automatic repair();
    @(negedge clk);
    fm1 = '0; fv1 = '0; fm2 = '0; fv2 = '0;
    reconfig_done = 1'b1;
    @(negedge clk);
    reconfig_done = 1'b0;
    r_state = ST_MONITOR; r_sel = CORE1; r_faulty = '0;
    n_repair++;
    chk("recover_req cleared", {7'd0, recover_req}, 8'd0);
    // let the program finish the iteration that read the old faults
    run_pair(din);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; din = 8'h00; reconfig_done = 1'b0; op_double = 1'b0;
    fm1 = '0; fv1 = '0; fm2 = '0; fv2 = '0;
    r_state = ST_MONITOR; r_sel = CORE1; r_faulty = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pair(8'h00);   // first iteration after reset

    // fault free, echo program
    for (int i = 0; i < 10; i++) run_pair(8'($urandom_range(0, 127)));

    // documented case: input 3, core 2 bit 0 stuck at 0
    run_pair(8'd3);
    @(negedge clk); fm2 = 8'h01; fv2 = 8'h00;
    run_pair(8'd3);    // iteration in flight may see part of the change
    run_pair(8'd3);
    chk("fig: core 2 actual result", dut.c2_act, 8'd2);
    chk("fig: core 2 shifted result", dut.c2_shf, 8'd6);
    chk("fig: core 1 actual result", dut.c1_act, 8'd3);
    chk("fig: core 1 shifted result", dut.c1_shf, 8'd6);
    chk("fig: out4", out4, 8'd3);
    chk("fig: out1/out2/out3", {5'd0, out1, out2, out3}, 8'b010);
    for (int i = 0; i < 5; i++) run_pair(8'($urandom_range(0, 127)));
    repair();

    // core 1 faulty: bit 2 stuck at 1
    @(negedge clk); fm1 = 8'h04; fv1 = 8'h04;
    run_pair(8'h10);
    run_pair(8'h10);
    run_pair(8'h21);
    chk("core 2 drives out4", out4, 8'h21);
    repair();

    // double fault: both cores flagged
    @(negedge clk); fm1 = 8'h01; fv1 = 8'h00; fm2 = 8'h02; fv2 = 8'h00;
    run_pair(8'd3);
    run_pair(8'd3);
    repair();

    // random phase, both programs
    for (int i = 0; i < 400; i++) begin
      if (r_state != ST_MONITOR && $urandom_range(0, 3) == 0) begin
        repair();
        @(negedge clk); op_double = $urandom_range(0, 1);
        run_pair(din);
      end
      if (r_state == ST_MONITOR && $urandom_range(0, 5) == 0) begin
        @(negedge clk);
        if ($urandom_range(0, 1) == 0) begin fm1 = 8'(1 << $urandom_range(0, 7)); fv1 = 8'($urandom); end
        else                           begin fm2 = 8'(1 << $urandom_range(0, 7)); fv2 = 8'($urandom); end
        run_pair(din);   // iteration in flight
      end
      run_pair(8'($urandom));
    end

    if (n_clean == 0)    begin failures++; $display("FAIL no fault-free pair"); end
    if (n_mismatch == 0) begin failures++; $display("FAIL no DWC mismatch"); end
    if (n_hold == 0)     begin failures++; $display("FAIL no output hold"); end
    if (n_iso1 == 0)     begin failures++; $display("FAIL core 1 never isolated"); end
    if (n_iso2 == 0)     begin failures++; $display("FAIL core 2 never isolated"); end
    if (n_unres == 0)    begin failures++; $display("FAIL no unresolved mismatch"); end
    if (n_repair == 0)   begin failures++; $display("FAIL no repair"); end
    $display("mechanisms: clean=%0d mismatch=%0d hold=%0d iso_core1=%0d iso_core2=%0d unresolved=%0d repair=%0d",
             n_clean, n_mismatch, n_hold, n_iso1, n_iso2, n_unres, n_repair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
