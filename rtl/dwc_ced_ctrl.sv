// dwc_ced_ctrl: output register and fault-location control of the
// DWC-CED (duplication with comparison plus concurrent error detection)
// scheme.
//
// While no fault is known (ST_MONITOR) the output register loads the
// multiplexer output (core 1) on every clock. When the DWC comparator
// reports a mismatch (match low) in a clock where a new result pair has
// just arrived (eval high), the output register keeps its value for that
// one clock edge, and the two RESO self-checks (ok1, ok2) are read in
// the same cycle to find the faulty core:
//   ok1 high, ok2 low  -> core 2 faulty, core 1 selected (ST_ISOLATED)
//   ok1 low,  ok2 high -> core 1 faulty, core 2 selected (ST_ISOLATED)
//   otherwise          -> cannot tell; core 1 stays selected and the
//                         unresolved alarm is raised (ST_UNRESOLVED)
// From the next clock on the output register again loads every clock, from
// the selected core, so a located fault costs exactly one clock of hold.
// The decision, the faulty-core flags and recover_req stay until
// reconfig_done reports that the configuration engine repaired the core;
// mismatches seen meanwhile cause no further holds.
//
// Holding the output for one clock on a mismatch and then passing the
// fault-free core until reconfiguration follow the design description. The
// handling of undecidable mismatches, the reconfig_done handshake, the
// asynchronous active-low reset and the eval qualifier are this design's
// choices. The result registers change only when a pair is written, so
// judging a mismatch once per new pair sees the same data as comparing on
// every clock, except right after a repair, where the stale pair that
// caused the fault report must not trigger it again. Timing: match,
// ok1 and ok2 are sampled at the rising clock edge; out, sel and the flags
// are registered.
module dwc_ced_ctrl #(
  parameter int unsigned W = reso_pkg::DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 eval,           // a new result pair arrived
  input  logic                 match,          // Out1: core outputs agree
  input  logic                 ok1,            // Out2: core 1 RESO check passed
  input  logic                 ok2,            // Out3: core 2 RESO check passed
  input  logic [W-1:0]         mux_out,        // selected core's result
  input  logic                 reconfig_done,  // faulty core repaired
  output reso_pkg::core_sel_e  sel,            // drives the output MUX
  output logic [W-1:0]         out,            // Out4: registered system output
  output logic [1:0]           faulty,         // bit 0: core 1, bit 1: core 2
  output logic                 recover_req,    // ask for repair of faulty core
  output logic                 unresolved,     // mismatch, faulty core unknown
  output logic                 hold,           // output held this clock edge
  output reso_pkg::ctrl_state_e state
);

  import reso_pkg::*;

  ctrl_state_e state_n;
  core_sel_e   sel_n;
  logic [1:0]  faulty_n;

  always_comb begin
    state_n  = state;
    sel_n    = sel;
    faulty_n = faulty;
    hold     = 1'b0;
    if (state == ST_MONITOR && eval && !match) begin
      hold = 1'b1;
      unique case ({ok1, ok2})
        2'b10: begin
          state_n  = ST_ISOLATED;
          sel_n    = CORE1;
          faulty_n = 2'b10;
        end
        2'b01: begin
          state_n  = ST_ISOLATED;
          sel_n    = CORE2;
          faulty_n = 2'b01;
        end
        default: begin
          state_n  = ST_UNRESOLVED;
          sel_n    = CORE1;
          faulty_n = {~ok2, ~ok1};
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_MONITOR;
      sel    <= CORE1;
      faulty <= '0;
      out    <= '0;
    end else begin
      if (reconfig_done) begin
        state  <= ST_MONITOR;
        sel    <= CORE1;
        faulty <= '0;
      end else begin
        state  <= state_n;
        sel    <= sel_n;
        faulty <= faulty_n;
      end
      if (!hold) out <= mux_out;
    end
  end

  // A located fault names exactly one core, and never the selected one.
  a_isolated_onehot : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_ISOLATED) |-> (faulty == 2'b01 || faulty == 2'b10));
  a_isolated_sel : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_ISOLATED) |-> (sel == CORE1 ? faulty == 2'b10 : faulty == 2'b01));
  // A hold lasts a single clock unless a repair re-arms the detector.
  a_single_hold : assert property (@(posedge clk) disable iff (!rst_n)
    (hold && !reconfig_done) |=> !hold);

  always_comb begin
    recover_req = (state != ST_MONITOR);
    unresolved  = (state == ST_UNRESOLVED);
  end

endmodule
