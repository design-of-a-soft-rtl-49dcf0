// reso_lockstep_top: soft-error detector for a lockstep pair of KCPSM3 cores.
//
// Two identical cores (outside this module, connected through the core1_*
// and core2_* ports) run the same program on the same input. Each core
// reads the input din and din shifted left by SHIFT_K bits, and writes two
// results: one from the actual input and one from the shifted input.
//
//   * Lockstep / DWC: a comparator checks the two cores' actual results on
//     every clock; out1 low means they disagree, so one core is faulty.
//   * RESO: per core, the result from the shifted input is shifted right by
//     SHIFT_K and compared with that core's actual result; out2 (core 1) and
//     out3 (core 2) low mark the faulty core.
//   * A multiplexer and an output register deliver the selected core's
//     actual result on out4. On a DWC mismatch in a newly written result
//     pair the register holds for one
//     clock while the faulty core is located, then the fault-free core is
//     switched to the output until reconfig_done.
//   * faulty / recover_req report the faulty core to the configuration
//     engine that repairs it, which lives outside this module.
//
// Structure and signal meanings follow the design description (out1..out4
// as named there); the port-level glue, the output register timing and the
// reconfiguration handshake are this design's choices. All outputs except
// the combinational out1..out3 are registered; reset is asynchronous and
// active low.
module reso_lockstep_top (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            din,            // system input
  // KCPSM3 core 1
  input  reso_pkg::kcpsm_bus_t  core1_bus,
  output logic [7:0]            core1_in_port,
  // KCPSM3 core 2
  input  reso_pkg::kcpsm_bus_t  core2_bus,
  output logic [7:0]            core2_in_port,
  // results
  output logic                  out1,           // 1: cores agree, 0: mismatch
  output logic                  out2,           // 1: core 1 passes RESO check
  output logic                  out3,           // 1: core 2 passes RESO check
  output logic [7:0]            out4,           // system output
  output reso_pkg::core_sel_e   sel,            // core driving out4
  // to / from the fault tolerant configuration engine
  output logic [1:0]            faulty,         // bit 0: core 1, bit 1: core 2
  output logic                  recover_req,
  output logic                  unresolved,
  input  logic                  reconfig_done,
  // observation
  output logic                  hold,           // out4 held this clock edge
  output logic                  core1_pair_stb, // core 1 wrote a result pair
  output logic                  core2_pair_stb  // core 2 wrote a result pair
);

  import reso_pkg::*;

  logic [DATA_W-1:0] c1_act, c1_shf, c2_act, c2_shf;  // q7, q6, q14, q13
  logic [DATA_W-1:0] c1_dec, c2_dec;                  // q15, q16
  logic [DATA_W-1:0] mux_out;
  ctrl_state_e       state;

  core_io_ports #(.K(SHIFT_K)) u_io1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (din),
    .bus      (core1_bus),
    .in_port  (core1_in_port),
    .q_act    (c1_act),
    .q_shf    (c1_shf),
    .pair_stb (core1_pair_stb)
  );

  core_io_ports #(.K(SHIFT_K)) u_io2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (din),
    .bus      (core2_bus),
    .in_port  (core2_in_port),
    .q_act    (c2_act),
    .q_shf    (c2_shf),
    .pair_stb (core2_pair_stb)
  );

  // DWC comparator (Out1)
  comparator #(.W(DATA_W)) u_cmp_dwc (
    .a  (c1_act),
    .b  (c2_act),
    .eq (out1)
  );

  // RESO self-checks (Out2, Out3)
  reso_checker #(.W(DATA_W), .K(SHIFT_K)) u_chk1 (
    .res_act (c1_act),
    .res_shf (c1_shf),
    .res_dec (c1_dec),
    .ok      (out2)
  );

  reso_checker #(.W(DATA_W), .K(SHIFT_K)) u_chk2 (
    .res_act (c2_act),
    .res_shf (c2_shf),
    .res_dec (c2_dec),
    .ok      (out3)
  );

  core_mux #(.W(DATA_W)) u_mux (
    .sel (sel),
    .d1  (c1_act),
    .d2  (c2_act),
    .y   (mux_out)
  );

  dwc_ced_ctrl #(.W(DATA_W)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .eval          (core1_pair_stb | core2_pair_stb),
    .match         (out1),
    .ok1           (out2),
    .ok2           (out3),
    .mux_out       (mux_out),
    .reconfig_done (reconfig_done),
    .sel           (sel),
    .out           (out4),
    .faulty        (faulty),
    .recover_req   (recover_req),
    .unresolved    (unresolved),
    .hold          (hold),
    .state         (state)
  );

endmodule
