// reso_pkg: constants and types shared by the lockstep / RESO fault detector.
//
// The protected system is a pair of 8-bit KCPSM3 (PicoBlaze) cores that run
// the same program in lockstep. Each core reads the system input twice, once
// as it is and once shifted left by SHIFT_K bits (Recomputing with Shifted
// Operands, RESO), and writes two results. The data width (8 bits) and the
// shift distance (1 bit) follow the design description; the I/O port numbers
// used by the program and the controller encodings are this design's choice.
package reso_pkg;

  // Width of the cores' data path and of every compared word.
  parameter int unsigned DATA_W = 8;

  // RESO encode/decode distance: operands are shifted left by SHIFT_K before
  // the second computation and its result is shifted right by SHIFT_K.
  parameter int unsigned SHIFT_K = 1;

  // KCPSM3 I/O port numbers used by the program on both cores.
  // INPUT  from PORT_ACT reads the input, from PORT_SHF the shifted input.
  // OUTPUT to   PORT_ACT writes the actual result, to PORT_SHF the result
  // computed from the shifted input (written last, completing the pair).
  parameter logic [7:0] PORT_ACT = 8'h00;
  parameter logic [7:0] PORT_SHF = 8'h01;

  // Which core drives the system output.
  typedef enum logic {
    CORE1 = 1'b0,
    CORE2 = 1'b1
  } core_sel_e;

  // Output side of a KCPSM3 core's I/O bus.
  typedef struct packed {
    logic [7:0] port_id;
    logic [7:0] out_port;
    logic       write_strobe;
    logic       read_strobe;
  } kcpsm_bus_t;

  // DWC-CED controller states.
  //   MONITOR    : fault free so far, core 1 drives the output, DWC compares.
  //   ISOLATED   : one core was found faulty, the other drives the output
  //                until the configuration engine reports the repair.
  //   UNRESOLVED : the cores disagreed but the RESO checks flagged both or
  //                neither core; core 1 stays on the output and an alarm
  //                is raised until the repair.
  typedef enum logic [1:0] {
    ST_MONITOR    = 2'd0,
    ST_ISOLATED   = 2'd1,
    ST_UNRESOLVED = 2'd2
  } ctrl_state_e;

endpackage
