// core_mux: output multiplexer of the lockstep pair.
//
// Connects the actual result of the selected core to the system output
// path: sel = CORE1 passes d1, sel = CORE2 passes d2. Purely combinational;
// the selection comes from the DWC-CED controller.
module core_mux #(
  parameter int unsigned W = reso_pkg::DATA_W
) (
  input  reso_pkg::core_sel_e sel,
  input  logic [W-1:0]        d1,
  input  logic [W-1:0]        d2,
  output logic [W-1:0]        y
);

  always_comb begin
    unique case (sel)
      reso_pkg::CORE2: y = d2;
      default:         y = d1;
    endcase
  end

endmodule
