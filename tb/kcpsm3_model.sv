// kcpsm3_model: behavioural stand-in for a KCPSM3 (PicoBlaze) core running
// the RESO test program. Not synthesizable logic; used by testbenches only.
//
// It has the I/O ports of the real core (clk, reset, port_id, out_port,
// write_strobe, read_strobe, in_port) and reproduces their bus timing: every
// instruction takes two clocks, port_id and out_port are valid for both,
// write_strobe / read_strobe are high in the second clock, and INPUT
// captures in_port at the end of the second clock. The program it executes
// is fixed:
//
//   loop: INPUT  s0, 00      ; actual input
//         INPUT  s1, 01      ; input shifted left by 1
//         f      s0          ; compute (see below)
//         f      s1
//         OUTPUT s0, 00      ; result from the actual input
//         OUTPUT s1, 01      ; result from the shifted input
//         JUMP   loop
//
// f is LOAD sX,sX (the result echoes the input) when op_double is low and
// ADD sX,sX (the result is twice the input, modulo 256) when it is high.
// A soft error in the core is modelled as stuck bits on the ALU result:
// bits set in fault_mask take the value of fault_val.
module kcpsm3_model (
  input  logic       clk,
  input  logic       reset,        // active high, as on the real core
  input  logic [7:0] in_port,
  output logic [7:0] port_id,
  output logic [7:0] out_port,
  output logic       write_strobe,
  output logic       read_strobe,
  // test controls
  input  logic       op_double,
  input  logic [7:0] fault_mask,
  input  logic [7:0] fault_val
);

  logic [2:0] pc;
  logic       phase;
  logic [7:0] s0, s1;

  function automatic logic [7:0] alu(input logic [7:0] x);
    logic [7:0] r;
    r = op_double ? 8'(x + x) : x;
    return (r & ~fault_mask) | (fault_val & fault_mask);
  endfunction

  always_comb begin
    port_id      = 8'h00;
    out_port     = 8'h00;
    write_strobe = 1'b0;
    read_strobe  = 1'b0;
    unique case (pc)
      3'd0: begin port_id = 8'h00; read_strobe = phase; end
      3'd1: begin port_id = 8'h01; read_strobe = phase; end
      3'd4: begin port_id = 8'h00; out_port = s0; write_strobe = phase; end
      3'd5: begin port_id = 8'h01; out_port = s1; write_strobe = phase; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      pc    <= '0;
      phase <= 1'b0;
      s0    <= '0;
      s1    <= '0;
    end else begin
      phase <= ~phase;
      if (phase) begin
        unique case (pc)
          3'd0: s0 <= in_port;
          3'd1: s1 <= in_port;
          3'd2: s0 <= alu(s0);
          3'd3: s1 <= alu(s1);
          default: ;
        endcase
        pc <= (pc == 3'd6) ? 3'd0 : pc + 3'd1;
      end
    end
  end

endmodule
