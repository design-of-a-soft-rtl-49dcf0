// core_io_ports: I/O glue between the system input and one KCPSM3 core.
//
// Input side (RESO encoder): the core reads the system input din at port
// PORT_ACT and the same input shifted left by K bits at port PORT_SHF. The
// port_id-selected word is registered into in_port on every clock, as usual
// for a KCPSM3 input multiplexer, so it is stable when INPUT samples it.
//
// Output side: the core writes its result for the actual input to PORT_ACT
// and then its result for the shifted input to PORT_SHF. The first write is
// staged; the second one updates q_act and q_shf together, so the two output
// registers always hold a matching pair and the comparators behind them can
// look at them on every clock. pair_stb pulses for one clock after each pair
// update.
//
// Serving the actual and the shifted input to the core, and the two results
// it produces, follow the design description; port numbers, the registered
// input mux and the staged pair update are this design's choices.
module core_io_ports #(
  parameter int unsigned K = reso_pkg::SHIFT_K
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           din,       // system input
  input  reso_pkg::kcpsm_bus_t bus,       // port_id / out_port / strobes of the core
  output logic [7:0]           in_port,   // to the core's in_port
  output logic [7:0]           q_act,     // result from the actual input
  output logic [7:0]           q_shf,     // result from the shifted input
  output logic                 pair_stb   // q_act / q_shf were just updated
);

  import reso_pkg::*;

  logic [7:0] din_shf;
  logic [7:0] stage;

  always_comb din_shf = din << K;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_port  <= '0;
      stage    <= '0;
      q_act    <= '0;
      q_shf    <= '0;
      pair_stb <= 1'b0;
    end else begin
      in_port  <= (bus.port_id == PORT_SHF) ? din_shf : din;
      pair_stb <= 1'b0;
      if (bus.write_strobe) begin
        if (bus.port_id == PORT_ACT) begin
          stage <= bus.out_port;
        end else if (bus.port_id == PORT_SHF) begin
          q_act    <= stage;
          q_shf    <= bus.out_port;
          pair_stb <= 1'b1;
        end
      end
    end
  end

endmodule
