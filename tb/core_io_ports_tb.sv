// core_io_ports_tb: self-checking test of one core's I/O glue.
// Drives KCPSM3 bus cycles directly and checks, against values computed
// here: the registered input mux (actual input on port 00, input shifted
// left by 1 on port 01, actual input elsewhere), that a result written to
// port 00 stays staged until the write to port 01 updates both output
// registers at once, that pair_stb pulses for exactly one clock, and that
// writes to other ports, or with write_strobe low, change nothing.
module core_io_ports_tb;
  import reso_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] din;
  kcpsm_bus_t bus;
  logic [7:0] in_port, q_act, q_shf;
  logic       pair_stb;
  int checks = 0, failures = 0;

  logic [7:0] exp_act, exp_shf, staged;

  core_io_ports #(.K(1)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .bus(bus), .in_port(in_port),
    .q_act(q_act), .q_shf(q_shf), .pair_stb(pair_stb));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  // one bus clock: drive at negedge, sample after the next posedge
  task automatic cycle(input logic [7:0] pid, input logic [7:0] data, input logic ws);
    @(negedge clk);
    bus.port_id = pid; bus.out_port = data; bus.write_strobe = ws; bus.read_strobe = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0; din = 8'h00; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    chk("reset q_act", q_act, 8'h00);
    chk("reset q_shf", q_shf, 8'h00);
    chk("reset in_port", in_port, 8'h00);
    rst_n = 1'b1;
    exp_act = 8'h00; exp_shf = 8'h00;

    // input side
    for (int i = 0; i < 300; i++) begin
      logic [7:0] pid;
      @(negedge clk);
      din = 8'($urandom);
      pid = ($urandom_range(0, 2) == 0) ? 8'($urandom) : 8'($urandom_range(0, 1));
      bus.port_id = pid; bus.write_strobe = 1'b0;
      @(posedge clk); #1;
      chk("in_port", in_port, (pid == 8'h01) ? 8'(din << 1) : din);
    end

    // output side
    for (int i = 0; i < 300; i++) begin
      logic [7:0] a, s;
      a = 8'($urandom); s = 8'($urandom);
      cycle(8'h00, a, 1'b1);                      // OUTPUT s0, 00
      chk("q_act unchanged after port 00", q_act, exp_act);
      chk("q_shf unchanged after port 00", q_shf, exp_shf);
      chk("no pair_stb after port 00", {7'd0, pair_stb}, 8'd0);
      staged = a;
      if ($urandom_range(0, 3) == 0) begin
        cycle(8'h01, 8'($urandom), 1'b0);         // strobe low: ignored
        chk("q_shf unchanged without strobe", q_shf, exp_shf);
        cycle(8'h37, 8'($urandom), 1'b1);         // other port: ignored
        chk("q_act unchanged by other port", q_act, exp_act);
        chk("q_shf unchanged by other port", q_shf, exp_shf);
      end
      cycle(8'h01, s, 1'b1);                      // OUTPUT s1, 01
      exp_act = staged; exp_shf = s;
      chk("q_act pair", q_act, exp_act);
      chk("q_shf pair", q_shf, exp_shf);
      chk("pair_stb", {7'd0, pair_stb}, 8'd1);
      cycle(8'h00, 8'h00, 1'b0);
      chk("pair_stb one clock", {7'd0, pair_stb}, 8'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
