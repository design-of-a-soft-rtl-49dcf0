// comparator: equality comparator of two W-bit words.
//
// eq is high while a and b are identical and low on any mismatch. This is
// the polarity of the Out1/Out2/Out3 signals of the design: a low output
// marks a mismatch (Out1) or a faulty core (Out2, Out3). Purely
// combinational; the word width defaults to the 8-bit core data path.
module comparator #(
  parameter int unsigned W = reso_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);

  logic [W-1:0] diff;

  always_comb begin
    diff = a ^ b;        // one bit per differing position
    eq   = (diff == '0);
  end

endmodule
