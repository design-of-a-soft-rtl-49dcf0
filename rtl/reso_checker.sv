// reso_checker: RESO decoder and self-check of one core.
//
// A core computes its result twice: res_act from the actual input and
// res_shf from the input shifted left by K bits. The decoder shifts res_shf
// right by K bits (zero fill) and a comparator checks it against res_act.
// ok is high when the two agree (core fault free) and low when they differ
// (core faulty), as Out2 / Out3 of the design. Purely combinational.
//
// The result of the shifted computation is as wide as the data path, so a
// fault-free core only passes when its result fits in W-K bits; the top bits
// shifted out of res_shf are lost. The decoded word is exported for
// observation.
module reso_checker #(
  parameter int unsigned W = reso_pkg::DATA_W,
  parameter int unsigned K = reso_pkg::SHIFT_K
) (
  input  logic [W-1:0] res_act,   // result from the actual input
  input  logic [W-1:0] res_shf,   // result from the left-shifted input
  output logic [W-1:0] res_dec,   // res_shf shifted right by K
  output logic         ok         // 1: results agree, 0: core faulty
);

  always_comb res_dec = res_shf >> K;

  comparator #(.W(W)) u_cmp (
    .a  (res_dec),
    .b  (res_act),
    .eq (ok)
  );

endmodule
