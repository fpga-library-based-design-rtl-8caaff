// reciprocal_mult - cluster average by reciprocal and multiplication.
//
// The reciprocal generator forms round(2^20 / count) (21 bits, 1.0 = 2^20);
// the multiplier forms sum * reciprocal (41-bit product). The new centroid is
// the product rounded to 8 fraction bits, i.e. its 12 significant bits, with
// saturation. A zero count gives a zero product; the caller keeps the old
// centroid then. The design states a 32-bit product; 20 reciprocal fraction
// bits (41-bit product) are used here so that the mean is within one LSB of
// the exact quotient for every count up to 75 and every reachable sum. Combinational.
module reciprocal_mult
  import cnn_pkg::*;
#(
  parameter int RECIP_FRAC = 20
) (
  input  logic signed [SUM_W-1:0]            sum_i,
  input  logic [CNT_W-1:0]                   cnt_i,
  output logic [RECIP_FRAC:0]                recip_o,
  output logic signed [SUM_W+RECIP_FRAC:0]   prod_o,
  output weight_t                            mean_o
);

  always_comb begin
    if (cnt_i == '0)
      recip_o = '0;
    else
      recip_o = (RECIP_FRAC+1)'(((RECIP_FRAC+2)'(1) << RECIP_FRAC) + (RECIP_FRAC+2)'(cnt_i >> 1))
                / (RECIP_FRAC+1)'(cnt_i);
    prod_o = (SUM_W+RECIP_FRAC+1)'(sum_i) * $signed({1'b0, recip_o});
    mean_o = sat_w(rshift_round(64'(prod_o), RECIP_FRAC));
  end

endmodule
