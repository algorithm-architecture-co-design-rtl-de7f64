// recip_unit: reciprocal r = 1/a of a signed fixed-point number.
//
// Present only in the diagonal PEs, where TRSM and LUD need 1/a_ii. The
// design treats the reciprocal as a single-cycle operation; this unit is
// purely combinational and computes round-toward-zero (2^(2*FRAC_W)) / a.
// Division by zero saturates to the largest positive or negative value
// (sign of a, positive for a = 0). Results that do not fit DATA_W bits
// saturate as well. A look-up table could replace the divider.
//
// Interface: a (DATA_W bits, FRAC_W fraction bits) in, r out, no clock.
// The single-cycle reciprocal in the diagonal PEs follows the described
// design, which models it as a table lookup; the divider, the fixed-point
// scaling and the saturation are this design's choices.
module recip_unit #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic signed [DATA_W-1:0] a,
  output logic signed [DATA_W-1:0] r
);
  localparam int unsigned QW = 2 * DATA_W + 1;
  localparam logic signed [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};

  logic signed [QW-1:0] one_sq;
  logic signed [QW-1:0] den;
  logic signed [QW-1:0] quo;

  always_comb begin
    one_sq = QW'(1) <<< (2 * FRAC_W);
    den    = QW'(a);
    quo    = '0;
    if (a == '0) begin
      r = MAXV;
    end else begin
      quo = one_sq / den;
      if (quo > QW'(MAXV))      r = MAXV;
      else if (quo < QW'(MINV)) r = MINV;
      else                      r = quo[DATA_W-1:0];
    end
  end
endmodule
