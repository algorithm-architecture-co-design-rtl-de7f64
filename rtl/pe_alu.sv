// pe_alu: the arithmetic unit of one processing element.
//
// Every PE has a multiply-accumulate unit; diagonal PEs (HAS_RECIP = 1) add
// a reciprocal unit, which together with the multiplier gives them division.
// The ALU is combinational: the PE writes its result into the destination
// register at the next clock edge.
//
//   ALU_MOV   result = rd1           (recip_sel = 0)
//             result = 1 / rd1       (recip_sel = 1, diagonal PEs only;
//                                     other PEs copy rd1)
//   ALU_MAC   result = acc + rd1 * cb
//   ALU_MSUB  result = acc - rd1 * cb
//   ALU_MUL   result = rd1 * rd2
//
// acc is the current value of the destination register. Numbers are signed
// fixed point with FRAC_W fraction bits: a product is formed at full width,
// shifted right arithmetically by FRAC_W and truncated to DATA_W bits (sums
// wrap). The operation set and its encoding are this design's choice; the
// document names only the MAC and reciprocal units.
// Lint reports the upper half of the shifted product as unused: those bits
// are dropped on purpose by the truncation to DATA_W bits.
module pe_alu
  import lac_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned FRAC_W    = 16,
  parameter bit          HAS_RECIP = 1'b0
) (
  input  alu_op_e                  op,
  input  logic                     recip_sel,
  input  logic signed [DATA_W-1:0] rd1,
  input  logic signed [DATA_W-1:0] rd2,
  input  logic signed [DATA_W-1:0] cb,
  input  logic signed [DATA_W-1:0] acc,
  output logic signed [DATA_W-1:0] result
);
  logic signed [2*DATA_W-1:0] prod_full;
  logic signed [2*DATA_W-1:0] prod_shr;
  logic signed [DATA_W-1:0]   prod;
  logic signed [DATA_W-1:0]   mul_b;
  logic signed [DATA_W-1:0]   recip;

  if (HAS_RECIP) begin : g_recip
    recip_unit #(.DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_recip (.a(rd1), .r(recip));
  end else begin : g_norecip
    assign recip = rd1;
  end

  always_comb begin
    mul_b     = (op == ALU_MUL) ? rd2 : cb;
    prod_full = (2*DATA_W)'(rd1) * (2*DATA_W)'(mul_b);
    prod_shr  = prod_full >>> FRAC_W;
    prod      = prod_shr[DATA_W-1:0];
    unique case (op)
      ALU_MOV:  result = recip_sel ? recip : rd1;
      ALU_MAC:  result = acc + prod;
      ALU_MSUB: result = acc - prod;
      ALU_MUL:  result = prod;
      default:  result = rd1;
    endcase
  end
endmodule
