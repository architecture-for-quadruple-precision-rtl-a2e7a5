// exp_sign_unit: sign, exponent and exception decision of the divider.
//
// The quotient sign is the XOR of the operand signs.  The quotient exponent
// is e_a - e_b + BIAS, where BIAS is built from the mode bits as one unified
// 15-bit signal, {0, 4{QP|DPE}, 3{QP|DPE|DP}, 7'h7F}, i.e. 127, 1023 or
// 16383, so the same subtractor serves every precision.  When the exponent
// is below one the result will be sub-normal, and the unit also supplies
// the right-shift amount 1 - exponent for the post-processing stage.  The exponent is
// the one of a quotient in [1,2); post-processing subtracts one when the
// significand quotient falls below one.  The unit also decides the IEEE
// special cases (NaN, infinity, zero results) and raises the invalid and
// divide-by-zero flags.
//
// Interface: combinational, fed by two fp_unpack instances.  The unified
// BIAS follows the design; the special-case table is this design's own
// (standard IEEE 754 division rules).
module exp_sign_unit
  import fpdiv_pkg::*;
(
  input  mode_e                    mode,
  input  logic                     sign_a,
  input  logic                     sign_b,
  input  logic signed [EXP_W-1:0]  exp_a,
  input  logic signed [EXP_W-1:0]  exp_b,
  input  logic                     zero_a, inf_a, nan_a,
  input  logic                     zero_b, inf_b, nan_b,
  output logic                     sign_q,
  output logic signed [EXP_W-1:0]  exp_q,
  output logic [14:0]              bias,
  output logic [7:0]               rshift,
  output special_e                 special,
  output logic                     invalid,
  output logic                     div_by_zero
);
  assign bias   = unified_bias(mode);
  assign sign_q = sign_a ^ sign_b;
  assign exp_q  = exp_a - exp_b + EXP_W'(signed'({1'b0, bias}));

  // right-shift amount of a sub-normal result, 1 - exp_q, saturated at 200
  // (far beyond every significand); post-processing adds one more when the
  // significand quotient is below one.
  always_comb begin
    if (exp_q >= EXP_W'(1))          rshift = 8'd0;
    else if (exp_q <= -EXP_W'(199))  rshift = 8'd200;
    else                             rshift = 8'(EXP_W'(1) - exp_q);
  end

  always_comb begin
    special     = SPEC_NONE;
    invalid     = 1'b0;
    div_by_zero = 1'b0;
    if (nan_a || nan_b) begin
      special = SPEC_NAN;
    end else if ((inf_a && inf_b) || (zero_a && zero_b)) begin
      special = SPEC_NAN;
      invalid = 1'b1;
    end else if (inf_a) begin
      special = SPEC_INF;
    end else if (zero_b) begin
      special     = SPEC_INF;
      div_by_zero = 1'b1;
    end else if (zero_a || inf_b) begin
      special = SPEC_ZERO;
    end
  end
endmodule
