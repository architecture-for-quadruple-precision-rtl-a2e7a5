// fp_div_top: multi-precision floating-point divider (SP, DP, DPE and QP).
//
// One 128-bit datapath divides in any of four precisions.  Operands and
// result use one register format: sign at bit 127, exponent field ending at
// bit 112 (8, 11, 15, 15 bits), fraction starting at bit 111 (23, 52, 64,
// 112 bits).  The division runs in three stages:
//   1. pre-processing (combinational, from the input register): unpacking,
//      sub-normal normalisation, exception checks, sign and exponent with a
//      unified bias, the right-shift amount of sub-normal results, and the
//      read of the 256 x 113 reciprocal table;
//   2. the iterative mantissa divider (series expansion, one shared
//      114 x 114 Karatsuba multiplier, 11-state FSM that skips the states
//      a lower precision does not need);
//   3. post-processing: normalisation, round to nearest even, final
//      processing, into the output register.
//
// Timing: an operation is accepted (in_valid && in_ready) into the input
// register; the next cycle the first-stage results are registered and the
// FSM enters S0; the FSM spends 7 / 9 / 10 / 11 cycles (SP / DP / DPE / QP)
// in S0..S10; M is registered at the end of S10 and the post-processed
// result one cycle later.  Latency from acceptance to out_valid is therefore
// 9 / 11 / 12 / 13 cycles and a new operation can be accepted every
// 8 / 10 / 11 / 12 cycles, the figures of the design.  in_ready is high
// while the FSM rests in S10 and the input register is empty.  out_valid is
// a one-cycle pulse; out_q and out_flags hold until the next result.
//
// The three-stage split, the FSM and the latency/throughput figures follow
// the design; the valid/ready handshake, reset and flags are this design's
// own choices.
module fp_div_top
  import fpdiv_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  mode_e         in_mode,
  input  logic [127:0]  in_a,
  input  logic [127:0]  in_b,
  output logic          out_valid,
  output logic [127:0]  out_q,
  output flags_t        out_flags
);
  // ---------------- input register (Fig. 1 format) ----------------
  logic         ir_valid;
  mode_e        ir_mode;
  logic [127:0] ir_a, ir_b;

  // ---------------- first stage ----------------
  logic                    sa, sb, za, zb, ia, ib, na, nb;
  logic signed [EXP_W-1:0] ea, eb;
  logic [MANT_W-1:0]       ma, mb;
  logic                    s_q;
  logic signed [EXP_W-1:0] e_q;
  logic [14:0]             bias;
  logic [7:0]              rshift;
  special_e                spec;
  logic                    inv, dbz;
  logic [112:0]            recip;

  // first-stage result register (held for the whole operation)
  mode_e                   r_mode;
  logic [112:0]            r_m1, r_m2, r_recip;
  logic                    r_sign, r_inv, r_dbz;
  logic signed [EXP_W-1:0] r_exp;
  logic [7:0]              r_rshift;
  special_e                r_spec;

  // ---------------- core and post stage ----------------
  logic          md_idle, md_q_valid, start;
  state_e        md_state;
  logic [127:0]  md_q;
  logic [127:0]  pp_result;
  flags_t        pp_flags;

  assign in_ready = md_idle && !ir_valid;
  assign start    = md_idle && ir_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_valid <= 1'b0;
      ir_mode  <= MODE_QP;
      ir_a     <= '0;
      ir_b     <= '0;
    end else if (in_valid && in_ready) begin
      ir_valid <= 1'b1;
      ir_mode  <= in_mode;
      ir_a     <= in_a;
      ir_b     <= in_b;
    end else if (start) begin
      ir_valid <= 1'b0;
    end
  end

  fp_unpack u_unpack_a (
    .mode(ir_mode), .x(ir_a), .sign(sa), .exp(ea), .mant(ma),
    .is_zero(za), .is_inf(ia), .is_nan(na)
  );
  fp_unpack u_unpack_b (
    .mode(ir_mode), .x(ir_b), .sign(sb), .exp(eb), .mant(mb),
    .is_zero(zb), .is_inf(ib), .is_nan(nb)
  );

  exp_sign_unit u_exp (
    .mode(ir_mode), .sign_a(sa), .sign_b(sb), .exp_a(ea), .exp_b(eb),
    .zero_a(za), .inf_a(ia), .nan_a(na), .zero_b(zb), .inf_b(ib), .nan_b(nb),
    .sign_q(s_q), .exp_q(e_q), .bias(bias), .rshift(rshift), .special(spec),
    .invalid(inv), .div_by_zero(dbz)
  );

  recip_lut u_lut (.idx(mb[111:104]), .recip(recip));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_mode  <= MODE_QP;
      r_m1    <= '0;
      r_m2    <= '0;
      r_recip <= '0;
      r_sign  <= 1'b0;
      r_exp   <= '0;
      r_rshift <= '0;
      r_spec  <= SPEC_NONE;
      r_inv   <= 1'b0;
      r_dbz   <= 1'b0;
    end else if (start) begin
      r_mode  <= ir_mode;
      r_m1    <= ma;
      r_m2    <= mb;
      r_recip <= recip;
      r_sign  <= s_q;
      r_exp   <= e_q;
      r_rshift <= rshift;
      r_spec  <= spec;
      r_inv   <= inv;
      r_dbz   <= dbz;
    end
  end

  mant_div u_mant (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(r_mode),
    .m1(r_m1), .m2(r_m2), .recip(r_recip),
    .idle(md_idle), .state(md_state), .q_valid(md_q_valid), .q(md_q)
  );

  post_proc u_post (
    .mode(r_mode), .q(md_q), .sign(r_sign), .exp(r_exp), .rshift(r_rshift),
    .special(r_spec),
    .invalid(r_inv), .div_by_zero(r_dbz), .result(pp_result), .flags(pp_flags)
  );

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_q     <= '0;
      out_flags <= '0;
    end else begin
      out_valid <= md_q_valid;
      if (md_q_valid) begin
        out_q     <= pp_result;
        out_flags <= pp_flags;
      end
    end
  end

`ifndef SYNTHESIS
  // valid/ready rule: an offered operation stays unchanged until accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && !in_ready) |=>
                   (in_valid && $stable(in_mode) && $stable(in_a) && $stable(in_b)))
    else $error("fp_div_top: operation withdrawn or changed before acceptance");
`endif
endmodule
