// Datapath of the scalable bit-serial multiplier, W = N + D bits wide.
//
// Per partial-product cycle (ctrl_i.iter) the running sum (RS, RC) passes
// the feedback shifter (>>1 Montgomery, >>2 ordinary) into the upper
// carry-save adder, which adds A*b_i. In Montgomery mode the reduction bit q
// is the XOR of the LSBs of the upper adder's sum and carry outputs, and the
// lower adder adds q*M, making the sum even. In ordinary mode the lower adder
// adds 2A*b_(i+1). The lower adder's outputs are stored unshifted in RS and
// RC. In ordinary mode the two LSBs of RS and RC go, on each cycle with
// ctrl_i.lo_en, through the 2-bit adder into the top of the M register,
// which then holds the low half of the product.
// In the conversion phase (ctrl_i.conv) the lowest D-bit words of RS and RC
// are added by the d-bit adder, the sum enters RS from the top and RC shifts
// in zeros, so after W/D cycles RS holds the binary value. In ordinary mode
// the first word also takes the last carry of the 2-bit adder.
// The structure above follows the published block diagram.
// Result encoding (this design's choice): in Montgomery mode RS ends holding
// twice the result (the last halving is never applied), so the result is
// rs_o[W-1:1]; in ordinary mode rs_o holds the high half of the product.
module mm_datapath
  import mm_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned D = 32,
  localparam int unsigned W = N + D
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         load_a_i,
  input  logic         load_b_i,
  input  logic         load_m_i,
  input  logic [N:0]   a_i,
  input  logic [N:0]   b_i,
  input  logic [N-1:0] m_i,
  input  mode_e        mode_i,
  input  ctrl_t        ctrl_i,
  output logic [W-1:0] rs_o,
  output logic [N-1:0] m_o
);

  logic [N:0]   a_q;
  logic         b0, b1, q;
  logic [W-1:0] rs_q, rc_q, fs, fc, pp1, pp2, s1, c1, s2, c2;
  logic [D-1:0] cpa_sum;
  logic [1:0]   lo_pair;
  logic         lo_carry, conv_cout;

  operand_regs #(.N(N)) u_ops (
    .clk_i, .rst_ni, .load_a_i, .load_b_i, .load_m_i, .a_i, .b_i, .m_i,
    .mode_i, .shift_i(ctrl_i.iter), .lo_en_i(ctrl_i.lo_en), .lo_pair_i(lo_pair),
    .a_o(a_q), .m_o, .b0_o(b0), .b1_o(b1)
  );

  fb_shift #(.W(W)) u_shift (.mode_i, .s_i(rs_q), .c_i(rc_q), .s_o(fs), .c_o(fc));

  pp_gen #(.N(N), .D(D)) u_pp (
    .mode_i, .a_i(a_q), .m_i(m_o), .b0_i(b0), .b1_i(b1), .q_i(q),
    .pp1_o(pp1), .pp2_o(pp2)
  );

  csa #(.W(W)) u_csa_upper (.x_i(fs), .y_i(fc), .z_i(pp1), .s_o(s1), .c_o(c1));

  assign q = s1[0] ^ c1[0];

  csa #(.W(W)) u_csa_lower (.x_i(s1), .y_i(c1), .z_i(pp2), .s_o(s2), .c_o(c2));

  cs_reg #(.W(W), .D(D)) u_rs (
    .clk_i, .rst_ni, .clr_i(ctrl_i.clr), .load_i(ctrl_i.iter), .d_i(s2),
    .shift_i(ctrl_i.conv), .word_i(cpa_sum), .q_o(rs_q)
  );

  cs_reg #(.W(W), .D(D)) u_rc (
    .clk_i, .rst_ni, .clr_i(ctrl_i.clr), .load_i(ctrl_i.iter), .d_i(c2),
    .shift_i(ctrl_i.conv), .word_i('0), .q_o(rc_q)
  );

  word_adder #(.D(D)) u_cpa (
    .clk_i, .rst_ni, .en_i(ctrl_i.conv), .first_i(ctrl_i.conv_first),
    .cin_first_i((mode_i == MODE_MUL) && lo_carry),
    .a_i(rs_q[D-1:0]), .b_i(rc_q[D-1:0]), .sum_o(cpa_sum), .cout_o(conv_cout)
  );

  pair_adder u_lo (
    .clk_i, .rst_ni, .clr_i(ctrl_i.clr), .en_i(ctrl_i.lo_en),
    .s_i(rs_q[1:0]), .c_i(rc_q[1:0]), .sum_o(lo_pair), .carry_o(lo_carry)
  );

  assign rs_o       = rs_q;

  // In Montgomery mode the lower adder's result must be even, with both LSBs
  // zero, so that the 1-bit feedback shift loses nothing.
  a_mont_even: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (ctrl_i.iter && mode_i == MODE_MONT) |-> (s2[0] == 1'b0 && c2[0] == 1'b0));

  // The converted value fits in W bits: the last word produces no carry.
  a_conv_fits: assert property (@(posedge clk_i) disable iff (!rst_ni)
    ctrl_i.conv_last |-> !conv_cout);

endmodule
