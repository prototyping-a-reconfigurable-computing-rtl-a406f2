// The IP library as hardware: one instance of each library component at its
// default width, side by side, each with its own inputs and outputs brought
// out through the lib_in_t / lib_out_t bundles. The components do not
// interact; this module only gathers them so that a single design holds the
// whole library. Sequential components share clk and rst_n.
module ip_library
  import ip_lib_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  lib_in_t  li,
  output lib_out_t lo
);

  ip_adder          u_add (.A(li.add_a), .B(li.add_b), .CI(li.add_ci), .S(lo.add_s), .CO(lo.add_co));
  ip_and            u_and (.A(li.and_a), .B(li.and_b), .Y(lo.and_y));
  ip_or             u_or  (.A(li.or_a),  .B(li.or_b),  .Y(lo.or_y));
  ip_xor            u_xor (.A(li.xor_a), .B(li.xor_b), .Y(lo.xor_y));
  ip_not            u_not (.A(li.not_a), .Y(lo.not_y));
  bin_up_cntr       u_cnt (.clk(clk), .rst_n(rst_n), .clr(li.cnt_clr), .en(li.cnt_en), .q(lo.cnt_q));
  ip_bigger         u_big (.A(li.big_a), .B(li.big_b), .GT(lo.big_gt));
  booth_mult        u_mul (.A(li.mul_a), .B(li.mul_b), .P(lo.mul_p));
  ip_div            u_div (.N(li.div_n), .D(li.div_d), .Q(lo.div_q), .R(lo.div_r));
  barrel_shifter    u_bsh (.DIN(li.bsh_din), .AMT(li.bsh_amt), .LEFT(li.bsh_left), .ROT(li.bsh_rot),
                           .DOUT(lo.bsh_dout));
  ip_encoder        u_enc (.D(li.enc_d), .IDX(lo.enc_idx), .VALID(lo.enc_valid));
  cla_adder         u_cla (.A(li.cla_a), .B(li.cla_b), .CI(li.cla_ci), .S(lo.cla_s), .CO(lo.cla_co));
  ripple_adder      u_rip (.A(li.rip_a), .B(li.rip_b), .CI(li.rip_ci), .S(lo.rip_s), .CO(lo.rip_co));
  equal_checker     u_eq  (.A(li.eq_a), .B(li.eq_b), .EQ(lo.eq_eq));
  ip_fifo           u_fifo (.clk(clk), .rst_n(rst_n), .PUSH(li.fifo_push), .DIN(li.fifo_din), .POP(li.fifo_pop),
                            .DOUT(lo.fifo_dout), .FULL(lo.fifo_full), .EMPTY(lo.fifo_empty));
  ip_lfsr           u_lfsr (.clk(clk), .rst_n(rst_n), .load(li.lfsr_load), .seed(li.lfsr_seed), .en(li.lfsr_en),
                            .q(lo.lfsr_q));
  decoder_3to8      u_dec (.A(li.dec_a), .EN(li.dec_en), .Y(lo.dec_y));
  ip_mux            u_mux (.D(li.mux_d), .SEL(li.mux_sel), .Y(lo.mux_y));
  hamming_enc       u_henc (.D(li.ham_d), .C(lo.ham_c));
  hamming_dec       u_hdec (.C(li.hdec_c), .D(lo.hdec_d), .ERR(lo.hdec_err));
  parallel_dwn_cntr u_pdc (.clk(clk), .rst_n(rst_n), .LOAD(li.pdc_load), .D(li.pdc_d), .EN(li.pdc_en),
                           .Q(lo.pdc_q), .ZERO(lo.pdc_zero));
  three_major_voter u_vot (.A(li.vot_a), .B(li.vot_b), .C(li.vot_c), .Y(lo.vot_y));
  ttl374            u_ttl (.CLK(clk), .OE_N(li.ttl_oe_n), .D(li.ttl_d), .Q(lo.ttl_q), .Q_EN(lo.ttl_q_en));
  oct_bus_trans     u_obt (.DIR(li.obt_dir), .G_N(li.obt_g_n), .A_IN(li.obt_a_in), .B_IN(li.obt_b_in),
                           .A_OUT(lo.obt_a_out), .B_OUT(lo.obt_b_out), .A_EN(lo.obt_a_en), .B_EN(lo.obt_b_en));
  ip_shift          u_sh (.clk(clk), .rst_n(rst_n), .LOAD(li.sh_load), .D(li.sh_d), .EN(li.sh_en),
                          .LEFT(li.sh_left), .SIN(li.sh_sin), .Q(lo.sh_q), .SOUT(lo.sh_sout));
  uni_cntr          u_uc (.clk(clk), .rst_n(rst_n), .LOAD(li.uc_load), .D(li.uc_d), .EN(li.uc_en), .UP(li.uc_up),
                          .Q(lo.uc_q), .TC(lo.uc_tc));

endmodule
