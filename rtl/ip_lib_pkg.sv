// Port bundles of the IP-library collection: every library component's
// inputs in lib_in_t and outputs in lib_out_t, one field group per
// component, at each component's default width.
package ip_lib_pkg;

  typedef struct packed {
    logic [7:0]        add_a, add_b;       logic add_ci;            // ip_adder
    logic [7:0]        and_a, and_b;                                // ip_and
    logic [7:0]        or_a, or_b;                                  // ip_or
    logic [7:0]        xor_a, xor_b;                                // ip_xor
    logic [7:0]        not_a;                                       // ip_not
    logic              cnt_clr, cnt_en;                             // bin_up_cntr
    logic [7:0]        big_a, big_b;                                // ip_bigger
    logic signed [7:0] mul_a, mul_b;                                // booth_mult
    logic [7:0]        div_n, div_d;                                // ip_div
    logic [15:0]       bsh_din; logic [3:0] bsh_amt; logic bsh_left, bsh_rot; // barrel_shifter
    logic [7:0]        enc_d;                                       // ip_encoder
    logic [15:0]       cla_a, cla_b;       logic cla_ci;            // cla_adder
    logic [7:0]        rip_a, rip_b;       logic rip_ci;            // ripple_adder
    logic [7:0]        eq_a, eq_b;                                  // equal_checker
    logic              fifo_push, fifo_pop; logic [7:0] fifo_din;   // ip_fifo
    logic              lfsr_load, lfsr_en; logic [31:0] lfsr_seed;  // ip_lfsr
    logic [2:0]        dec_a;              logic dec_en;            // decoder_3to8
    logic [3:0][7:0]   mux_d;              logic [1:0] mux_sel;     // ip_mux
    logic [3:0]        ham_d;                                       // hamming_enc
    logic [6:0]        hdec_c;                                      // hamming_dec
    logic              pdc_load, pdc_en;   logic [7:0] pdc_d;       // parallel_dwn_cntr
    logic              vot_a, vot_b, vot_c;                         // three_major_voter
    logic              ttl_oe_n;           logic [7:0] ttl_d;       // ttl374
    logic              obt_dir, obt_g_n;   logic [7:0] obt_a_in, obt_b_in; // oct_bus_trans
    logic              sh_load, sh_en, sh_left, sh_sin; logic [7:0] sh_d; // ip_shift
    logic              uc_load, uc_en, uc_up; logic [7:0] uc_d;     // uni_cntr
  } lib_in_t;

  typedef struct packed {
    logic [7:0]         add_s;    logic add_co;
    logic [7:0]         and_y, or_y, xor_y, not_y;
    logic [7:0]         cnt_q;
    logic               big_gt;
    logic signed [15:0] mul_p;
    logic [7:0]         div_q, div_r;
    logic [15:0]        bsh_dout;
    logic [2:0]         enc_idx;  logic enc_valid;
    logic [15:0]        cla_s;    logic cla_co;
    logic [7:0]         rip_s;    logic rip_co;
    logic               eq_eq;
    logic [7:0]         fifo_dout; logic fifo_full, fifo_empty;
    logic [31:0]        lfsr_q;
    logic [7:0]         dec_y;
    logic [7:0]         mux_y;
    logic [6:0]         ham_c;
    logic [3:0]         hdec_d;   logic hdec_err;
    logic [7:0]         pdc_q;    logic pdc_zero;
    logic               vot_y;
    logic [7:0]         ttl_q;    logic ttl_q_en;
    logic [7:0]         obt_a_out, obt_b_out; logic obt_a_en, obt_b_en;
    logic [7:0]         sh_q;     logic sh_sout;
    logic [7:0]         uc_q;     logic uc_tc;
  } lib_out_t;

endpackage
