// gcd_df: dataflow circuit for Euclid's subtractive greatest common divisor
//
//   gcd(a, b) = if a = b then a
//               else if a < b then gcd(a, b - a)
//               else gcd(a - b, b)
//
// Built only from the FHW dataflow blocks. a and b enter through two
// multiplexers steered by a loop-select token (0: new call, 1: loop-back). A
// three-valued comparison (0: a = b, 1: a < b, 2: a > b) is forked to two
// three-way demultiplexers that route a and b into the three arms, and to the
// select loop (loop again when the comparison is not 0). The a < b arm forms
// b - a, the a > b arm a - b; the new a and the new b each come back through
// a two-way nondeterministic merge (only one arm holds a token at any time,
// so the merge order is the arm order). Each of the three loops holds one
// data buffer and one control buffer; the select loop's data buffer starts
// with a token 0. In the a = b arm a is the result and b is discarded.
// One call is in the loop at a time; further calls wait at the inputs. An
// iteration takes a fixed small number of cycles (see the testbench).
module gcd_df #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_valid,
  output logic         a_ready,
  input  logic [W-1:0] a_data,
  input  logic         b_valid,
  output logic         b_ready,
  input  logic [W-1:0] b_data,
  output logic         res_valid,
  input  logic         res_ready,
  output logic [W-1:0] res_data
);
  import fhw_pkg::*;

  // ---- select loop -------------------------------------------------------
  logic sl_v, sl_r, sl_d, sb_v, sb_r, sb_d, sc_v, sc_r, sc_d;
  logic [1:0] sf_v, sf_r;
  logic [1:0][0:0] sf_d;
  df_dbuf #(.W(1), .INIT_VALID(1'b1), .INIT_DATA(1'b0)) u_sel_db (
    .clk, .rst_n, .in_valid(sl_v), .in_ready(sl_r), .in_data(sl_d),
    .out_valid(sb_v), .out_ready(sb_r), .out_data(sb_d));
  df_cbuf #(.W(1)) u_sel_cb (
    .clk, .rst_n, .in_valid(sb_v), .in_ready(sb_r), .in_data(sb_d),
    .out_valid(sc_v), .out_ready(sc_r), .out_data(sc_d));
  df_fork #(.N(2), .W(1)) u_sel_fork (
    .clk, .rst_n, .in_valid(sc_v), .in_ready(sc_r), .in_data(sc_d),
    .out_valid(sf_v), .out_ready(sf_r), .out_data(sf_d));

  // ---- entry multiplexers --------------------------------------------------
  logic al_v, al_r, bl_v, bl_r;              // loop-back a and b
  logic [W-1:0] al_d, bl_d;
  logic [1:0] am_ir, bm_ir;
  logic am_v, am_r, bm_v, bm_r;
  logic [W-1:0] am_d, bm_d;
  df_mux #(.N(2), .W(W)) u_a_mux (
    .sel_valid(sf_v[0]), .sel_ready(sf_r[0]), .sel_data(sf_d[0]),
    .in_valid({al_v, a_valid}), .in_ready(am_ir), .in_data({al_d, a_data}),
    .out_valid(am_v), .out_ready(am_r), .out_data(am_d));
  df_mux #(.N(2), .W(W)) u_b_mux (
    .sel_valid(sf_v[1]), .sel_ready(sf_r[1]), .sel_data(sf_d[1]),
    .in_valid({bl_v, b_valid}), .in_ready(bm_ir), .in_data({bl_d, b_data}),
    .out_valid(bm_v), .out_ready(bm_r), .out_data(bm_d));
  assign a_ready = am_ir[0];
  assign al_r    = am_ir[1];
  assign b_ready = bm_ir[0];
  assign bl_r    = bm_ir[1];

  // ---- compare -------------------------------------------------------------
  logic [1:0] af_v, af_r, bf_v, bf_r;
  logic [1:0][W-1:0] af_d, bf_d;
  df_fork #(.N(2), .W(W)) u_a_fork (
    .clk, .rst_n, .in_valid(am_v), .in_ready(am_r), .in_data(am_d),
    .out_valid(af_v), .out_ready(af_r), .out_data(af_d));
  df_fork #(.N(2), .W(W)) u_b_fork (
    .clk, .rst_n, .in_valid(bm_v), .in_ready(bm_r), .in_data(bm_d),
    .out_valid(bf_v), .out_ready(bf_r), .out_data(bf_d));

  logic c_v, c_r;
  logic [1:0] c_d;
  df_func2 #(.WA(W), .WB(W), .WO(2), .OP(OP_CMP3)) u_cmp (
    .in0_valid(af_v[0]), .in0_ready(af_r[0]), .in0_data(af_d[0]),
    .in1_valid(bf_v[0]), .in1_ready(bf_r[0]), .in1_data(bf_d[0]),
    .out_valid(c_v), .out_ready(c_r), .out_data(c_d));

  logic [2:0] cf_v, cf_r;
  logic [2:0][1:0] cf_d;
  df_fork #(.N(3), .W(2)) u_c_fork (
    .clk, .rst_n, .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
    .out_valid(cf_v), .out_ready(cf_r), .out_data(cf_d));

  // loop again when the comparison is not "equal"
  logic one_r;
  df_func2 #(.WA(2), .WB(1), .WO(1), .OP(OP_NE0)) u_again (
    .in0_valid(cf_v[2]), .in0_ready(cf_r[2]), .in0_data(cf_d[2]),
    .in1_valid(1'b1), .in1_ready(one_r), .in1_data(1'b0),
    .out_valid(sl_v), .out_ready(sl_r), .out_data(sl_d));

  // ---- arms ----------------------------------------------------------------
  logic [2:0] ad_v, ad_r, bd_v, bd_r;
  logic [2:0][W-1:0] ad_d, bd_d;
  df_demux #(.N(3), .W(W)) u_a_demux (
    .sel_valid(cf_v[0]), .sel_ready(cf_r[0]), .sel_data(cf_d[0]),
    .in_valid(af_v[1]), .in_ready(af_r[1]), .in_data(af_d[1]),
    .out_valid(ad_v), .out_ready(ad_r), .out_data(ad_d));
  df_demux #(.N(3), .W(W)) u_b_demux (
    .sel_valid(cf_v[1]), .sel_ready(cf_r[1]), .sel_data(cf_d[1]),
    .in_valid(bf_v[1]), .in_ready(bf_r[1]), .in_data(bf_d[1]),
    .out_valid(bd_v), .out_ready(bd_r), .out_data(bd_d));

  // a = b: a is the result, b is dropped
  assign res_valid = ad_v[0];
  assign ad_r[0]   = res_ready;
  assign res_data  = ad_d[0];
  assign bd_r[0]   = 1'b1;

  // a < b: new a = a, new b = b - a
  logic [1:0] a1_v, a1_r;
  logic [1:0][W-1:0] a1_d;
  df_fork #(.N(2), .W(W)) u_a1_fork (
    .clk, .rst_n, .in_valid(ad_v[1]), .in_ready(ad_r[1]), .in_data(ad_d[1]),
    .out_valid(a1_v), .out_ready(a1_r), .out_data(a1_d));
  logic nb1_v, nb1_r;
  logic [W-1:0] nb1_d;
  df_func2 #(.WA(W), .WB(W), .WO(W), .OP(OP_RSUB)) u_bsub (
    .in0_valid(a1_v[1]), .in0_ready(a1_r[1]), .in0_data(a1_d[1]),
    .in1_valid(bd_v[1]), .in1_ready(bd_r[1]), .in1_data(bd_d[1]),
    .out_valid(nb1_v), .out_ready(nb1_r), .out_data(nb1_d));

  // a > b: new a = a - b, new b = b
  logic [1:0] b2_v, b2_r;
  logic [1:0][W-1:0] b2_d;
  df_fork #(.N(2), .W(W)) u_b2_fork (
    .clk, .rst_n, .in_valid(bd_v[2]), .in_ready(bd_r[2]), .in_data(bd_d[2]),
    .out_valid(b2_v), .out_ready(b2_r), .out_data(b2_d));
  logic na2_v, na2_r;
  logic [W-1:0] na2_d;
  df_func2 #(.WA(W), .WB(W), .WO(W), .OP(OP_SUB)) u_asub (
    .in0_valid(ad_v[2]), .in0_ready(ad_r[2]), .in0_data(ad_d[2]),
    .in1_valid(b2_v[1]), .in1_ready(b2_r[1]), .in1_data(b2_d[1]),
    .out_valid(na2_v), .out_ready(na2_r), .out_data(na2_d));

  // ---- merge the arms and close the loops ----------------------------------
  logic [1:0] amg_r, bmg_r;
  logic amg_v, amg_rd, bmg_v, bmg_rd;
  logic [W-1:0] amg_d, bmg_d;
  logic ams_v, ams_d, bms_v, bms_d;
  df_merge #(.W(W)) u_a_merge (
    .clk, .rst_n, .in_valid({na2_v, a1_v[0]}), .in_ready(amg_r),
    .in_data({na2_d, a1_d[0]}),
    .out_valid(amg_v), .out_ready(amg_rd), .out_data(amg_d),
    .sel_valid(ams_v), .sel_ready(1'b1), .sel_data(ams_d));
  assign a1_r[0] = amg_r[0];
  assign na2_r   = amg_r[1];
  df_merge #(.W(W)) u_b_merge (
    .clk, .rst_n, .in_valid({b2_v[0], nb1_v}), .in_ready(bmg_r),
    .in_data({b2_d[0], nb1_d}),
    .out_valid(bmg_v), .out_ready(bmg_rd), .out_data(bmg_d),
    .sel_valid(bms_v), .sel_ready(1'b1), .sel_data(bms_d));
  assign nb1_r   = bmg_r[0];
  assign b2_r[0] = bmg_r[1];

  logic ab_v, ab_r, bb_v, bb_r;
  logic [W-1:0] ab_d, bb_d;
  df_dbuf #(.W(W)) u_a_db (
    .clk, .rst_n, .in_valid(amg_v), .in_ready(amg_rd), .in_data(amg_d),
    .out_valid(ab_v), .out_ready(ab_r), .out_data(ab_d));
  df_cbuf #(.W(W)) u_a_cb (
    .clk, .rst_n, .in_valid(ab_v), .in_ready(ab_r), .in_data(ab_d),
    .out_valid(al_v), .out_ready(al_r), .out_data(al_d));
  df_dbuf #(.W(W)) u_b_db (
    .clk, .rst_n, .in_valid(bmg_v), .in_ready(bmg_rd), .in_data(bmg_d),
    .out_valid(bb_v), .out_ready(bb_r), .out_data(bb_d));
  df_cbuf #(.W(W)) u_b_cb (
    .clk, .rst_n, .in_valid(bb_v), .in_ready(bb_r), .in_data(bb_d),
    .out_valid(bl_v), .out_ready(bl_r), .out_data(bl_d));
endmodule
