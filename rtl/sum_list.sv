// sum_list: dataflow circuit for the tail-recursive list sum
//
//   sum lp s = case read lp of
//                Nil       -> s
//                Cons x xs -> sum xs (s + x)
//
// Structure (following the FHW translation of a non-strict tail-recursive
// function): the two arguments lp and s each enter the loop through their own
// multiplexer, steered by its own select token (0: take a new call from
// outside, 1: take the loop-back value). lp is read from memory and the cell
// read is forked four ways: into a demultiplexer that splits a Cons into x
// and xs, as the select of that demultiplexer, as "loop again?" for the lp
// select loop, and across to the s side. There the tag is forked again, to a
// demultiplexer on s (Nil: s is the result; Cons: s goes to the adder) and,
// as "loop again?", to the s select loop. The tail call is a physical loop:
// xs goes back to the lp multiplexer and s + x back to the s multiplexer.
// Each of the four loops holds one data buffer and one control buffer; the
// data buffers of the two select loops start with a token 0 so that the first
// call is taken from the inputs. The channels crossing from the lp side to
// the s side (the tag and x) each hold a data and a control buffer too, so
// the lp side can read up to two cells ahead of the additions, for instance
// while s has not arrived yet (pipeline parallelism from non-strictness;
// the buffer sizes set how far ahead it can run). The list side runs at one
// cell every two cycles (the memory read and the xs data buffer).
//
// List cell layout (this design's choice, in the style of the FHW encoding):
// {next pointer [AW], element [W], tag}, tag 1 = Cons, 0 = Nil. The list
// memory (2**AW cells) is loaded through wr_en/wr_addr/wr_data.
// Interface: valid/ready channels lp_in, s_in (one call = one token on each),
// result. Several calls may be queued; results come out in call order.
module sum_list #(
  parameter int unsigned AW = 12,
  parameter int unsigned W  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lp_valid,
  output logic            lp_ready,
  input  logic [AW-1:0]   lp_data,
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [W-1:0]    s_data,
  output logic            res_valid,
  input  logic            res_ready,
  output logic [W-1:0]    res_data,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  logic [AW+W:0]   wr_data
);
  localparam int unsigned CW = AW + W + 1;

  // ---- lp select loop ----------------------------------------------------
  logic sl_v, sl_r, sl_d;            // loop condition from the cell fork
  logic sb_v, sb_r, sb_d;            // after data buffer
  logic sc_v, sc_r, sc_d;            // after control buffer

  df_dbuf #(.W(1), .INIT_VALID(1'b1), .INIT_DATA(1'b0)) u_lsel_db (
    .clk, .rst_n, .in_valid(sl_v), .in_ready(sl_r), .in_data(sl_d),
    .out_valid(sb_v), .out_ready(sb_r), .out_data(sb_d));
  df_cbuf #(.W(1)) u_lsel_cb (
    .clk, .rst_n, .in_valid(sb_v), .in_ready(sb_r), .in_data(sb_d),
    .out_valid(sc_v), .out_ready(sc_r), .out_data(sc_d));

  // ---- lp side -----------------------------------------------------------
  logic [1:0] lpm_iv, lpm_ir;
  logic [1:0][AW-1:0] lpm_id;
  logic lpm_v, lpm_r;
  logic [AW-1:0] lpm_d;
  logic xs_v, xs_r, xsb_v, xsb_r, xsc_v, xsc_r;
  logic [AW-1:0] xs_d, xsb_d, xsc_d;

  assign lpm_iv = {xsc_v, lp_valid};
  assign lpm_id = {xsc_d, lp_data};
  assign lp_ready = lpm_ir[0];
  assign xsc_r    = lpm_ir[1];

  df_mux #(.N(2), .W(AW)) u_lp_mux (
    .sel_valid(sc_v), .sel_ready(sc_r), .sel_data(sc_d),
    .in_valid(lpm_iv), .in_ready(lpm_ir), .in_data(lpm_id),
    .out_valid(lpm_v), .out_ready(lpm_r), .out_data(lpm_d));

  logic rd_v, rd_r;
  logic [CW-1:0] rd_d;
  df_read #(.AW(AW), .W(CW)) u_read (
    .clk, .rst_n, .in_valid(lpm_v), .in_ready(lpm_r), .in_data(lpm_d),
    .out_valid(rd_v), .out_ready(rd_r), .out_data(rd_d),
    .wr_en, .wr_addr, .wr_data);

  // cell fork: 0 data to cell demux, 1 its select, 2 tag to the s side,
  // 3 lp loop condition
  logic [3:0] cf_v, cf_r;
  logic [3:0][CW-1:0] cf_d;
  df_fork #(.N(4), .W(CW)) u_cell_fork (
    .clk, .rst_n, .in_valid(rd_v), .in_ready(rd_r), .in_data(rd_d),
    .out_valid(cf_v), .out_ready(cf_r), .out_data(cf_d));

  logic [1:0] cd_v, cd_r;
  logic [1:0][CW-1:0] cd_d;
  df_demux #(.N(2), .W(CW)) u_cell_demux (
    .sel_valid(cf_v[1]), .sel_ready(cf_r[1]), .sel_data(cf_d[1][0]),
    .in_valid(cf_v[0]), .in_ready(cf_r[0]), .in_data(cf_d[0]),
    .out_valid(cd_v), .out_ready(cd_r), .out_data(cd_d));
  assign cd_r[0] = 1'b1;             // Nil cell: nothing to pass on

  // Cons x xs: split into the two fields
  logic [1:0] cons_v, cons_r;
  logic [1:0][CW-1:0] cons_d;
  df_fork #(.N(2), .W(CW)) u_cons_fork (
    .clk, .rst_n, .in_valid(cd_v[1]), .in_ready(cd_r[1]), .in_data(cd_d[1]),
    .out_valid(cons_v), .out_ready(cons_r), .out_data(cons_d));

  assign xs_v = cons_v[0];
  assign cons_r[0] = xs_r;
  assign xs_d = cons_d[0][CW-1 -: AW];

  df_dbuf #(.W(AW)) u_xs_db (
    .clk, .rst_n, .in_valid(xs_v), .in_ready(xs_r), .in_data(xs_d),
    .out_valid(xsb_v), .out_ready(xsb_r), .out_data(xsb_d));
  df_cbuf #(.W(AW)) u_xs_cb (
    .clk, .rst_n, .in_valid(xsb_v), .in_ready(xsb_r), .in_data(xsb_d),
    .out_valid(xsc_v), .out_ready(xsc_r), .out_data(xsc_d));

  assign sl_v = cf_v[3];
  assign cf_r[3] = sl_r;
  assign sl_d = cf_d[3][0];

  // ---- crossing from the lp side to the s side ------------------------------
  logic tb_v, tb_r, tb_d, tc_v, tc_r, tc_d;
  df_dbuf #(.W(1)) u_tag_db (
    .clk, .rst_n, .in_valid(cf_v[2]), .in_ready(cf_r[2]), .in_data(cf_d[2][0]),
    .out_valid(tb_v), .out_ready(tb_r), .out_data(tb_d));
  df_cbuf #(.W(1)) u_tag_cb (
    .clk, .rst_n, .in_valid(tb_v), .in_ready(tb_r), .in_data(tb_d),
    .out_valid(tc_v), .out_ready(tc_r), .out_data(tc_d));
  logic [1:0] tf_v, tf_r;
  logic [1:0][0:0] tf_d;
  df_fork #(.N(2), .W(1)) u_tag_fork (
    .clk, .rst_n, .in_valid(tc_v), .in_ready(tc_r), .in_data(tc_d),
    .out_valid(tf_v), .out_ready(tf_r), .out_data(tf_d));

  logic xb_v, xb_r, xc_v, xc_r;
  logic [W-1:0] xb_d, xc_d;
  df_dbuf #(.W(W)) u_x_db (
    .clk, .rst_n, .in_valid(cons_v[1]), .in_ready(cons_r[1]), .in_data(cons_d[1][W:1]),
    .out_valid(xb_v), .out_ready(xb_r), .out_data(xb_d));
  df_cbuf #(.W(W)) u_x_cb (
    .clk, .rst_n, .in_valid(xb_v), .in_ready(xb_r), .in_data(xb_d),
    .out_valid(xc_v), .out_ready(xc_r), .out_data(xc_d));

  // ---- s select loop ----------------------------------------------------------
  logic ssb_v, ssb_r, ssb_d, ssc_v, ssc_r, ssc_d;
  df_dbuf #(.W(1), .INIT_VALID(1'b1), .INIT_DATA(1'b0)) u_ssel_db (
    .clk, .rst_n, .in_valid(tf_v[1]), .in_ready(tf_r[1]), .in_data(tf_d[1]),
    .out_valid(ssb_v), .out_ready(ssb_r), .out_data(ssb_d));
  df_cbuf #(.W(1)) u_ssel_cb (
    .clk, .rst_n, .in_valid(ssb_v), .in_ready(ssb_r), .in_data(ssb_d),
    .out_valid(ssc_v), .out_ready(ssc_r), .out_data(ssc_d));

  // ---- s side ------------------------------------------------------------
  logic [1:0] sm_iv, sm_ir;
  logic [1:0][W-1:0] sm_id;
  logic sm_v, sm_r;
  logic [W-1:0] sm_d;
  logic acc_v, acc_r, accb_v, accb_r, accc_v, accc_r;
  logic [W-1:0] acc_d, accb_d, accc_d;

  assign sm_iv = {accc_v, s_valid};
  assign sm_id = {accc_d, s_data};
  assign s_ready = sm_ir[0];
  assign accc_r  = sm_ir[1];

  df_mux #(.N(2), .W(W)) u_s_mux (
    .sel_valid(ssc_v), .sel_ready(ssc_r), .sel_data(ssc_d),
    .in_valid(sm_iv), .in_ready(sm_ir), .in_data(sm_id),
    .out_valid(sm_v), .out_ready(sm_r), .out_data(sm_d));

  logic [1:0] sd_v, sd_r;
  logic [1:0][W-1:0] sd_d;
  df_demux #(.N(2), .W(W)) u_s_demux (
    .sel_valid(tf_v[0]), .sel_ready(tf_r[0]), .sel_data(tf_d[0]),
    .in_valid(sm_v), .in_ready(sm_r), .in_data(sm_d),
    .out_valid(sd_v), .out_ready(sd_r), .out_data(sd_d));

  assign res_valid = sd_v[0];
  assign sd_r[0]   = res_ready;
  assign res_data  = sd_d[0];

  df_func2 #(.WA(W), .WB(W), .WO(W), .OP(fhw_pkg::OP_ADD)) u_add (
    .in0_valid(sd_v[1]), .in0_ready(sd_r[1]), .in0_data(sd_d[1]),
    .in1_valid(xc_v), .in1_ready(xc_r), .in1_data(xc_d),
    .out_valid(acc_v), .out_ready(acc_r), .out_data(acc_d));

  df_dbuf #(.W(W)) u_acc_db (
    .clk, .rst_n, .in_valid(acc_v), .in_ready(acc_r), .in_data(acc_d),
    .out_valid(accb_v), .out_ready(accb_r), .out_data(accb_d));
  df_cbuf #(.W(W)) u_acc_cb (
    .clk, .rst_n, .in_valid(accb_v), .in_ready(accb_r), .in_data(accb_d),
    .out_valid(accc_v), .out_ready(accc_r), .out_data(accc_d));
endmodule
