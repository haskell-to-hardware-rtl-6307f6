// fhw_top: the FHW example circuits side by side.
//
// Four independent circuits produced by the functional-to-hardware flow share
// only the clock and reset; each keeps its own ports, prefixed:
//   huf_  Huffman decoder over tree/input/output list memories
//   fib_  Fibonacci with continuations held in an explicit stack
//   sum_  dataflow circuit summing a linked list held in memory
//   gcd_  dataflow circuit for the subtractive GCD
//   tmp_  parallel tree map (task duplicated, heap and stack partitioned)
// All handshakes are valid/ready: a token moves in a cycle where both are 1.
// See each module for its timing.
module fhw_top import fhw_pkg::*; #(
  parameter int unsigned W       = 32,  // integer width of sum, gcd and fib
  parameter int unsigned SUM_AW  = 12,  // list memory pointer width
  parameter int unsigned FIB_AW  = 6,  // continuation stack pointer width
  parameter int unsigned TREE_PW = 10, // tree heap pointer width
  parameter int unsigned TREE_SW = 8   // tree map stack pointer width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Huffman decoder
  input  logic                 huf_start_valid,
  output logic                 huf_start_ready,
  input  logic [HT_PTR_W-1:0]  huf_start_root,
  input  logic [BL_PTR_W-1:0]  huf_start_list,
  output logic                 huf_done_valid,
  input  logic                 huf_done_ready,
  output logic [CL_PTR_W:0]    huf_done_count,
  input  logic                 huf_tree_wr_en,
  input  logic [HT_PTR_W-1:0]  huf_tree_wr_addr,
  input  htree_t               huf_tree_wr_data,
  input  logic                 huf_in_wr_en,
  input  logic [BL_PTR_W-1:0]  huf_in_wr_addr,
  input  blist_t               huf_in_wr_data,
  input  logic [CL_PTR_W-1:0]  huf_out_rd_addr,
  output clist_t               huf_out_rd_data,
  // Fibonacci
  input  logic                 fib_start_valid,
  output logic                 fib_start_ready,
  input  logic [W-1:0]         fib_start_n,
  output logic                 fib_res_valid,
  input  logic                 fib_res_ready,
  output logic [W-1:0]         fib_res_value,
  output logic                 fib_res_overflow,
  // list sum
  input  logic                 sum_lp_valid,
  output logic                 sum_lp_ready,
  input  logic [SUM_AW-1:0]    sum_lp_data,
  input  logic                 sum_s_valid,
  output logic                 sum_s_ready,
  input  logic [W-1:0]         sum_s_data,
  output logic                 sum_res_valid,
  input  logic                 sum_res_ready,
  output logic [W-1:0]         sum_res_data,
  input  logic                 sum_wr_en,
  input  logic [SUM_AW-1:0]    sum_wr_addr,
  input  logic [SUM_AW+W:0]    sum_wr_data,
  // GCD
  input  logic                 gcd_a_valid,
  output logic                 gcd_a_ready,
  input  logic [W-1:0]         gcd_a_data,
  input  logic                 gcd_b_valid,
  output logic                 gcd_b_ready,
  input  logic [W-1:0]         gcd_b_data,
  output logic                 gcd_res_valid,
  input  logic                 gcd_res_ready,
  output logic [W-1:0]         gcd_res_data,
  // parallel tree map
  input  logic                 tmp_start_valid,
  output logic                 tmp_start_ready,
  input  logic [TREE_PW-1:0]   tmp_start_root,
  input  logic [TREE_PW-1:0]   tmp_start_free_a,
  input  logic [TREE_PW-1:0]   tmp_start_free_b,
  output logic                 tmp_done_valid,
  input  logic                 tmp_done_ready,
  output logic [TREE_PW-1:0]   tmp_done_root,
  input  logic                 tmp_host_we,
  input  logic [TREE_PW-1:0]   tmp_host_addr,
  input  logic [2*TREE_PW+W:0] tmp_host_wdata,
  output logic [2*TREE_PW+W:0] tmp_host_rdata
);
  huffman_decoder u_huf (
    .clk, .rst_n,
    .start_valid(huf_start_valid), .start_ready(huf_start_ready),
    .start_root(huf_start_root), .start_list(huf_start_list),
    .done_valid(huf_done_valid), .done_ready(huf_done_ready),
    .done_count(huf_done_count),
    .tree_wr_en(huf_tree_wr_en), .tree_wr_addr(huf_tree_wr_addr),
    .tree_wr_data(huf_tree_wr_data),
    .in_wr_en(huf_in_wr_en), .in_wr_addr(huf_in_wr_addr),
    .in_wr_data(huf_in_wr_data),
    .out_rd_addr(huf_out_rd_addr), .out_rd_data(huf_out_rd_data));

  fib_cps #(.W(W), .AW(FIB_AW)) u_fib (
    .clk, .rst_n,
    .start_valid(fib_start_valid), .start_ready(fib_start_ready),
    .start_n(fib_start_n),
    .res_valid(fib_res_valid), .res_ready(fib_res_ready),
    .res_value(fib_res_value), .res_overflow(fib_res_overflow));

  sum_list #(.AW(SUM_AW), .W(W)) u_sum (
    .clk, .rst_n,
    .lp_valid(sum_lp_valid), .lp_ready(sum_lp_ready), .lp_data(sum_lp_data),
    .s_valid(sum_s_valid), .s_ready(sum_s_ready), .s_data(sum_s_data),
    .res_valid(sum_res_valid), .res_ready(sum_res_ready),
    .res_data(sum_res_data),
    .wr_en(sum_wr_en), .wr_addr(sum_wr_addr), .wr_data(sum_wr_data));

  gcd_df #(.W(W)) u_gcd (
    .clk, .rst_n,
    .a_valid(gcd_a_valid), .a_ready(gcd_a_ready), .a_data(gcd_a_data),
    .b_valid(gcd_b_valid), .b_ready(gcd_b_ready), .b_data(gcd_b_data),
    .res_valid(gcd_res_valid), .res_ready(gcd_res_ready),
    .res_data(gcd_res_data));

  tree_map_par #(.PW(TREE_PW), .W(W), .SW(TREE_SW)) u_tmp (
    .clk, .rst_n,
    .start_valid(tmp_start_valid), .start_ready(tmp_start_ready),
    .start_root(tmp_start_root), .start_free_a(tmp_start_free_a),
    .start_free_b(tmp_start_free_b),
    .done_valid(tmp_done_valid), .done_ready(tmp_done_ready),
    .done_root(tmp_done_root),
    .host_we(tmp_host_we), .host_addr(tmp_host_addr),
    .host_wdata(tmp_host_wdata), .host_rdata(tmp_host_rdata));
endmodule
