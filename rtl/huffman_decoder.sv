// huffman_decoder: hardware form of the functional Huffman decoder
//
//   decode table str = bit str table where
//     bit (False:xs) (Branch l _) = bit xs l
//     bit (True:xs)  (Branch _ r) = bit xs r
//     bit x          (Leaf c)     = c : bit x table
//     bit []         _            = []
//
// All three data structures live in memories as tagged bit vectors (layouts
// in fhw_pkg): the Huffman tree (512 nodes of 19 bits, 9-bit pointers), the
// input Boolean list (4096 cells of 14 bits, 12-bit pointers) and the output
// character list (1024 cells of 19 bits, 10-bit pointers). The recursive
// function bit is tail recursive and becomes a loop whose state is the pair
// (tree pointer, input pointer). Tree nodes and input cells are fetched
// through two df_read nodes, both in flight at once, so a Branch that
// consumes a bit takes two cycles and a Leaf, which emits a character and
// restarts at the root without touching the input, takes two cycles as well.
//
// The output list is written from address 0 upwards: cell i holds
// Cons(c_i, pointer i+1), and the list ends with a Nil cell; the list head is
// therefore always address 0. The pattern order is kept: a Leaf emits its
// character even when the input is exhausted, so a tree that is a single Leaf
// never terminates, as in the functional definition.
//
// Interface: start (valid/ready) with the tree root and the input list head;
// done (valid/ready) with the number of characters written. The tree and
// input memories are loaded through plain write ports; the output memory is
// read through out_rd_addr with its data one cycle later. The caller keeps the
// output within 1023 characters (this design does not check it).
module huffman_decoder import fhw_pkg::*; (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_valid,
  output logic                 start_ready,
  input  logic [HT_PTR_W-1:0]  start_root,
  input  logic [BL_PTR_W-1:0]  start_list,
  output logic                 done_valid,
  input  logic                 done_ready,
  output logic [CL_PTR_W:0]    done_count,
  input  logic                 tree_wr_en,
  input  logic [HT_PTR_W-1:0]  tree_wr_addr,
  input  htree_t               tree_wr_data,
  input  logic                 in_wr_en,
  input  logic [BL_PTR_W-1:0]  in_wr_addr,
  input  blist_t               in_wr_data,
  input  logic [CL_PTR_W-1:0]  out_rd_addr,
  output clist_t               out_rd_data
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [HT_PTR_W-1:0] root, node_ptr;
  logic [BL_PTR_W-1:0] in_ptr;
  logic [CL_PTR_W:0]   out_cnt;
  blist_t              in_cell;
  logic                in_have, in_pend, node_pend;

  // ---- memory read nodes ---------------------------------------------------
  logic   t_req_v, t_req_r, t_rsp_v, t_rsp_r;
  htree_t t_rsp_d;
  logic   i_req_v, i_req_r, i_rsp_v;
  blist_t i_rsp_d;
  logic   run;

  assign run = (state == S_RUN);

  df_read #(.AW(HT_PTR_W), .W($bits(htree_t))) u_tree (
    .clk, .rst_n, .in_valid(t_req_v), .in_ready(t_req_r), .in_data(node_ptr),
    .out_valid(t_rsp_v), .out_ready(t_rsp_r), .out_data(t_rsp_d),
    .wr_en(tree_wr_en), .wr_addr(tree_wr_addr), .wr_data(tree_wr_data));

  df_read #(.AW(BL_PTR_W), .W($bits(blist_t))) u_input (
    .clk, .rst_n, .in_valid(i_req_v), .in_ready(i_req_r), .in_data(in_ptr),
    .out_valid(i_rsp_v), .out_ready(1'b1), .out_data(i_rsp_d),
    .wr_en(in_wr_en), .wr_addr(in_wr_addr), .wr_data(in_wr_data));

  assign t_req_v = run & ~node_pend;
  assign i_req_v = run & ~in_have & ~in_pend;

  // ---- one step of 'bit' -----------------------------------------------------
  blist_t in_word;
  logic   in_avail, is_leaf, step_leaf, step_branch, finish;
  assign in_word        = in_have ? in_cell : i_rsp_d;
  assign in_avail    = in_have | i_rsp_v;
  assign is_leaf     = t_rsp_d.is_leaf;
  assign step_leaf   = run & t_rsp_v & is_leaf;
  assign step_branch = run & t_rsp_v & ~is_leaf & in_avail & in_word.is_cons;
  assign finish      = run & t_rsp_v & ~is_leaf & in_avail & ~in_word.is_cons;
  assign t_rsp_r     = step_leaf | step_branch | finish;

  // ---- output list memory ------------------------------------------------------
  clist_t out_mem [2**CL_PTR_W];
  logic   out_we;
  clist_t out_wd;
  assign out_we = step_leaf | finish;
  always_comb begin
    out_wd.next    = CL_PTR_W'(out_cnt + 1'b1);
    out_wd.c       = t_rsp_d.right[7:0];
    out_wd.is_cons = 1'b1;
    if (finish) out_wd = '0;             // Nil
  end
  always_ff @(posedge clk) begin
    if (out_we) out_mem[out_cnt[CL_PTR_W-1:0]] <= out_wd;
    out_rd_data <= out_mem[out_rd_addr];
  end

  // ---- control -------------------------------------------------------------------
  assign start_ready = (state == S_IDLE);
  assign done_valid  = (state == S_DONE);
  assign done_count  = out_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      root <= '0; node_ptr <= '0; in_ptr <= '0; out_cnt <= '0;
      in_cell <= '0; in_have <= 1'b0; in_pend <= 1'b0; node_pend <= 1'b0;
    end else begin
      if (t_req_v && t_req_r)  node_pend <= 1'b1;
      if (t_rsp_v && t_rsp_r)  node_pend <= 1'b0;
      if (i_req_v && i_req_r)  in_pend   <= 1'b1;
      if (i_rsp_v) begin
        in_pend <= 1'b0;
        if (!(step_branch || finish)) begin
          in_have <= 1'b1;
          in_cell <= i_rsp_d;
        end
      end
      unique case (state)
        S_IDLE: if (start_valid) begin
          state    <= S_RUN;
          root     <= start_root;
          node_ptr <= start_root;
          in_ptr   <= start_list;
          out_cnt  <= '0;
          in_have  <= 1'b0;
        end
        S_RUN: begin
          if (step_leaf) begin
            node_ptr <= root;
            out_cnt  <= out_cnt + 1'b1;
          end
          if (step_branch) begin
            node_ptr <= in_word.b ? t_rsp_d.right : t_rsp_d.left;
            in_ptr   <= in_word.next;
            in_have  <= 1'b0;
          end
          if (finish) begin
            in_have <= 1'b0;
            state   <= S_DONE;
          end
        end
        S_DONE: if (done_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
