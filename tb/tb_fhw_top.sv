// tb_fhw_top: end-to-end test of all four circuits at their default sizes,
// running at the same time. It loads a random Huffman tree and an encoded
// message, a set of linked lists, and then issues decode, list-sum, GCD and
// Fibonacci calls concurrently, each checked against a result computed here.
// It counts how often each mechanism occurred and fails if one never did:
// Huffman Leaf / Branch / end-of-input steps; list-sum reads running ahead of
// the additions, a control buffer diverting a token, result backpressure;
// GCD a<b and a>b arms; Fibonacci K1 and K2 continuations and stack overflow;
// tree map: the left map running beside the copy chain, subtrees copied into
// and out of the second heap, and a bare Leaf returned unchanged.
module tb_fhw_top;
  import fhw_pkg::*;
  localparam int W = 32, SUM_AW = 12, NSYM = 9, NCH = 60, NL = 6, NG = 12, NF = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic huf_start_valid, huf_start_ready, huf_done_valid, huf_done_ready;
  logic [HT_PTR_W-1:0] huf_start_root, huf_tree_wr_addr;
  logic [BL_PTR_W-1:0] huf_start_list, huf_in_wr_addr;
  logic [CL_PTR_W:0] huf_done_count;
  logic huf_tree_wr_en, huf_in_wr_en;
  htree_t huf_tree_wr_data;
  blist_t huf_in_wr_data;
  logic [CL_PTR_W-1:0] huf_out_rd_addr;
  clist_t huf_out_rd_data;
  logic fib_start_valid, fib_start_ready, fib_res_valid, fib_res_ready, fib_res_overflow;
  logic [W-1:0] fib_start_n, fib_res_value;
  logic sum_lp_valid, sum_lp_ready, sum_s_valid, sum_s_ready, sum_res_valid, sum_res_ready;
  logic [SUM_AW-1:0] sum_lp_data, sum_wr_addr;
  logic [W-1:0] sum_s_data, sum_res_data;
  logic sum_wr_en;
  logic [SUM_AW+W:0] sum_wr_data;
  logic gcd_a_valid, gcd_a_ready, gcd_b_valid, gcd_b_ready, gcd_res_valid, gcd_res_ready;
  logic [W-1:0] gcd_a_data, gcd_b_data, gcd_res_data;
  localparam int TPW = 10, TDW = 2*TPW + W + 1;
  logic tmp_start_valid, tmp_start_ready, tmp_done_valid, tmp_done_ready, tmp_host_we;
  logic [TPW-1:0] tmp_start_root, tmp_start_free_a, tmp_start_free_b, tmp_done_root, tmp_host_addr;
  logic [TDW-1:0] tmp_host_wdata, tmp_host_rdata;

  fhw_top dut (.*);

  int checks = 0, failures = 0;
  bit loaded = 0;
  int n_leaf = 0, n_branch = 0, n_finish = 0, max_ahead = 0, reads = 0, adds = 0;
  int n_divert = 0, n_backp = 0, n_lt = 0, n_gt = 0, n_k1 = 0, n_k2 = 0, n_ovf = 0;
  int n_par = 0, n_tocopy = 0, n_fromcopy = 0, n_leafroot = 0;

  // ---- mechanism monitors ----------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (dut.u_huf.step_leaf)   n_leaf++;
    if (dut.u_huf.step_branch) n_branch++;
    if (dut.u_huf.finish)      n_finish++;
    if (dut.u_sum.lpm_v && dut.u_sum.lpm_r) reads++;
    if (dut.u_sum.sm_v && dut.u_sum.sm_r)   adds++;
    if (reads - adds > max_ahead) max_ahead = reads - adds;
    if (dut.u_sum.u_acc_cb.full || dut.u_sum.u_xs_cb.full || dut.u_sum.u_x_cb.full) n_divert++;
    if (sum_res_valid && !sum_res_ready) n_backp++;
    if (dut.u_gcd.cf_v[0] && dut.u_gcd.cf_r[0] && dut.u_gcd.cf_d[0] == 2'd1) n_lt++;
    if (dut.u_gcd.cf_v[0] && dut.u_gcd.cf_r[0] && dut.u_gcd.cf_d[0] == 2'd2) n_gt++;
    if (dut.u_fib.state == 3'd3 && dut.u_fib.rd_word.tag == 2'd1) n_k1++;
    if (dut.u_fib.state == 3'd3 && dut.u_fib.rd_word.tag == 2'd2) n_k2++;
    if (!dut.u_tmp.u_map.start_ready && !(dut.u_tmp.u_ttoc.start_ready &&
        dut.u_tmp.u_map_c.start_ready && dut.u_tmp.u_tfromc.start_ready)) n_par++;
    if (dut.u_tmp.u_ttoc.dst_we)   n_tocopy++;
    if (dut.u_tmp.u_tfromc.dst_we) n_fromcopy++;
  end

  // ---- Huffman ---------------------------------------------------------------
  int parent [2*NSYM];
  bit side [2*NSYM];
  logic [7:0] sym [NSYM];
  logic [7:0] msg [NCH];
  bit bits [$];
  int huf_root;
  function automatic int in_addr(int i); return (i * 37 + 5) % (2**BL_PTR_W); endfunction

  task automatic load_huffman();
    int roots [$];
    int nn;
    huf_tree_wr_en = 1'b1; huf_in_wr_en = 1'b0;
    for (int k = 0; k < NSYM; k++) begin
      sym[k] = 8'(97 + k);
      huf_tree_wr_addr = HT_PTR_W'(k);
      huf_tree_wr_data = '{left: '0, right: HT_PTR_W'(sym[k]), is_leaf: 1'b1};
      roots.push_back(k);
      @(negedge clk);
    end
    nn = NSYM;
    while (roots.size() > 1) begin
      int i, l, r;
      i = $urandom % roots.size(); l = roots[i]; roots.delete(i);
      i = $urandom % roots.size(); r = roots[i]; roots.delete(i);
      huf_tree_wr_addr = HT_PTR_W'(nn);
      huf_tree_wr_data = '{left: HT_PTR_W'(l), right: HT_PTR_W'(r), is_leaf: 1'b0};
      parent[l] = nn; side[l] = 1'b0; parent[r] = nn; side[r] = 1'b1;
      roots.push_back(nn);
      nn++;
      @(negedge clk);
    end
    huf_tree_wr_en = 1'b0;
    huf_root = roots[0];
    for (int c = 0; c < NCH; c++) begin
      int k, p;
      bit code [$];
      code.delete();
      k = $urandom % NSYM; msg[c] = sym[k]; p = k;
      while (p != huf_root) begin code.push_front(side[p]); p = parent[p]; end
      foreach (code[b]) bits.push_back(code[b]);
    end
    huf_in_wr_en = 1'b1;
    for (int i = 0; i <= bits.size(); i++) begin
      huf_in_wr_addr = BL_PTR_W'(in_addr(i));
      huf_in_wr_data = (i == bits.size()) ? '0 :
                       '{next: BL_PTR_W'(in_addr(i + 1)), b: bits[i], is_cons: 1'b1};
      @(negedge clk);
    end
    huf_in_wr_en = 1'b0;
  endtask

  task automatic run_huffman();
    huf_start_valid = 1'b1; huf_start_root = HT_PTR_W'(huf_root);
    huf_start_list = BL_PTR_W'(in_addr(0));
    @(posedge clk);
    while (!huf_start_ready) @(posedge clk);
    @(negedge clk);
    huf_start_valid = 1'b0;
    while (!huf_done_valid) @(negedge clk);
    checks++;
    if (int'(huf_done_count) != NCH) begin failures++; $display("huffman count %0d", huf_done_count); end
    huf_done_ready = 1'b1;
    @(negedge clk);
    huf_done_ready = 1'b0;
    for (int i = 0; i <= NCH; i++) begin
      huf_out_rd_addr = CL_PTR_W'(i);
      @(negedge clk);
      checks++;
      if (i < NCH ? (huf_out_rd_data !== '{next: CL_PTR_W'(i + 1), c: msg[i], is_cons: 1'b1})
                  : (huf_out_rd_data.is_cons !== 1'b0)) begin
        failures++; $display("huffman cell %0d wrong", i);
      end
    end
  endtask

  // ---- list sum -------------------------------------------------------------
  logic [SUM_AW-1:0] head [NL];
  logic [W-1:0] s0 [NL], sum_exp [NL];
  int sum_done = 0;

  task automatic load_lists();
    int a;
    a = 1;
    sum_wr_en = 1'b1;
    for (int l = 0; l < NL; l++) begin
      int len;
      len = (l == 0) ? 30 : int'($urandom % 10);
      s0[l] = W'($urandom % 100); sum_exp[l] = s0[l];
      head[l] = SUM_AW'(a * 61);
      for (int i = 0; i <= len; i++) begin
        logic [W-1:0] e;
        e = W'($urandom % 100000);
        sum_wr_addr = SUM_AW'(a * 61);
        if (i < len) begin
          sum_exp[l] += e;
          sum_wr_data = {SUM_AW'((a + 1) * 61), e, 1'b1};
        end else sum_wr_data = '0;
        a++;
        @(negedge clk);
      end
    end
    sum_wr_en = 1'b0;
  endtask

  task automatic run_sums();
    fork
      for (int l = 0; l < NL; l++) begin      // lp tokens
        sum_lp_valid = 1'b1; sum_lp_data = head[l];
        @(posedge clk);
        while (!sum_lp_ready) @(posedge clk);
        @(negedge clk);
        sum_lp_valid = 1'b0;
      end
      for (int l = 0; l < NL; l++) begin      // s tokens, late
        repeat (15) @(negedge clk);
        sum_s_valid = 1'b1; sum_s_data = s0[l];
        @(posedge clk);
        while (!sum_s_ready) @(posedge clk);
        @(negedge clk);
        sum_s_valid = 1'b0;
      end
      for (int l = 0; l < NL; l++) begin      // results, with stalls
        @(negedge clk);
        sum_res_ready = ($urandom % 2 == 0);
        @(posedge clk);
        while (!(sum_res_valid && sum_res_ready)) begin
          @(negedge clk);
          sum_res_ready = ($urandom % 2 == 0);
          @(posedge clk);
        end
        checks++;
        if (sum_res_data !== sum_exp[l]) begin
          failures++; $display("sum %0d: %0d expected %0d", l, sum_res_data, sum_exp[l]);
        end
        sum_done++;
      end
    join
    @(negedge clk);
    sum_res_ready = 1'b0;
  endtask

  // ---- GCD ---------------------------------------------------------------------
  task automatic run_gcd();
    for (int i = 0; i < NG; i++) begin
      logic [W-1:0] a, b, x, y;
      a = W'(1 + $urandom % 500); b = W'(1 + $urandom % 500);
      x = a; y = b;
      while (y != 0) begin logic [W-1:0] t; t = x % y; x = y; y = t; end
      gcd_a_valid = 1'b1; gcd_a_data = a; gcd_b_valid = 1'b1; gcd_b_data = b;
      gcd_res_ready = 1'b1;
      @(posedge clk);
      while (!(gcd_a_ready && gcd_b_ready)) @(posedge clk);
      @(negedge clk);
      gcd_a_valid = 1'b0; gcd_b_valid = 1'b0;
      @(posedge clk);
      while (!gcd_res_valid) @(posedge clk);
      checks++;
      if (gcd_res_data !== x) begin failures++; $display("gcd(%0d,%0d) = %0d", a, b, gcd_res_data); end
      @(negedge clk);
    end
    gcd_res_ready = 1'b0;
  endtask

  // ---- Fibonacci ------------------------------------------------------------------
  task automatic run_fib();
    longint f [0:64];
    f[1] = 1; f[2] = 1;
    for (int n = 3; n <= 64; n++) f[n] = f[n-1] + f[n-2];
    for (int t = 0; t <= NF; t++) begin
      int n;
      n = (t == NF) ? 70 : t + 1;                // the last call overflows the stack
      fib_start_valid = 1'b1; fib_start_n = W'(n); fib_res_ready = 1'b1;
      @(posedge clk);
      while (!fib_start_ready) @(posedge clk);
      @(negedge clk);
      fib_start_valid = 1'b0;
      @(posedge clk);
      while (!fib_res_valid) @(posedge clk);
      checks++;
      if (n == 70) begin
        if (fib_res_overflow) n_ovf++;
        else begin failures++; $display("fib 70 did not overflow"); end
      end else if (fib_res_value !== W'(f[n]) || fib_res_overflow) begin
        failures++; $display("fib %0d = %0d", n, fib_res_value);
      end
      @(negedge clk);
    end
    fib_res_ready = 1'b0;
  endtask

  // ---- parallel tree map -------------------------------------------------------
  logic [TDW-1:0] timg [2**TPW];
  logic [TDW-1:0] tres [2**TPW];
  int tnext;
  function automatic int tbuild(int n);           // left-heavy random tree
    int nl, l, r, a;
    if (n == 0) begin a = tnext++; timg[a] = '0; return a; end
    nl = n - 1 - (n - 1) / 4;
    l = tbuild(nl);
    r = tbuild(n - 1 - nl);
    a = tnext++;
    timg[a] = {TPW'(l), W'($urandom), TPW'(r), 1'b1};
    return a;
  endfunction
  function automatic void tser(bit from_res, int p, int inc, ref int q [$]);
    logic [TDW-1:0] w;
    w = from_res ? tres[p] : timg[p];
    if (!w[0]) begin q.push_back(-1); return; end
    q.push_back(int'(w[TPW+W:TPW+1]) + inc);
    tser(from_res, int'(w[TDW-1 -: TPW]), inc, q);
    tser(from_res, int'(w[TPW:1]), inc, q);
  endfunction

  task automatic tmap_call(input int root, output int nroot);
    tmp_start_valid = 1'b1; tmp_start_root = TPW'(root);
    tmp_start_free_a = TPW'(256); tmp_start_free_b = TPW'(640);
    @(posedge clk);
    while (!tmp_start_ready) @(posedge clk);
    @(negedge clk);
    tmp_start_valid = 1'b0;
    while (!tmp_done_valid) @(posedge clk);
    nroot = int'(tmp_done_root);
    @(negedge clk); tmp_done_ready = 1'b1;
    @(negedge clk); tmp_done_ready = 1'b0;
  endtask

  task automatic run_tmap();
    int root, nroot;
    int qi [$], qo [$];
    tnext = 0;
    root = tbuild(60);
    for (int a = 0; a < tnext; a++) begin
      @(negedge clk);
      tmp_host_we = 1'b1; tmp_host_addr = TPW'(a); tmp_host_wdata = timg[a];
    end
    @(negedge clk);
    tmp_host_we = 1'b0;
    tmap_call(0, nroot);                           // address 0 holds a Leaf
    checks++;
    if (nroot == 0) n_leafroot++;
    else begin failures++; $display("tree map: Leaf root not returned"); end
    tmap_call(root, nroot);
    for (int a = 0; a < 2**TPW; a++) begin
      @(negedge clk);
      tmp_host_addr = TPW'(a);
      @(posedge clk); #1;
      tres[a] = tmp_host_rdata;
    end
    tser(0, root, 1, qi);
    tser(1, nroot, 0, qo);
    checks++;
    if (qi != qo) begin failures++; $display("tree map: wrong result tree"); end
  endtask

  initial begin
    tmp_start_valid = 0; tmp_done_ready = 0; tmp_host_we = 0; tmp_start_root = '0;
    tmp_start_free_a = '0; tmp_start_free_b = '0; tmp_host_addr = '0; tmp_host_wdata = '0;
    huf_start_valid = 0; huf_done_ready = 0; huf_tree_wr_en = 0; huf_in_wr_en = 0;
    huf_start_root = '0; huf_start_list = '0; huf_tree_wr_addr = '0; huf_tree_wr_data = '0;
    huf_in_wr_addr = '0; huf_in_wr_data = '0; huf_out_rd_addr = '0;
    fib_start_valid = 0; fib_start_n = '0; fib_res_ready = 0;
    sum_lp_valid = 0; sum_lp_data = '0; sum_s_valid = 0; sum_s_data = '0; sum_res_ready = 0;
    sum_wr_en = 0; sum_wr_addr = '0; sum_wr_data = '0;
    gcd_a_valid = 0; gcd_a_data = '0; gcd_b_valid = 0; gcd_b_data = '0; gcd_res_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_huffman();
    load_lists();
    fork
      run_huffman();
      run_sums();
      run_gcd();
      run_fib();
      run_tmap();
    join
    $display("huffman leaf %0d branch %0d end %0d | sum read-ahead %0d divert %0d backpressure %0d",
             n_leaf, n_branch, n_finish, max_ahead, n_divert, n_backp);
    $display("gcd a<b %0d a>b %0d | fib K1 %0d K2 %0d overflow %0d",
             n_lt, n_gt, n_k1, n_k2, n_ovf);
    $display("tree map parallel cycles %0d, copied in %0d, copied out %0d, Leaf root %0d",
             n_par, n_tocopy, n_fromcopy, n_leafroot);
    checks += 14;
    if (n_leaf == 0)    begin failures++; $display("no Huffman leaf step"); end
    if (n_branch == 0)  begin failures++; $display("no Huffman branch step"); end
    if (n_finish == 0)  begin failures++; $display("no Huffman end of input"); end
    if (max_ahead < 2)  begin failures++; $display("list reads never ran ahead"); end
    if (n_divert == 0)  begin failures++; $display("no control buffer diverted a token"); end
    if (n_backp == 0)   begin failures++; $display("no result backpressure"); end
    if (n_lt == 0)      begin failures++; $display("no gcd a<b step"); end
    if (n_gt == 0)      begin failures++; $display("no gcd a>b step"); end
    if (n_k1 == 0)      begin failures++; $display("no K1 continuation"); end
    if (n_k2 == 0)      begin failures++; $display("no K2 continuation"); end
    if (n_ovf == 0)     begin failures++; $display("no stack overflow"); end
    if (n_par == 0)     begin failures++; $display("tree map tasks never overlapped"); end
    if (n_tocopy == 0 || n_fromcopy == 0) begin
      failures++; $display("tree map never copied between heaps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
