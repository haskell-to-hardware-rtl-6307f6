// tb_tree_map_par: self-checking test of the parallel tree map.
// Random trees (balanced, left-heavy, right-heavy, irregular, a bare Leaf) are
// loaded into the main heap; the result tree read back must have the same
// shape with every value incremented, the input tree must be unchanged, and
// the new nodes must lie in the map region (left subtree) and the TfromC
// region (right subtree). The cycle count must match the schedule: the
// left map runs beside TtoC, map_C and TfromC one after the other. A single
// tree_walk over the same tree gives the sequential cycle count and must
// build the same tree; a tree whose right part is a third of its left part
// must finish sooner in parallel. The done channel is stalled at random.
module tb_tree_map_par;
  localparam int PW = 10, W = 32, SW = 8, DW = 2*PW + W + 1;
  localparam int FREE_A = 256, FREE_B = 640;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_valid, start_ready, done_valid, done_ready, host_we;
  logic [PW-1:0] start_root, start_free_a, start_free_b, done_root, host_addr;
  logic [DW-1:0] host_wdata, host_rdata;
  tree_map_par dut (.*);

  // sequential reference: one map engine with its own heap and stack
  logic          r_sv, r_sr, r_dv, r_dwe, r_swe, rh_we;
  logic [PW-1:0] r_root, r_droot, r_dalloc, r_src, r_daddr, rh_addr;
  logic [DW-1:0] r_rdata, r_dwd, rh_wdata, rh_rdata;
  logic [SW-1:0] r_sa;
  logic [PW+W:0] r_swd, r_srd;
  logic [PW+W:0] r_stack [2**SW];
  tree_walk #(.PW(PW), .W(W), .SW(SW)) u_seq (
    .clk, .rst_n, .start_valid(r_sv), .start_ready(r_sr), .start_root(r_root),
    .start_alloc(PW'(FREE_A)), .done_valid(r_dv), .done_ready(1'b1),
    .done_root(r_droot), .done_alloc(r_dalloc),
    .src_addr(r_src), .src_rdata(r_rdata), .dst_we(r_dwe), .dst_addr(r_daddr),
    .dst_wdata(r_dwd), .stk_we(r_swe), .stk_addr(r_sa), .stk_wdata(r_swd),
    .stk_rdata(r_srd));
  tree_heap #(.PW(PW), .DW(DW)) u_seq_heap (
    .clk, .a_we(r_dwe), .a_addr(r_dwe ? r_daddr : r_src), .a_wdata(r_dwd), .a_rdata(r_rdata),
    .b_we(rh_we), .b_addr(rh_addr), .b_wdata(rh_wdata), .b_rdata(rh_rdata));
  always_ff @(posedge clk) begin
    if (r_swe) r_stack[r_sa] <= r_swd;
    r_srd <= r_stack[r_sa];
  end

  int checks = 0, failures = 0, cycle = 0, overlap = 0;
  always @(posedge clk) cycle <= cycle + 1;
  // cycles in which the left map and the copy/map_C chain are both busy
  always @(posedge clk)
    if (!dut.u_map.start_ready &&
        (!dut.u_ttoc.start_ready || !dut.u_map_c.start_ready || !dut.u_tfromc.start_ready))
      overlap <= overlap + 1;

  // software image of the main heap as loaded, and the results read back
  logic [DW-1:0] img [2**PW];
  logic [DW-1:0] res [2**PW];
  logic [DW-1:0] sres [2**PW];
  int next_free;

  function automatic logic [DW-1:0] mk_node(int l, int x, int r);
    return {PW'(l), W'(x), PW'(r), 1'b1};
  endfunction
  function automatic int f_l(logic [DW-1:0] w); return int'(w[DW-1 -: PW]); endfunction
  function automatic int f_x(logic [DW-1:0] w); return int'(w[PW+W:PW+1]); endfunction
  function automatic int f_r(logic [DW-1:0] w); return int'(w[PW:1]); endfunction

  // builds a tree of n nodes; shape 0 balanced, 1 left-heavy, 2 right-heavy,
  // 3 random split. Leaves are either the shared Leaf at 0 or a fresh cell.
  function automatic int build(int n, int shape);
    int nl, a, l, r;
    if (n == 0) begin
      if ($urandom_range(0, 1) == 0) return 0;
      a = next_free++; img[a] = '0; return a;
    end
    case (shape)
      0: nl = (n - 1) / 2;
      1: nl = n - 1 - (n - 1) / 4;
      2: nl = (n - 1) / 4;
      default: nl = $urandom_range(0, n - 1);
    endcase
    l = build(nl, shape);
    r = build(n - 1 - nl, shape);
    a = next_free++;
    img[a] = mk_node(l, $urandom, r);
    return a;
  endfunction

  // word p of the loaded image (0), the parallel result (1) or the
  // sequential result (2)
  function automatic logic [DW-1:0] word(int which, int p);
    return which == 0 ? img[p] : which == 1 ? res[p] : sres[p];
  endfunction

  // preorder string of a tree: "L" for Leaf, the value for a Node
  function automatic void ser(int m, int p, int inc, ref int q [$]);
    if (!word(m, p)[0]) begin q.push_back(-1); return; end
    q.push_back(f_x(word(m, p)) + inc);
    ser(m, f_l(word(m, p)), inc, q);
    ser(m, f_r(word(m, p)), inc, q);
  endfunction
  // count nodes and check that new nodes lie inside [lo, hi)
  function automatic int region_bad(int m, int p, int lo, int hi);
    if (!word(m, p)[0]) return 0;
    return ((p < lo || p >= hi) ? 1 : 0) + region_bad(m, f_l(word(m, p)), lo, hi) +
           region_bad(m, f_r(word(m, p)), lo, hi);
  endfunction
  // engine cost of one subtree walk (see tree_walk's schedule)
  function automatic int cost(int m, int p);
    if (!word(m, p)[0]) return 3;
    return 5 + cost(m, f_l(word(m, p))) + cost(m, f_r(word(m, p)));
  endfunction

  task automatic load(input int n_words);
    for (int a = 0; a < n_words; a++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = PW'(a); host_wdata = img[a];
      rh_we = 1'b1; rh_addr = PW'(a); rh_wdata = img[a];
    end
    @(negedge clk);
    host_we = 1'b0; rh_we = 1'b0;
  endtask

  task automatic dump();
    for (int a = 0; a < 2**PW; a++) begin
      @(negedge clk);
      host_addr = PW'(a); rh_addr = PW'(a);
      @(posedge clk); #1;
      res[a] = host_rdata; sres[a] = rh_rdata;
    end
  endtask

  task automatic run_one(input int n, input int shape, output int pcyc, output int scyc);
    int root, t0, nres, sroot, bad, el, er, exp_cyc;
    int qi [$], qo [$], qs [$];
    for (int a = 0; a < 2**PW; a++) img[a] = '0;
    next_free = 1;
    root = build(n, shape);
    load(FREE_A);
    // parallel map
    @(negedge clk);
    start_valid = 1'b1; start_root = PW'(root);
    start_free_a = PW'(FREE_A); start_free_b = PW'(FREE_B);
    @(posedge clk);
    while (!start_ready) @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start_valid = 1'b0;
    while (!done_valid) @(posedge clk);
    pcyc = cycle - t0;
    nres = int'(done_root);
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      checks++;
      if (!done_valid || done_root != PW'(nres)) begin
        failures++; $display("FAIL: result not held while stalled");
      end
    end
    @(negedge clk); done_ready = 1'b1;
    @(negedge clk); done_ready = 1'b0;
    // sequential reference
    r_sv = 1'b1; r_root = PW'(root);
    @(posedge clk);
    t0 = cycle;
    @(negedge clk); r_sv = 1'b0;
    while (!r_dv) @(posedge clk);
    scyc = cycle - t0;
    sroot = int'(r_droot);
    dump();

    qi.delete(); qo.delete(); qs.delete();
    ser(0, root, 1, qi);
    ser(1, nres, 0, qo);
    ser(2, sroot, 0, qs);
    checks += 3;
    if (qo != qi) begin failures++; $display("FAIL: n=%0d shape=%0d wrong tree", n, shape); end
    if (qs != qi) begin failures++; $display("FAIL: n=%0d sequential walker wrong tree", n); end
    bad = 0;
    for (int a = 0; a < FREE_A; a++) if (res[a] != img[a]) bad++;
    if (bad != 0) begin failures++; $display("FAIL: input tree changed (%0d words)", bad); end
    if (img[root][0]) begin
      el = cost(0, f_l(img[root]));
      er = cost(0, f_r(img[root]));
      exp_cyc = 5 + ((el + 1 > 3*er + 5) ? el + 1 : 3*er + 5);
      checks += 4;
      if (res[nres] != mk_node(f_l(res[nres]), f_x(img[root]) + 1, f_r(res[nres]))) begin
        failures++; $display("FAIL: root node");
      end
      if (region_bad(1, f_l(res[nres]), FREE_A, FREE_B) != 0) begin
        failures++; $display("FAIL: left subtree outside the map region");
      end
      if (region_bad(1, f_r(res[nres]), FREE_B, 2**PW) != 0) begin
        failures++; $display("FAIL: right subtree outside the copy region");
      end
      if (pcyc != exp_cyc) begin
        failures++; $display("FAIL: n=%0d shape=%0d cycles %0d expected %0d", n, shape, pcyc, exp_cyc);
      end
    end else begin
      checks++;
      if (nres != root) begin failures++; $display("FAIL: Leaf root not returned"); end
    end
    checks++;
    if (scyc != cost(0, root) + 1) begin
      failures++; $display("FAIL: sequential cycles %0d expected %0d", scyc, cost(0, root) + 1);
    end
  endtask

  initial begin
    int pc, sc, ov0, n;
    start_valid = 1'b0; done_ready = 1'b0; host_we = 1'b0; rh_we = 1'b0; r_sv = 1'b0;
    start_root = '0; start_free_a = '0; start_free_b = '0; host_addr = '0; host_wdata = '0;
    rh_addr = '0; rh_wdata = '0; r_root = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run_one(0, 0, pc, sc);
    run_one(1, 0, pc, sc);
    for (int shape = 0; shape < 4; shape++)
      for (int k = 0; k < 4; k++) begin
        n = $urandom_range(2, 100);
        run_one(n, shape, pc, sc);
        $display("n=%0d shape=%0d parallel %0d cycles, sequential %0d", n, shape, pc, sc);
      end

    // right part a third of the left: the parallel split must pay off
    ov0 = overlap;
    run_one(97, 1, pc, sc);
    $display("left-heavy n=97: parallel %0d cycles, sequential %0d, overlap %0d",
             pc, sc, overlap - ov0);
    checks += 2;
    if (pc >= sc) begin failures++; $display("FAIL: no speed-up from the split"); end
    if (overlap - ov0 < pc / 2) begin failures++; $display("FAIL: tasks did not overlap"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
