// tb_huffman_decoder: self-checking test of the Huffman decoder.
// A random code tree with NSYM leaves is built here by repeatedly joining two
// random subtrees, and stored in the tree memory; a random message is encoded
// with it into a Boolean list placed at scattered addresses. After decoding,
// the character list is walked from address 0 through the read port: every
// cell must be a Cons with the message's next character and a pointer to the
// following cell, ending in Nil, and the reported count must match. The run
// must take two cycles per tree node visited (one per input bit, one per
// character, one for the final Nil) plus one. A second call decodes an empty
// list. Two more runs use the memories at their full size: a 256-leaf tree
// (511 nodes, the whole tree memory) with a message of up to 4095 bits (the
// whole input list), and a two-leaf tree with 1023 characters (the whole
// output list).
module tb_huffman_decoder;
  import fhw_pkg::*;
  localparam int NSYM = 13, NCH = 400, MAXSYM = 256, MAXCH = 1023;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_valid, start_ready, done_valid, done_ready;
  logic [HT_PTR_W-1:0] start_root;
  logic [BL_PTR_W-1:0] start_list;
  logic [CL_PTR_W:0]   done_count;
  logic tree_wr_en, in_wr_en;
  logic [HT_PTR_W-1:0] tree_wr_addr;
  htree_t tree_wr_data;
  logic [BL_PTR_W-1:0] in_wr_addr;
  blist_t in_wr_data;
  logic [CL_PTR_W-1:0] out_rd_addr;
  clist_t out_rd_data;

  huffman_decoder dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // tree model
  int parent [2*MAXSYM];
  bit side   [2*MAXSYM];         // 1: right child of its parent
  logic [7:0] sym [MAXSYM];
  logic [7:0] msg [MAXCH];
  bit bits [$];
  int cur_root;                  // root of the tree built last

  task automatic wr_tree(int a, htree_t d);
    tree_wr_en = 1'b1; tree_wr_addr = HT_PTR_W'(a); tree_wr_data = d;
    @(negedge clk);
    tree_wr_en = 1'b0;
  endtask
  task automatic wr_in(int a, blist_t d);
    in_wr_en = 1'b1; in_wr_addr = BL_PTR_W'(a); in_wr_data = d;
    @(negedge clk);
    in_wr_en = 1'b0;
  endtask
  function automatic int in_addr(int i); return (i * 37 + 5) % (2**BL_PTR_W); endfunction

  task automatic run(input int root, input int nbits, input int nchars, input bit check_time);
    int t0, t1;
    @(negedge clk);
    start_valid = 1'b1; start_root = HT_PTR_W'(root); start_list = BL_PTR_W'(in_addr(0));
    @(posedge clk);
    while (!start_ready) @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start_valid = 1'b0;
    while (!done_valid) @(posedge clk);
    t1 = cycle;
    checks++;
    if (int'(done_count) != nchars) begin
      failures++; $display("count %0d, expected %0d", done_count, nchars);
    end
    if (check_time) begin
      checks++;
      $display("%0d bits, %0d characters: %0d cycles", nbits, nchars, t1 - t0);
      if (t1 - t0 != 2 * (nbits + nchars + 1) + 1) begin
        failures++; $display("expected %0d cycles", 2 * (nbits + nchars + 1) + 1);
      end
    end
    @(negedge clk);
    done_ready = 1'b1;
    @(negedge clk);
    done_ready = 1'b0;
    // walk the output list
    for (int i = 0; i <= nchars; i++) begin
      out_rd_addr = CL_PTR_W'(i);
      @(negedge clk);
      checks++;
      if (i < nchars) begin
        if (!out_rd_data.is_cons || out_rd_data.c !== msg[i] || int'(out_rd_data.next) != i + 1) begin
          failures++;
          $display("cell %0d: cons %b char %h next %0d, expected %h", i,
                   out_rd_data.is_cons, out_rd_data.c, out_rd_data.next, msg[i]);
        end
      end else if (out_rd_data.is_cons) begin
        failures++; $display("list not terminated by Nil");
      end
    end
  endtask

  // builds a random tree of nsym leaves, encodes up to max_ch random
  // characters (as many as fit the input list), loads and decodes them
  task automatic phase(input int nsym, input int max_ch);
    int roots [$];
    int nnodes, root, nch;
    roots.delete();
    bits.delete();
    // leaves at addresses 0..nsym-1, branches after them
    for (int k = 0; k < nsym; k++) begin
      htree_t n;
      sym[k] = 8'(65 + k);
      n = '0; n.is_leaf = 1'b1; n.right = HT_PTR_W'(sym[k]);
      wr_tree(k, n);
      roots.push_back(k);
    end
    nnodes = nsym;
    while (roots.size() > 1) begin
      int i, j, l, r;
      htree_t n;
      i = $urandom % roots.size(); l = roots[i]; roots.delete(i);
      j = $urandom % roots.size(); r = roots[j]; roots.delete(j);
      n = '0; n.left = HT_PTR_W'(l); n.right = HT_PTR_W'(r);
      wr_tree(nnodes, n);
      parent[l] = nnodes; side[l] = 1'b0;
      parent[r] = nnodes; side[r] = 1'b1;
      roots.push_back(nnodes);
      nnodes++;
    end
    root = roots[0];
    cur_root = root;
    // encode the message; the input list holds at most 2**BL_PTR_W - 1 bits
    nch = 0;
    while (nch < max_ch) begin
      int k, p;
      bit code [$];
      code.delete();
      k = $urandom % nsym;
      p = k;
      while (p != root) begin code.push_front(side[p]); p = parent[p]; end
      if (bits.size() + code.size() > 2**BL_PTR_W - 1) break;
      msg[nch] = sym[k];
      nch++;
      foreach (code[b]) bits.push_back(code[b]);
    end
    for (int i = 0; i < bits.size(); i++) begin
      blist_t cellw;
      cellw.next = BL_PTR_W'(in_addr(i + 1)); cellw.b = bits[i]; cellw.is_cons = 1'b1;
      wr_in(in_addr(i), cellw);
    end
    wr_in(in_addr(bits.size()), '0);
    run(root, bits.size(), nch, 1'b1);
  endtask

  initial begin
    start_valid = 1'b0; done_ready = 1'b0; tree_wr_en = 1'b0; in_wr_en = 1'b0;
    start_root = '0; start_list = '0; tree_wr_addr = '0; tree_wr_data = '0;
    in_wr_addr = '0; in_wr_data = '0; out_rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    phase(NSYM, NCH);
    // empty input
    wr_in(in_addr(0), '0);
    run(cur_root, 0, 0, 1'b0);
    phase(MAXSYM, MAXCH);          // whole tree memory, input list filled
    checks++;
    if (bits.size() < 2**BL_PTR_W - 40) begin
      failures++; $display("input list not filled: %0d bits", bits.size());
    end
    phase(2, MAXCH);               // whole output list
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
