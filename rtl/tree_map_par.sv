// tree_map_par: divide-and-conquer tree map with a duplicated task and a
// separate memory partition for the copy.
//
//   map_S t = case t of
//     Leaf       -> t
//     Node l x r -> Node (map l) (f x) (TfromC (map_C (TtoC r)))
//
// Pieces (each a tree_walk engine or a memory):
//   map    walks the left subtree in the main heap, with its own stack;
//   TtoC   copies the right subtree from the main heap into heap_C;
//   map_C  maps that copy inside heap_C (f_C is the same function as f);
//   TfromC copies the result back into the main heap.
// map runs at the same time as the TtoC -> map_C -> TfromC chain. The chain
// units run one after the other, so they share the C-side stack and the
// B ports of both heaps. map owns port A of the main heap; map_C owns port A
// of heap_C.
//
// Allocation in the main heap is split so the two parallel tasks never
// write the same word: map allocates upward from start_free_a, TfromC
// upward from start_free_b. The caller chooses the two regions (and keeps
// them apart and clear of the input tree). heap_C is filled from address 0
// for each call. Leaves have no fields and are shared inside a heap, so
// map returns Leaf pointers unchanged while the copy units copy them.
//
// Node word: {l[PW], x[W], r[PW], is_node}; Leaf word: all zero.
// Host port: while idle, host_we/host_addr/host_wdata write the main heap
// and host_rdata returns the word at host_addr one cycle later.
module tree_map_par #(
  parameter int unsigned  PW    = 10,
  parameter int unsigned  W     = 32,
  parameter int unsigned  SW    = 8,
  parameter logic [W-1:0] F_INC = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // call: root pointer and the two allocation regions of the main heap
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [PW-1:0]     start_root,
  input  logic [PW-1:0]     start_free_a,
  input  logic [PW-1:0]     start_free_b,
  // result: new root in the main heap
  output logic              done_valid,
  input  logic              done_ready,
  output logic [PW-1:0]     done_root,
  // host access to the main heap while idle
  input  logic              host_we,
  input  logic [PW-1:0]     host_addr,
  input  logic [2*PW+W:0]   host_wdata,
  output logic [2*PW+W:0]   host_rdata
);
  localparam int unsigned DW = 2*PW + W + 1;
  localparam int unsigned FW = PW + W + 1;

  typedef struct packed {
    logic [PW-1:0] l;
    logic [W-1:0]  x;
    logic [PW-1:0] r;
    logic          is_node;
  } node_t;

  typedef enum logic [2:0] {S_IDLE, S_READ, S_SPLIT, S_RUN, S_BUILD, S_DONE} state_e;
  typedef enum logic [1:0] {C_TTOC, C_MAPC, C_FROMC, C_END} chain_e;

  state_e        state;
  chain_e        chain;
  node_t         root_nd;
  logic [PW-1:0] root, free_b, new_l, new_r, alloc_a, res;
  logic [W-1:0]  root_x;
  logic          map_fin, chain_fin, launched;

  // ---- memories ---------------------------------------------------------
  logic          ha_we, hb_we, ca_we, cb_we;
  logic [PW-1:0] ha_addr, hb_addr, ca_addr, cb_addr;
  logic [DW-1:0] ha_wdata, hb_wdata, ca_wdata, cb_wdata;
  logic [DW-1:0] ha_rdata, hb_rdata, ca_rdata, cb_rdata;

  tree_heap #(.PW(PW), .DW(DW)) u_heap (
    .clk, .a_we(ha_we), .a_addr(ha_addr), .a_wdata(ha_wdata), .a_rdata(ha_rdata),
    .b_we(hb_we), .b_addr(hb_addr), .b_wdata(hb_wdata), .b_rdata(hb_rdata));
  tree_heap #(.PW(PW), .DW(DW)) u_heap_c (
    .clk, .a_we(ca_we), .a_addr(ca_addr), .a_wdata(ca_wdata), .a_rdata(ca_rdata),
    .b_we(cb_we), .b_addr(cb_addr), .b_wdata(cb_wdata), .b_rdata(cb_rdata));

  logic          s_we, sc_we;
  logic [SW-1:0] s_addr, sc_addr;
  logic [FW-1:0] s_wdata, sc_wdata, s_rdata, sc_rdata;
  logic [FW-1:0] stack   [2**SW];
  logic [FW-1:0] stack_c [2**SW];

  always_ff @(posedge clk) begin
    if (s_we) stack[s_addr] <= s_wdata;
    s_rdata <= stack[s_addr];
  end
  always_ff @(posedge clk) begin
    if (sc_we) stack_c[sc_addr] <= sc_wdata;
    sc_rdata <= stack_c[sc_addr];
  end

  // ---- the four engines -------------------------------------------------
  logic          m_sv, m_sr, m_dv, t_sv, t_sr, t_dv, c_sv, c_sr, c_dv, b_sv, b_sr, b_dv;
  logic [PW-1:0] m_root, m_alloc, t_root, t_alloc, c_root, b_root;
  logic [PW-1:0] m_src, t_src, c_src, b_src, m_daddr, t_daddr, c_daddr, b_daddr;
  logic          m_dwe, t_dwe, c_dwe, b_dwe, m_swe, t_swe, c_swe, b_swe;
  logic [DW-1:0] m_dwd, t_dwd, c_dwd, b_dwd;
  logic [SW-1:0] m_sa, t_sa, c_sa, b_sa;
  logic [FW-1:0] m_swd, t_swd, c_swd, b_swd;

  // map: main heap port A, own stack
  tree_walk #(.PW(PW), .W(W), .SW(SW), .APPLY_F(1'b1), .COPY(1'b0), .F_INC(F_INC)) u_map (
    .clk, .rst_n,
    .start_valid(m_sv), .start_ready(m_sr), .start_root(root_nd.l), .start_alloc(start_free_a),
    .done_valid(m_dv), .done_ready(1'b1), .done_root(m_root), .done_alloc(m_alloc),
    .src_addr(m_src), .src_rdata(ha_rdata),
    .dst_we(m_dwe), .dst_addr(m_daddr), .dst_wdata(m_dwd),
    .stk_we(m_swe), .stk_addr(m_sa), .stk_wdata(m_swd), .stk_rdata(s_rdata));

  // TtoC: main heap port B -> heap_C port B, C-side stack
  tree_walk #(.PW(PW), .W(W), .SW(SW), .APPLY_F(1'b0), .COPY(1'b1), .F_INC(F_INC)) u_ttoc (
    .clk, .rst_n,
    .start_valid(t_sv), .start_ready(t_sr), .start_root(root_nd.r), .start_alloc('0),
    .done_valid(t_dv), .done_ready(1'b1), .done_root(t_root), .done_alloc(t_alloc),
    .src_addr(t_src), .src_rdata(hb_rdata),
    .dst_we(t_dwe), .dst_addr(t_daddr), .dst_wdata(t_dwd),
    .stk_we(t_swe), .stk_addr(t_sa), .stk_wdata(t_swd), .stk_rdata(sc_rdata));

  // map_C: heap_C port A, C-side stack
  tree_walk #(.PW(PW), .W(W), .SW(SW), .APPLY_F(1'b1), .COPY(1'b0), .F_INC(F_INC)) u_map_c (
    .clk, .rst_n,
    .start_valid(c_sv), .start_ready(c_sr), .start_root(t_root), .start_alloc(t_alloc),
    .done_valid(c_dv), .done_ready(1'b1), .done_root(c_root), .done_alloc(),
    .src_addr(c_src), .src_rdata(ca_rdata),
    .dst_we(c_dwe), .dst_addr(c_daddr), .dst_wdata(c_dwd),
    .stk_we(c_swe), .stk_addr(c_sa), .stk_wdata(c_swd), .stk_rdata(sc_rdata));

  // TfromC: heap_C port B -> main heap port B, C-side stack
  tree_walk #(.PW(PW), .W(W), .SW(SW), .APPLY_F(1'b0), .COPY(1'b1), .F_INC(F_INC)) u_tfromc (
    .clk, .rst_n,
    .start_valid(b_sv), .start_ready(b_sr), .start_root(c_root), .start_alloc(free_b),
    .done_valid(b_dv), .done_ready(1'b1), .done_root(b_root), .done_alloc(),
    .src_addr(b_src), .src_rdata(cb_rdata),
    .dst_we(b_dwe), .dst_addr(b_daddr), .dst_wdata(b_dwd),
    .stk_we(b_swe), .stk_addr(b_sa), .stk_wdata(b_swd), .stk_rdata(sc_rdata));

  // ---- port sharing -----------------------------------------------------
  // Main heap port A: host while idle, the root read, map, then the new root.
  always_comb begin
    ha_we = 1'b0; ha_addr = m_src; ha_wdata = m_dwd;
    unique case (state)
      S_IDLE:  begin ha_we = host_we; ha_addr = host_addr; ha_wdata = host_wdata; end
      S_READ:  ha_addr = root;
      S_RUN:   begin ha_we = m_dwe; ha_addr = m_dwe ? m_daddr : m_src; end
      S_BUILD: begin
        ha_we = 1'b1; ha_addr = alloc_a;
        ha_wdata = node_t'{l: new_l, x: root_x + F_INC, r: new_r, is_node: 1'b1};
      end
      S_DONE:  ha_addr = host_addr;
      default: ;
    endcase
  end
  assign host_rdata = ha_rdata;

  // heap_C port A belongs to map_C.
  assign ca_we    = c_dwe;
  assign ca_addr  = c_dwe ? c_daddr : c_src;
  assign ca_wdata = c_dwd;
  assign s_we     = m_swe;
  assign s_addr   = m_sa;
  assign s_wdata  = m_swd;

  // Port B of both heaps and the C-side stack follow the chain step.
  always_comb begin
    hb_we = 1'b0; hb_addr = t_src;   hb_wdata = b_dwd;
    cb_we = 1'b0; cb_addr = b_src;   cb_wdata = t_dwd;
    sc_we = c_swe; sc_addr = c_sa;   sc_wdata = c_swd;
    unique case (chain)
      C_TTOC: begin
        cb_we = t_dwe; cb_addr = t_daddr;
        sc_we = t_swe; sc_addr = t_sa; sc_wdata = t_swd;
      end
      C_FROMC: begin
        hb_we = b_dwe; hb_addr = b_daddr;
        sc_we = b_swe; sc_addr = b_sa; sc_wdata = b_swd;
      end
      default: ;
    endcase
  end

  // ---- map_S control ----------------------------------------------------
  assign root_nd     = node_t'(ha_rdata);
  assign start_ready = (state == S_IDLE);
  assign done_valid  = (state == S_DONE);
  assign done_root   = res;

  // Start requests: map and TtoC together when the root turns out to be a
  // Node; map_C and TfromC once each, when the previous chain step has
  // finished. The results are taken in the cycle they appear.
  assign m_sv = (state == S_SPLIT) & root_nd.is_node & t_sr;
  assign t_sv = (state == S_SPLIT) & root_nd.is_node & m_sr;
  assign c_sv = (state == S_RUN) & (chain == C_MAPC) & ~launched;
  assign b_sv = (state == S_RUN) & (chain == C_FROMC) & ~launched;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; chain <= C_END;
      root <= '0; root_x <= '0; free_b <= '0; new_l <= '0; new_r <= '0; alloc_a <= '0; res <= '0;
      map_fin <= 1'b0; chain_fin <= 1'b0; launched <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start_valid) begin
          root <= start_root; free_b <= start_free_b;
          state <= S_READ;
        end
        S_READ: state <= S_SPLIT;              // root word arrives next cycle
        S_SPLIT:
          if (!root_nd.is_node) begin
            res <= root;                       // Leaf -> t
            state <= S_DONE;
          end else if (m_sr && t_sr) begin
            map_fin <= 1'b0; chain_fin <= 1'b0; launched <= 1'b0;
            root_x <= root_nd.x;
            chain <= C_TTOC;
            state <= S_RUN;
          end
        S_RUN: begin
          if (m_dv) begin
            map_fin <= 1'b1; new_l <= m_root; alloc_a <= m_alloc;
          end
          if ((c_sv && c_sr) || (b_sv && b_sr)) launched <= 1'b1;
          unique case (chain)
            C_TTOC:  if (t_dv) chain <= C_MAPC;
            C_MAPC:  if (c_dv) begin chain <= C_FROMC; launched <= 1'b0; end
            C_FROMC: if (b_dv) begin
              chain <= C_END; chain_fin <= 1'b1; new_r <= b_root;
            end
            default: ;
          endcase
          if (map_fin && chain_fin) state <= S_BUILD;
        end
        S_BUILD: begin
          res <= alloc_a;
          state <= S_DONE;
        end
        S_DONE: if (done_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
