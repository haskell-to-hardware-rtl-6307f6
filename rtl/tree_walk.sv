// tree_walk: rebuilds a binary tree node by node, optionally applying f.
//
//   data Tree = Leaf | Node Tree Int Tree
//   map t = case t of Leaf -> t; Node l x r -> Node (map l) (f x) (map r)
//
// The recursion is removed as in the continuation-passing rewrite: an
// explicit stack (external, so that units that run one after the other can
// share one) holds two kinds of frames, "left subtree running" {r, x} and
// "right subtree running" {new l, x}. The same engine serves four roles,
// chosen by parameters:
//   map / map_C : source and destination are the same heap, APPLY_F = 1,
//                 Leaf pointers are returned unchanged (a Leaf has no fields);
//   TtoC / TfromC: copy a tree from one heap partition into another,
//                 APPLY_F = 0, COPY = 1 (Leaves are copied too).
// New nodes are allocated by a bump pointer starting at start_alloc; the
// final value is returned with the new root.
//
// Node word: {l[PW], x[W], r[PW], is_node}. Leaf word: all zero.
// Stack frame: {right_phase, ptr[PW], x[W]}.
// Timing per node: read node (2 cycles), push, left subtree, pop (2 cycles),
// right subtree, pop (2 cycles) and write; a Leaf costs 2 cycles (3 when
// copied) plus the return. Reads of heap and stack are synchronous.
// f is x + F_INC (f itself is left open by the flow; this is a stand-in).
// The stack must hold the tree's depth (2**SW frames); this is not checked.
module tree_walk #(
  parameter int unsigned PW      = 10,
  parameter int unsigned W       = 32,
  parameter int unsigned SW      = 8,
  parameter bit          APPLY_F = 1'b1,
  parameter bit          COPY    = 1'b0,
  parameter logic [W-1:0] F_INC  = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_valid,
  output logic               start_ready,
  input  logic [PW-1:0]      start_root,
  input  logic [PW-1:0]      start_alloc,
  output logic               done_valid,
  input  logic               done_ready,
  output logic [PW-1:0]      done_root,
  output logic [PW-1:0]      done_alloc,
  // source heap: read address, word one cycle later
  output logic [PW-1:0]      src_addr,
  input  logic [2*PW+W:0]    src_rdata,
  // destination heap: write
  output logic               dst_we,
  output logic [PW-1:0]      dst_addr,
  output logic [2*PW+W:0]    dst_wdata,
  // stack: one port, synchronous read
  output logic               stk_we,
  output logic [SW-1:0]      stk_addr,
  output logic [PW+W:0]      stk_wdata,
  input  logic [PW+W:0]      stk_rdata
);
  typedef struct packed {
    logic [PW-1:0] l;
    logic [W-1:0]  x;
    logic [PW-1:0] r;
    logic          is_node;
  } node_t;
  typedef struct packed {
    logic          right;    // 0: left subtree running, 1: right running
    logic [PW-1:0] ptr;      // r while left runs, new l while right runs
    logic [W-1:0]  x;
  } frame_t;
  typedef enum logic [2:0] {S_IDLE, S_VISIT, S_NODE, S_RET, S_FRAME, S_DONE} state_e;

  state_e        state;
  logic [PW-1:0] p, ret, alloc;
  logic [SW:0]   sp;
  node_t         nd;
  frame_t        fr;

  assign nd = node_t'(src_rdata);
  assign fr = frame_t'(stk_rdata);

  assign start_ready = (state == S_IDLE);
  assign done_valid  = (state == S_DONE);
  assign done_root   = ret;
  assign done_alloc  = alloc;
  assign src_addr    = p;

  always_comb begin
    dst_we    = 1'b0;
    dst_addr  = alloc;
    dst_wdata = '0;
    stk_we    = 1'b0;
    stk_addr  = sp[SW-1:0];
    stk_wdata = '0;
    unique case (state)
      S_NODE:
        if (nd.is_node) begin                 // push {left running, r, x}
          stk_we    = 1'b1;
          stk_wdata = frame_t'{right: 1'b0, ptr: nd.r, x: nd.x};
        end else if (COPY) begin              // copy the Leaf
          dst_we    = 1'b1;
        end
      S_RET:   stk_addr = SW'(sp - 1'b1);
      S_FRAME: begin
        stk_addr = SW'(sp - 1'b1);
        if (!fr.right) begin                  // left done: remember it
          stk_we    = 1'b1;
          stk_wdata = frame_t'{right: 1'b1, ptr: ret, x: fr.x};
        end else begin                        // both done: build the node
          dst_we    = 1'b1;
          dst_wdata = node_t'{l: fr.ptr, x: APPLY_F ? fr.x + F_INC : fr.x,
                              r: ret, is_node: 1'b1};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p <= '0; ret <= '0; alloc <= '0; sp <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start_valid) begin
          p <= start_root; alloc <= start_alloc; sp <= '0;
          state <= S_VISIT;
        end
        S_VISIT: state <= S_NODE;             // node word arrives next cycle
        S_NODE: begin
          if (nd.is_node) begin
            sp <= sp + 1'b1;
            p  <= nd.l;
            state <= S_VISIT;
          end else begin
            if (COPY) begin
              ret <= alloc; alloc <= alloc + 1'b1;
            end else begin
              ret <= p;
            end
            state <= S_RET;
          end
        end
        S_RET: state <= (sp == '0) ? S_DONE : S_FRAME;
        S_FRAME: begin
          if (!fr.right) begin
            p <= fr.ptr;
            state <= S_VISIT;
          end else begin
            sp <= sp - 1'b1;
            ret <= alloc; alloc <= alloc + 1'b1;
            state <= S_RET;
          end
        end
        S_DONE: if (done_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
