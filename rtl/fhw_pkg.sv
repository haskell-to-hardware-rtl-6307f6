// fhw_pkg: types and constants shared by the dataflow node library and the
// example circuits.
//
// Algebraic data types are stored as bit vectors: a tag in the least
// significant bit(s) selects the constructor, the constructor's fields sit
// above it, and a recursive field is a pointer into a memory. The three
// Huffman-decoder layouts below (tree node 19 bits, Boolean list cell 14 bits,
// character list cell 19 bits) are the ones the FHW encoding uses; the field
// order inside a word is printed left (MSB) to right (LSB) in that encoding.
// The operation codes select what a function block (df_func2) computes; they
// are this library's own.
package fhw_pkg;

  // ---------------- function-block operations ----------------
  typedef enum logic [3:0] {
    OP_ADD,    // a + b
    OP_SUB,    // a - b
    OP_RSUB,   // b - a
    OP_EQ,     // a == b
    OP_LT,     // a < b (unsigned)
    OP_CMP3,   // 0 if a == b, 1 if a < b, 2 if a > b (unsigned)
    OP_NE0,    // a != 0 (b ignored)
    OP_PASS    // a (b is consumed, value ignored)
  } op_e;

  // ---------------- Huffman tree: data HTree = Branch HTree HTree | Leaf Char
  localparam int unsigned HT_PTR_W  = 9;
  localparam int unsigned HT_WORD_W = 2 * HT_PTR_W + 1;      // 19
  typedef struct packed {
    logic [HT_PTR_W-1:0] left;   // Branch: left subtree (taken on a 0 bit)
    logic [HT_PTR_W-1:0] right;  // Branch: right subtree (taken on a 1 bit)
    logic                is_leaf;// 1: Leaf, 0: Branch
  } htree_t;
  // A Leaf carries its 8-bit character in bits [8:1], i.e. the low byte of
  // the 'right' field.

  // ---------------- Boolean list: Cons Bool BList | Nil -----------------
  localparam int unsigned BL_PTR_W  = 12;
  localparam int unsigned BL_WORD_W = BL_PTR_W + 2;          // 14
  typedef struct packed {
    logic [BL_PTR_W-1:0] next;
    logic                b;
    logic                is_cons;
  } blist_t;

  // ---------------- Character list: Cons Char CList | Nil ----------------
  localparam int unsigned CL_PTR_W  = 10;
  localparam int unsigned CL_WORD_W = CL_PTR_W + 8 + 1;      // 19
  typedef struct packed {
    logic [CL_PTR_W-1:0] next;
    logic [7:0]          c;
    logic                is_cons;
  } clist_t;

endpackage
