// fib_cps: Fibonacci by tail recursion with an explicit continuation store
//
// The doubly recursive
//   fib n = case n of 1 -> 1; 2 -> 1; n -> fib (n-1) + fib (n-2)
// is rewritten into continuation-passing style, the continuations are
// lambda-lifted and represented by a data type
//   data Cont = K0 | K1 Int CRef | K2 Int CRef
//   data Call = Fibk Int CRef | KK Cont Int
// and the two functions are merged into one tail-recursive function over
// Call, with explicit memory operations (write: Cont -> CRef, read:
// CRef -> Cont):
//   Fibk 1 k / Fibk 2 k -> KK (read k) 1
//   Fibk n k            -> Fibk (n-1) (write (K1 n k))
//   KK (K1 n k) n1      -> Fibk (n-2) (write (K2 n1 k))
//   KK (K2 n1 k) n2     -> KK (read k) (n1 + n2)
//   KK K0 x             -> x
//   fib n = Fibk n (write K0)
// This module is that loop in hardware: one register holds the current Call
// and one rule fires per cycle. Every continuation is read exactly once and
// in last-written, first-read order, so the continuation memory is a stack:
// write pushes and returns the slot number as the CRef, read pops. The read
// port is synchronous, so a rule that reads (the base case and K2) is
// followed by a cycle in state KK that consumes the word read.
//
// Continuation word: {tag[1:0] (0 K0, 1 K1, 2 K2), Int [W], CRef [AW]}.
// n <= 2 is treated as a base case (so n = 0 also gives 1). If a push would
// overflow the 2**AW-entry stack the call ends with overflow set.
// Interface: start (valid/ready, n); result (valid/ready, value, overflow).
module fib_cps #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_valid,
  output logic         start_ready,
  input  logic [W-1:0] start_n,
  output logic         res_valid,
  input  logic         res_ready,
  output logic [W-1:0] res_value,
  output logic         res_overflow
);
  typedef enum logic [1:0] {K0 = 2'd0, K1 = 2'd1, K2 = 2'd2} ktag_e;
  typedef struct packed {
    ktag_e         tag;
    logic [W-1:0]  val;
    logic [AW-1:0] ref_;
  } cont_t;
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_FIBK, S_KK, S_DONE} state_e;

  state_e        state;
  logic [W-1:0]  n, acc;
  logic [AW-1:0] k;
  logic [AW:0]   sp;                 // number of live continuations
  logic          ovf;

  cont_t         mem [2**AW];
  cont_t         rd_word, wr_word;
  logic          we;
  logic [AW-1:0] wa, ra;

  // ---- rule selection (combinational) --------------------------------------
  always_comb begin
    we      = 1'b0;
    wa      = sp[AW-1:0];
    wr_word = '0;
    ra      = k;
    unique case (state)
      S_INIT: begin
        we = 1'b1; wr_word.tag = K0;
      end
      S_FIBK: if (n > W'(2) && !sp[AW]) begin
        we = 1'b1; wr_word = '{tag: K1, val: n, ref_: k};
      end
      S_KK: begin
        if (rd_word.tag == K1 && !sp[AW]) begin
          we = 1'b1; wr_word = '{tag: K2, val: acc, ref_: rd_word.ref_};
        end
        ra = rd_word.ref_;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wr_word;
    rd_word <= mem[ra];
  end

  assign start_ready  = (state == S_IDLE);
  assign res_valid    = (state == S_DONE);
  assign res_value    = acc;
  assign res_overflow = ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n <= '0; acc <= '0; k <= '0; sp <= '0; ovf <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start_valid) begin
          n <= start_n; sp <= '0; ovf <= 1'b0;
          state <= S_INIT;
        end
        S_INIT: begin                    // Fibk n (write K0)
          k <= '0; sp <= 1;
          state <= S_FIBK;
        end
        S_FIBK: begin
          if (n <= W'(2)) begin          // KK (read k) 1
            acc <= W'(1);
            sp  <= sp - 1'b1;
            state <= S_KK;
          end else if (sp[AW]) begin     // no room for another continuation
            ovf <= 1'b1;
            state <= S_DONE;
          end else begin                 // Fibk (n-1) (write (K1 n k))
            k  <= sp[AW-1:0];
            sp <= sp + 1'b1;
            n  <= n - 1'b1;
          end
        end
        S_KK: begin
          unique case (rd_word.tag)
            K1: begin                    // Fibk (n-2) (write (K2 n1 k))
              if (sp[AW]) begin
                ovf <= 1'b1;
                state <= S_DONE;
              end else begin
                k  <= sp[AW-1:0];
                sp <= sp + 1'b1;
                n  <= rd_word.val - W'(2);
                state <= S_FIBK;
              end
            end
            K2: begin                    // KK (read k) (n1 + n2)
              acc <= rd_word.val + acc;
              sp  <= sp - 1'b1;
            end
            default: state <= S_DONE;    // K0: the result is acc
          endcase
        end
        S_DONE: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
