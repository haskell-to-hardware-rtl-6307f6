# Functional programs as dataflow hardware

This RTL shows how programs in a pure functional language (Haskell-like, with
algebraic data types and recursion) can be turned into synchronous digital
circuits. The flow rests on three ideas, and each one appears here as
hardware:

1. **Algebraic data types become tagged bit vectors.** A constructor tag
   sits in the low bit(s). The fields sit above it. A recursive field (the
   tail of a list, the subtree of a tree) is a pointer into a memory.
2. **Recursion becomes tail recursion plus explicit memory.** The program
   is rewritten into continuation-passing style. The continuations become a
   data type, and that data type is stored in memory. What remains is a loop
   that applies one rewrite rule per step.
3. **The loop becomes a dataflow network of patient blocks.** These are
   small circuits that pass *tokens* over valid/ready channels. They
   tolerate any delay on any channel, and they compose without creating
   combinational cycles.

The repository has a library of dataflow nodes (`df_*`). It also has five
example circuits built with the flow, which the top `fhw_top` places side by
side: four from the flow's examples and a divide-and-conquer tree map that
splits its work across two tasks with separate memories.

## The handshake and why the blocks compose

Every channel is `valid`, `ready` and `data`, driven in a fixed direction.

| valid | ready | meaning |
|-------|-------|---------|
| 1 | 1 | the token moves this cycle |
| 1 | 0 | the token is offered and must stay (same data) |
| 0 | – | no token |

One rule makes the library compositional: **no block has a combinational
path from a `ready` input to a `valid` output.** Paths from valid to ready
are allowed. With that rule, any cycle in a network of blocks must run
through some register. The designer still has to put one data buffer and one
control buffer in every loop: the first cuts the valid/data path and the
second cuts the ready path.

| block | module | what it does | latency |
|---|---|---|---|
| function | `df_func2` | Strict, unit rate. The output is valid when both inputs are valid. Both inputs are consumed when the output is taken. The operation comes from the `OP` parameter (`fhw_pkg::op_e`). | 0 |
| multiplexer | `df_mux` | A select token chooses one input. The select token and the chosen data token are consumed together. The other inputs wait. | 0 |
| demultiplexer | `df_demux` | A select token chooses the output that receives the input token. | 0 |
| data buffer | `df_dbuf` | A pipeline register with a valid bit. `in_ready = out_ready \| ~out_valid`. It cuts valid and data, not ready. It can start with a token after reset (`INIT_VALID`). | 1 |
| control buffer | `df_cbuf` | A one-entry skid register. Tokens pass straight through while it is empty. If downstream stops just as a token arrives, the token is diverted into the register. `in_ready` is a register output, so it cuts the ready path. | 0 |
| fork | `df_fork` | Copies each token to N outputs. See below. | 0 |
| merge | `df_merge` | Two-way nondeterministic merge. An arbiter picks a waiting input and a built-in two-way fork sends the token to `out` and the chosen index to `sel`. | 0 |
| read | `df_read` | Memory read node: a pointer token in, the word it points to out. Synchronous read, pipelined. It has a plain host write port. | 1 |

**Fork.** The obvious fork raises each output's valid only when every
output is ready. That makes valid depend on ready, so it breaks the rule
above and can close a combinational loop. `df_fork` instead gives each
output a flip-flop, `sent[i]`:

- Output *i* offers the token while `in_valid & ~sent[i]`, whatever the
  other outputs do.
- `sent[i]` is set once output *i* has taken its copy, which suppresses a
  duplicate.
- The input is consumed in the cycle where every output has either taken
  its copy earlier or takes it now. All `sent` bits then clear.

So fork outputs are *non-strict*: a fast consumer is not held back by a slow
one. This is what lets independent parts of a network run ahead of each
other.

**Merge.** The arbiter gives alternating priority when both inputs wait. It
holds its choice in a register until both the data copy and the select copy
have gone. A waiting input therefore sees the other input win at most once
before its own turn.

## Data layouts (`fhw_pkg`)

The Huffman decoder uses three layouts. Bit 0 is the tag.

| type | width | layout (MSB … LSB) |
|---|---|---|
| `htree_t` Huffman tree node | 19 | Branch: `left[8:0] right[8:0] 0`; Leaf: `… char[7:0] 1` (the character is the low byte of the `right` field) |
| `blist_t` Boolean list cell | 14 | Cons: `next[11:0] b 1`; Nil: `0` |
| `clist_t` character list cell | 19 | Cons: `next[9:0] char[7:0] 1`; Nil: `0` |

The list sum stores integer lists as `{next[AW-1:0], value[W-1:0], tag}`,
with tag 1 for Cons and 0 for Nil. The Fibonacci engine stores continuations
as `{tag[1:0], value[W-1:0], ref[AW-1:0]}`, with tags K0 = 0, K1 = 1, K2 = 2.

## The example circuits

### `sum_list`: a non-strict tail-recursive loop

```
sum lp s = case read lp of
             Nil       -> s
             Cons x xs -> sum xs (s + x)
```

Each argument enters through its own `df_mux`. A select token 0 takes a new
call from the ports; a select token 1 takes the loop-back value.

1. `lp` goes to `df_read`.
2. The cell read is forked four ways:
   - its data goes to a Cons demultiplexer, which splits it into `x` and
     `xs`;
   - its tag is that demultiplexer's select;
   - its tag is the "loop again" token of the lp select loop;
   - its tag crosses to the s side.
3. On the s side the tag is forked again:
   - to a demultiplexer on `s`. On Nil, `s` is the result. On Cons, `s`
     goes to the adder.
   - to the s select loop.
4. `xs` and `s + x` go back to their multiplexers.

Each of the four loops holds one `df_dbuf` and one `df_cbuf`. The data
buffers of the two select loops start with a token 0, so the first call is
taken from the ports.

The lp side and the s side are coupled only through the buffered tag and
`x` channels. The list side therefore keeps reading cells before the
additions have caught up. This works even before `s` has arrived: the
function is non-strict in `s`. The buffers on the crossing channels decide
how far ahead it runs; with one data and one control buffer each, it runs
about three cells ahead. In the test, a 100-element list whose `s` arrives 20
cycles after `lp` takes 218 cycles. A strict circuit could not start before
`s` and would need at least 20 + 2·100 = 220.

Throughput is one list cell every two cycles: the memory read plus the
`xs` data buffer. Several calls can be queued, and results come out in call
order.

### `gcd_df`: a loop with two arms, from library blocks only

```
gcd(a, b) = if a = b then a else if a < b then gcd(a, b - a) else gcd(a - b, b)
```

The netlist works like this:

- Two entry multiplexers feed forks.
- A three-valued compare (0 equal, 1 less, 2 greater) is forked to two
  three-way demultiplexers and to the select loop.
- The a < b arm forms `b - a`. The a > b arm forms `a - b`.
- The new `a` and the new `b` each return through a `df_merge`. Only one
  arm holds a token at a time, so the merge never reorders anything.
- In the equal arm, `a` is the result and `b` is dropped.

Each loop holds one data buffer and one control buffer. One subtraction
step takes one cycle. One call is in the loop at a time.

### `fib_cps`: recursion through an explicit continuation stack

The doubly recursive `fib` is rewritten into one tail-recursive function
over

```
data Cont = K0 | K1 Int CRef | K2 Int CRef
data Call = Fibk Int CRef | KK Cont Int
```

with these rules:

| rule | result |
|---|---|
| `Fibk n k` with n ≤ 2 | `KK (read k) 1` |
| `Fibk n k` | `Fibk (n-1) (write (K1 n k))` |
| `KK (K1 n k) n1` | `Fibk (n-2) (write (K2 n1 k))` |
| `KK (K2 n1 k) n2` | `KK (read k) (n1+n2)` |
| `KK K0 x` | `x` |

The hardware holds the current `Call` in registers and applies one rule per
cycle. Each continuation is read exactly once, in last-in first-out order,
so the continuation store is a stack: `write` pushes and returns the slot
number, and `read` pops. A call takes the number of rule applications plus
two cycles (one to write `K0`, one to present the result).

With the default 64-entry stack, n < 64 never overflows. A 32-bit result
holds up to fib 47. If the stack would overflow, the call ends with
`res_overflow` set.

### `huffman_decoder`

```
bit (False:xs) (Branch l _) = bit xs l
bit (True:xs)  (Branch _ r) = bit xs r
bit x          (Leaf c)     = c : bit x table
bit []         _            = []
```

The tree (512 × 19), the input list (4096 × 14) and the output list
(1024 × 19) are memories. The loop state is the pair (tree pointer, input
pointer).

- Two `df_read` nodes fetch the tree node and the next input cell at the
  same time.
- Every tree node visited costs two cycles, whether it is a Branch (which
  consumes a bit) or a Leaf (which emits a character and restarts at the
  root).
- A decode of B bits into C characters takes 2·(B + C + 1) + 1 cycles.

The output list is written from address 0 upwards: cell *i* points to
*i+1*, and the list ends with a Nil cell. The head of the output list is
therefore always address 0. A Leaf emits its character even when the input
is exhausted, so a tree made of a single Leaf never finishes, just as in the
source program.

### `tree_map_par`: a duplicated task with partitioned memory

```
map t = case t of
  Leaf       -> t
  Node l x r -> Node (map l) (f x) (map r)

map_S t = case t of
  Leaf       -> t
  Node l x r -> Node (map l) (f x) (TfromC (map_C (TtoC r)))
```

One `map` task working on one shared memory leaves the second half of the
tree waiting. So the top level is split: the left subtree is mapped in the
main heap while the right subtree is handled by a second copy of the task,
`map_C`, which has its own heap (`Heap_C`) and its own stack (`Stack_C`).
`TtoC` copies the right subtree into `Heap_C` and `TfromC` copies the
mapped result back.

- All four units are the same engine, `tree_walk`. It walks a tree with an
  explicit stack holding two kinds of frames: "left subtree running" `{r, x}`
  and "right subtree running" `{new l, x}`. `map` and `map_C` apply `f` and
  return Leaf pointers unchanged. `TtoC` and `TfromC` copy nodes and Leaves
  without applying `f`.
- `map` owns one port of the main heap and its stack. `TtoC`, `map_C` and
  `TfromC` run one after the other, so they share `Stack_C` and the second
  port of each heap (`tree_heap`, two ports).
- `map` and `TfromC` both build new nodes in the main heap at the same time.
  The caller therefore gives each one its own region (`start_free_a`,
  `start_free_b`).
- An engine spends 3 cycles per Leaf and 5 per Node. A call costs
  5 + max(cost(l) + 1, 3·cost(r) + 5) cycles, so the split pays off when the
  copied side carries about a third of the work of the other side. In the
  test, a left-heavy tree of 97 nodes takes 595 cycles this way against 780
  for a single engine.

The tree encoding and `f` are not fixed by the flow. Here a node word is
`{l[9:0], x[31:0], r[9:0], 1}`, a Leaf is all zeros, and `f x = x + 1`
(parameter `F_INC`). Only the root is split; deeper levels run sequentially
inside each engine.

## What is this design's own choice

The flow fixes the node behaviour, the data layouts of the Huffman example
and the structure of the list-sum network. The following are choices made
here:

- **Reset.** Active-low asynchronous `rst_n`. It empties every buffer and
  fork flip-flop and loads the initial select tokens.
- **Operation set.** The set of `df_func2` operations and its codes.
- **Integer list layout and widths.** The integer list layout, 32-bit
  integers, 12-bit list pointers in `sum_list`, and the 64-entry Fibonacci
  stack.
- **Where select tokens come from.** The loop select tokens come from a
  data buffer seeded with 0.
- **Buffers on crossing channels.** The extra buffers on the channels that
  cross from the lp side to the s side of `sum_list`.
- **GCD netlist.** The whole GCD netlist. Only "one buffer of each kind per
  loop" is given.
- **Huffman decoder insides.** An FSM-style loop around two read nodes, the
  output list placement, and no check for output overflow (the caller keeps
  the output within 1023 characters).
- **Merge arbitration.** Alternating priority on ties.
- **Fibonacci base case.** `n = 0` is treated as a base case and returns 1.
- **Allocation.** There is no general `write` (allocate) node: the
  Fibonacci engine allocates on its stack, the Huffman decoder writes its
  list directly, and the tree engines allocate with bump pointers.
- **Tree map insides.** The tree encoding, `f`, the stack-based engine, the
  sharing of `Stack_C` and of the heaps' second ports, the split allocation
  regions, and splitting only at the root.

Not built:

- **Shared-cache duplication.** `map` and `map_C` working on one shared
  memory. Only the partitioned version is built.
- **The compiler.** The compiler itself is software.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`, and
`tb/tb_fhw_top.sv` runs all five circuits at once at their default sizes.
`tree_walk` and `tree_heap` are exercised through `tb_tree_map_par`.
Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/fhw_pkg.sv tb/tb_fhw_top.sv --top-module tb_fhw_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. The testbenches rely on Verilator's
two-state simulation and read DUT internals hierarchically only to count
events (cells read ahead, arms taken, rules applied).

The testbenches check the following:

- **Library.** The library tests check token order, values, no loss and no
  duplication under random valid/ready patterns. They also check latency and
  rate at full speed, and that `df_cbuf`'s `in_ready` is registered.
- **Fork and merge.** The fork test checks non-strict outputs. The merge
  test checks that no input starves.
- **`sum_list`.** Correct sums, at most two cycles per element, cells
  read ahead of the additions, and a finish earlier than a strict circuit
  could manage when `s` arrives late.
- **`gcd_df`.** Results against Euclid's remainder method, and exactly one
  cycle per subtraction step.
- **`fib_cps`.** Values for n = 1…18, a cycle count equal to an independent
  interpreter's rule count plus two, and overflow on a small stack.
- **`huffman_decoder`.** Random code trees and messages, the exact cycle
  count, and the complete output list, including Nil. It also runs the
  memories at their full size: a 511-node tree with a 4091-bit message, and
  a 1023-character output list.
- **`tree_map_par`.** Random balanced, left-heavy, right-heavy and
  irregular trees, and a Leaf alone. It checks the result tree, that the
  input tree is unchanged, that new nodes land in the right regions, and
  the exact cycle count. It also compares against a single engine, checks
  that the two tasks overlap, and checks the speed-up on a left-heavy tree.
