// df_merge: two-way nondeterministic merge with a select output.
//
// Built as a two-way fork whose input is multiplexed by an arbiter: when a
// token is waiting on either input the arbiter picks one (alternating
// priority when both wait) and the token is sent both to the data output and,
// as the index of the chosen input, to the select output. Each of the two
// outputs has a duplicate-suppressing flip-flop as in df_fork, and the choice
// is held in a register until both have taken their copy, after which the
// chosen input is consumed. Valid outputs depend only on input valids and
// state, never on a ready. The arbitration policy is this library's choice.
module df_merge #(
  parameter int unsigned W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        in_valid,
  output logic [1:0]        in_ready,
  input  logic [1:0][W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [W-1:0]      out_data,
  output logic              sel_valid,
  input  logic              sel_ready,
  output logic              sel_data
);
  logic locked, locked_ch, prio;      // prio: input preferred on a tie
  logic ch, any, sent_o, sent_s, fire;

  always_comb begin
    if (locked)           ch = locked_ch;
    else if (&in_valid)   ch = prio;
    else                  ch = in_valid[1];
  end
  assign any       = locked | (|in_valid);
  assign out_valid = any & ~sent_o;
  assign sel_valid = any & ~sent_s;
  assign out_data  = in_data[ch];
  assign sel_data  = ch;
  assign fire      = any & (sent_o | out_ready) & (sent_s | sel_ready);
  always_comb begin
    in_ready     = '0;
    in_ready[ch] = fire;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0; locked_ch <= 1'b0; prio <= 1'b0;
      sent_o <= 1'b0; sent_s <= 1'b0;
    end else if (fire) begin
      locked <= 1'b0; sent_o <= 1'b0; sent_s <= 1'b0;
      prio   <= ~ch;
    end else if (any) begin
      locked    <= 1'b1;
      locked_ch <= ch;
      sent_o    <= sent_o | out_ready;
      sent_s    <= sent_s | sel_ready;
    end
  end
endmodule
