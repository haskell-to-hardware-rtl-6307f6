// df_fork: N-way fork of the FHW dataflow library.
//
// Copies every input token to all N outputs. Each output has a flip-flop that
// is set once its copy has been taken, which suppresses duplicates; an
// output's valid ignores the ready of the other outputs
// (out_valid[i] = in_valid & ~sent[i]). The input is consumed once a copy has
// gone out on every output, in that cycle the flip-flops clear. Outputs are
// therefore non-strict: a fast consumer gets its copy without waiting for a
// slow one. There is no combinational path from any ready to any valid.
module df_fork #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [W-1:0]        in_data,
  output logic [N-1:0]        out_valid,
  input  logic [N-1:0]        out_ready,
  output logic [N-1:0][W-1:0] out_data
);
  logic [N-1:0] sent, done;

  assign out_valid = {N{in_valid}} & ~sent;
  assign done      = sent | out_ready;
  assign out_data  = {N{in_data}};
  assign in_ready = in_valid & (&done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sent <= '0;
    else if (in_ready) sent <= '0;
    else if (in_valid) sent <= sent | (out_valid & out_ready);
  end
endmodule
