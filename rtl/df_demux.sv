// df_demux: N-way demultiplexer block of the FHW dataflow library.
//
// A token on the select channel chooses the output to which the input token
// is sent. Output k is valid when the select and input tokens are present and
// the select value is k; both tokens are consumed when that output takes the
// token. Purely combinational; no path from ready to valid.
module df_demux #(
  parameter int unsigned N  = 2,
  parameter int unsigned W  = 32,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 sel_valid,
  output logic                 sel_ready,
  input  logic [SW-1:0]        sel_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [W-1:0]         in_data,
  output logic [N-1:0]         out_valid,
  input  logic [N-1:0]         out_ready,
  output logic [N-1:0][W-1:0]  out_data
);
  logic         fire;
  logic [N-1:0] hot;       // one-hot decode of the select value

  always_comb begin
    hot = '0;
    for (int k = 0; k < N; k++) hot[k] = (32'(sel_data) == k);
  end
  assign out_valid = {N{sel_valid & in_valid}} & hot;
  assign out_data  = {N{in_data}};
  assign fire      = |(out_valid & out_ready);
  assign in_ready  = fire;
  assign sel_ready = fire;
endmodule
