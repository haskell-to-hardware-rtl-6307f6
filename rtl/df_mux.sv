// df_mux: N-way multiplexer block of the FHW dataflow library.
//
// A token on the select channel chooses which data input is passed on. The
// output is valid when the select token and the chosen input token are both
// present; when the output token is taken, the select token and the chosen
// input token are consumed together. Inputs not selected wait. Purely
// combinational (zero latency); ready depends on valid, never the reverse.
module df_mux #(
  parameter int unsigned N  = 2,
  parameter int unsigned W  = 32,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 sel_valid,
  output logic                 sel_ready,
  input  logic [SW-1:0]        sel_data,
  input  logic [N-1:0]         in_valid,
  output logic [N-1:0]         in_ready,
  input  logic [N-1:0][W-1:0]  in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [W-1:0]         out_data
);
  logic sel_ok;
  assign sel_ok = (32'(sel_data) < N);

  logic [N-1:0] hot;       // one-hot decode of the select value

  always_comb begin
    hot = '0;
    for (int k = 0; k < N; k++) hot[k] = (32'(sel_data) == k);
  end
  assign out_valid = sel_valid & |(in_valid & hot);
  assign out_data  = sel_ok ? in_data[sel_data] : '0;
  assign in_ready  = {N{out_valid & out_ready}} & hot;
  assign sel_ready = out_valid & out_ready;
endmodule
