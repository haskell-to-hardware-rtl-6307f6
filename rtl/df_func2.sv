// df_func2: strict, unit-rate combinational function block with two inputs.
//
// An output token is produced only when both input tokens are present
// (out_valid = in0_valid & in1_valid), and both inputs are consumed in the
// cycle the output token is taken (in_ready = out_valid & out_ready). The
// datapath ignores flow control. This is the function block of the FHW
// dataflow library; the operation is chosen with the OP parameter (the codes
// are this library's own). Purely combinational: no latency, and there is a
// combinational path from valid to ready but never from ready to valid.
module df_func2 import fhw_pkg::*; #(
  parameter int unsigned WA  = 32,
  parameter int unsigned WB  = 32,
  parameter int unsigned WO  = 32,
  parameter op_e         OP  = OP_ADD
) (
  input  logic          in0_valid,
  output logic          in0_ready,
  input  logic [WA-1:0] in0_data,
  input  logic          in1_valid,
  output logic          in1_ready,
  input  logic [WB-1:0] in1_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [WO-1:0] out_data
);
  localparam int unsigned WM = (WA > WB) ? WA : WB;
  logic [WM-1:0] a, b, r;

  always_comb begin
    a = WM'(in0_data);
    b = WM'(in1_data);
    unique case (OP)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_RSUB: r = b - a;
      OP_EQ:   r = WM'(a == b);
      OP_LT:   r = WM'(a < b);
      OP_CMP3: r = (a == b) ? WM'(0) : (a < b) ? WM'(1) : WM'(2);
      OP_NE0:  r = WM'(a != '0);
      default: r = a;
    endcase
    out_data = WO'(r);
  end

  assign out_valid = in0_valid & in1_valid;
  assign in0_ready = out_valid & out_ready;
  assign in1_ready = out_valid & out_ready;
endmodule
