// df_dbuf: data buffer of the FHW dataflow library.
//
// A pipeline register with a valid bit and an enable. The register loads
// whenever it is empty or its token is being taken downstream, so
// in_ready = out_ready | ~out_valid. It cuts the combinational valid and data
// paths (one cycle of latency, full throughput) but passes ready through
// combinationally. INIT_VALID/INIT_DATA let a buffer hold an initial token
// after reset, which a loop uses to issue its first select token (this
// library's choice).
module df_dbuf #(
  parameter int unsigned W          = 32,
  parameter bit          INIT_VALID = 1'b0,
  parameter logic [W-1:0] INIT_DATA = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  assign in_ready = out_ready | ~out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= INIT_VALID;
      out_data  <= INIT_DATA;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end
  end
endmodule
