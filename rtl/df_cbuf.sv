// df_cbuf: control buffer of the FHW dataflow library.
//
// Its ready output is a register, so it cuts the combinational ready path.
// While the skid register is empty the input token flows straight to the
// output (zero latency). If downstream stops while a token arrives, that
// token is diverted into the register and in_ready drops in the next cycle;
// the held token is offered first once downstream is ready again. Valid and
// data therefore stay combinational from input to output, ready does not.
module df_cbuf #(
  parameter int unsigned W = 32
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
  logic         full;
  logic [W-1:0] held;

  assign in_ready  = ~full;
  assign out_valid = full | in_valid;
  assign out_data  = full ? held : in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      held <= '0;
    end else if (!full) begin
      if (in_valid && !out_ready) begin
        full <= 1'b1;
        held <= in_data;
      end
    end else if (out_ready) begin
      full <= 1'b0;
    end
  end
endmodule
