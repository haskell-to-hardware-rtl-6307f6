// df_read: memory read node ("read: pointer -> data") of the FHW library.
//
// Holds a memory of 2**AW words of W bits. A pointer token on the input
// channel is turned into the word it points to on the output channel, one
// cycle later, through a synchronous read port. The output register behaves
// like a data buffer (in_ready = out_ready | ~out_valid), so one read can be
// issued every cycle. A separate write port (wr_en/wr_addr/wr_data) loads the
// memory; it has no handshake and takes effect at the clock edge. Memory size
// and the host write port are this library's choices.
module df_read #(
  parameter int unsigned AW = 12,
  parameter int unsigned W  = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [AW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);
  logic [W-1:0] mem [2**AW];

  assign in_ready = out_ready | ~out_valid;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (in_valid && in_ready) out_data <= mem[in_data];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end
endmodule
