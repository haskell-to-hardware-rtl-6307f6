// tree_heap: a tree memory (heap partition) with two independent ports.
//
// 2**PW words of DW bits. Each port writes at its address when its write
// enable is set and returns the word at its address one clock later
// (synchronous read, read-before-write on the same port). Used as the main
// heap and as the separate heap partition of the parallel tree map: port A
// serves the map task, port B the subtree copy units. The two ports must not
// write the same word in the same cycle.
module tree_heap #(
  parameter int unsigned PW = 10,
  parameter int unsigned DW = 53
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [PW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_we,
  input  logic [PW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**PW];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end
  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end
endmodule
