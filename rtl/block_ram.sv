// block_ram: true dual-port synchronous RAM, used as Block Memory 1 (left
// neighbour lines) and Block Memory 2 (top neighbour lines) of the filter.
//
// Two independent ports, A and B, each with an address, a write enable and
// write data. On a rising clock edge a port writes its word if we is high, and
// otherwise registers the addressed word onto its read data output, which is
// therefore valid one cycle after the address. The two ports must not write
// the same address in the same cycle (an assertion checks this). Contents are
// not reset.
//
// The organisation, 32 words of 32 bits with two ports, follows the source description;
// the read-first/no-change behaviour is this design's choice.
module block_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    else      a_rdata     <= mem[a_addr];
    if (b_we) mem[b_addr] <= b_wdata;
    else      b_rdata     <= mem[b_addr];
  end

  a_no_collision: assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr));

endmodule
