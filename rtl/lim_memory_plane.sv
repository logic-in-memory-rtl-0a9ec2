// lim_memory_plane: the memory plane of one LIM cell.
//
// The architecture describes the memory plane only as a simple array of
// memory cells that the routing plane reads and writes, with as many words
// as the algorithm needs ("few"). This is that array: NWORDS words of
// DATA_W bits, a write port and a read port sharing one address.
//
// Timing: a write (we=1) takes effect at the rising clock edge; the read
// data follows addr combinationally, so the routing plane captures it in
// its memory data register in the same cycle. All words reset to zero.
// The word count (4) and the reset are this design's choices.
module lim_memory_plane
  import lim_pkg::*;
#(
  parameter int unsigned NWORDS = 2**WA_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(NWORDS)-1:0] addr,
  input  logic [DATA_W-1:0]         wdata,
  output logic [DATA_W-1:0]         rdata
);

  logic [DATA_W-1:0] mem [NWORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NWORDS); i++) mem[i] <= '0;
    end else if (we) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata = mem[addr];

endmodule
