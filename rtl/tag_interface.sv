// tag_interface: routing-tag interface in front of one switch inlet.
//
// Before a cell enters the FTSE-based network its routing tag is extended
// by one bit for the extra first stage: 0 selects the normal path, 1 the
// alternate ("hatched") path, which is disjoint from the normal one.  The
// interface takes a cell whose tag and multicast addresses hold the n-bit
// outlet numbers and writes the extra bit (bit NS-1) into the tag and into
// every multicast address.  The bit is the backward fault signal (bfs_i)
// that the first-stage FTSE raises when the normal path from this inlet is
// broken.  force_alt_i selects the alternate path regardless.
//
// Purely combinational.  Following the design: the prefixed path bit and
// its use of the BFS signals.  Own choices: which BFS signal feeds it and the
// force input.
module tag_interface
  import atm_pkg::*;
#(
  parameter int unsigned NS = 3       // stages = log2(N) + 1
) (
  input  cell_t cell_i,
  input  logic  bfs_i,
  input  logic  force_alt_i,
  output cell_t cell_o
);

  always_comb begin
    logic alt;
    alt    = bfs_i || force_alt_i;
    cell_o = cell_i;
    cell_o.tag[NS-1] = alt;
    for (int k = 0; k < MAX_DEST; k++) cell_o.maddr[k][NS-1] = alt;
    if (!cell_i.valid) cell_o = CELL_EMPTY;
  end

endmodule
