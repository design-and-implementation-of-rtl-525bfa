// atm_pkg: types and helpers shared by the fault tolerant ATM switch.
//
// A cell travels through the switch as one packed word (cell_t): a valid
// flag, the switch-internal header (priority, broadcast bit, multicast bit,
// number of multicast destinations, the multicast destination list and the
// unicast routing tag) followed by the 53-byte ATM cell itself.  The
// broadcast bit, multicast bit, destination count and destination list
// follow the cell format of the design; the priority bit, the field widths
// and the fixed-size destination list are choices of this implementation.
//
// Routing tags and destination addresses are n+1 bits wide for an N x N
// switch (n = log2 N): the leftmost bit selects the normal (0) or the
// alternate, "hatched" (1) path through the extra first stage, and the
// remaining n bits are the outlet number.  They are stored LSB-aligned in
// ADDR_W-bit fields; stage s of an NS-stage network reads bit NS-1-s.
// The helper functions take whole cells and int bit positions and read only
// the header fields and low bits they need; CELL_EMPTY is used by the
// modules that import the package.  A lint run of the package on its own
// reports these as unused.
package atm_pkg;

  // Widest routing tag supported: n+1 = 11 bits, i.e. switches up to
  // 1024 x 1024 (n = 10, the largest size the design was analysed for).
  localparam int ADDR_W    = 11;
  // Multicast destination list: up to MAX_DEST addresses, CNT_W-bit count.
  localparam int MAX_DEST  = 7;
  localparam int CNT_W     = 3;
  // The ATM cell proper: 53 bytes.
  localparam int PAYLOAD_W = 8 * 53;

  typedef struct packed {
    logic                               valid;
    logic                               prio;    // 1 = high priority
    logic                               bcast;   // broadcast bit
    logic                               mcast;   // multicast bit
    logic [CNT_W-1:0]                   mcnt;    // number of destination addresses
    logic [MAX_DEST-1:0][ADDR_W-1:0]    maddr;   // destination addresses, [0] first
    logic [ADDR_W-1:0]                  tag;     // unicast routing tag
    logic [PAYLOAD_W-1:0]               payload; // the 53-byte ATM cell
  } cell_t;

  localparam cell_t CELL_EMPTY = '0;

  // Fault/status bits of the units of one FTSE (1 = faulty).
  typedef struct packed {
    logic [1:0] ic;   // IC_1 = [0], IC_2 = [1]
    logic       sic;  // spare IC
    logic [1:0] oc;   // OC_1 = [0], OC_2 = [1]
    logic [1:0] soc;  // spare OC_1 = [0], spare OC_2 = [1]
  } ftse_fault_t;

  // A cell held by the routing logic together with the output ports
  // ([0] = upper, [1] = lower) it still has to be delivered to.
  typedef struct packed {
    cell_t      c;
    logic [1:0] want;
  } rl_entry_t;

  // Output ports a cell asks for at a stage whose routing bit is BITPOS.
  // Broadcast cells are copied to both ports except in the first stage,
  // multicast cells go to every port that one of their addresses selects,
  // unicast cells go where their tag bit points.
  function automatic logic [1:0] want_ports(cell_t c, int unsigned bitpos, logic first_stage);
    logic [1:0] w;
    w = 2'b00;
    if (!c.valid) begin
      w = 2'b00;
    end else if (c.bcast && !first_stage) begin
      w = 2'b11;
    end else if (c.mcast && !c.bcast) begin
      for (int k = 0; k < MAX_DEST; k++)
        if (k < int'(c.mcnt)) w[c.maddr[k][bitpos]] = 1'b1;
    end else begin
      w[c.tag[bitpos]] = 1'b1;
    end
    return w;
  endfunction

  // The copy of a cell sent to output port P: a multicast cell keeps only
  // the addresses that lie behind that port, packed to the front of the list.
  function automatic cell_t copy_for_port(cell_t c, int unsigned bitpos, logic p);
    cell_t r;
    int unsigned j;
    r = c;
    if (c.mcast && !c.bcast) begin
      r.maddr = '0;
      j = 0;
      for (int k = 0; k < MAX_DEST; k++) begin
        if (k < int'(c.mcnt) && c.maddr[k][bitpos] == p) begin
          r.maddr[j] = c.maddr[k];
          j++;
        end
      end
      r.mcnt = CNT_W'(j);
    end
    return r;
  endfunction

  // Link permutation between stage S and stage S+1 of an N x N FTSE-based
  // network (n = log2 N): the output link J (2 x FTSE index + port) lands
  // on input link next_link(S, J, n) of the next stage.  After the extra
  // first stage and after the first Baseline stage the whole link range is
  // unshuffled (rotated right by one bit); after each later stage the
  // unshuffle works within blocks half as large as before.
  function automatic int unsigned next_link(int unsigned s, int unsigned j, int unsigned n);
    int unsigned w;     // bits rotated
    int unsigned low;
    int unsigned hi;
    w = (s == 0) ? n : n - (s - 1);
    if (w < 2) return j;
    low = j & ((1 << w) - 1);
    hi  = j & ~((1 << w) - 1);
    return hi | (low >> 1) | ((low & 1) << (w - 1));
  endfunction

endpackage
