// ruft_pkg: types, constants and topology functions shared by the
// RUFT-family network (RUFT-PL, FT-RUFT-212, FT-RUFT-222).
//
// A packet is a fixed number of flits. Every flit carries a small routing
// sideband (head/tail marks, destination node and the secondary-ejection bit)
// next to its payload word, so a switch never has to parse the payload. The
// topology functions below give the port counts of a switch and the set of
// output links a packet may request; they implement the DESTRO/RUFT rule that
// a switch at stage s routes on digit s of the destination, extended with the
// parallel links and the dual injection/ejection of the three topologies.
//
// Port numbering (this design's own convention): a switch port index is
// copy*K + digit, where digit is the base-K digit that selects it and copy
// is 0 or 1 (parallel link, or primary/secondary injection/ejection link).
package ruft_pkg;

  // Widest node identifier supported (65536 nodes).
  localparam int unsigned NODE_W = 16;
  // Payload width of one flit (one byte per flit and cycle).
  localparam int unsigned DATA_W = 8;

  typedef enum logic [1:0] {
    RUFT_PL     = 2'd0,   // parallel links everywhere, injection/ejection to one switch
    FT_RUFT_212 = 2'd1,   // dual disjoint injection/ejection, single network links
    FT_RUFT_222 = 2'd2    // dual disjoint injection/ejection, parallel network links
  } topo_e;

  typedef struct packed {
    logic              head;   // first flit of a packet
    logic              tail;   // last flit of a packet
    logic              sec;    // packet is routed to the secondary ejection link
    logic [NODE_W-1:0] dest;   // final destination node
    logic [DATA_W-1:0] data;   // payload
  } flit_t;


  // Number of parallel links between switches of consecutive stages.
  function automatic int unsigned net_copies(topo_e t);
    return (t == FT_RUFT_212) ? 1 : 2;
  endfunction

  // Input ports of a switch at stage s of an n-stage network of arity k.
  function automatic int unsigned sw_inputs(topo_e t, int unsigned k, int unsigned s);
    return (s == 0) ? 2 * k : k * net_copies(t);
  endfunction

  // Output ports of a switch at stage s.
  function automatic int unsigned sw_outputs(topo_e t, int unsigned k, int unsigned n,
                                             int unsigned s);
    return (s == n - 1) ? 2 * k : k * net_copies(t);
  endfunction

  // Digit i (base k) of x.
  function automatic int unsigned digit(int unsigned x, int unsigned k, int unsigned i);
    return (x / (k ** i)) % k;
  endfunction

  // Is output port p of a switch at stage s a legal request for a packet to
  // node d whose secondary-ejection bit is sec? At stage 0 of the FT variants
  // the packet has not chosen its ejection link yet: both choices are legal
  // and the port taken decides (see sec_of_port).
  function automatic logic port_candidate(topo_e t, int unsigned k, int unsigned n,
                                          int unsigned s, int unsigned p,
                                          int unsigned d, logic sec);
    int unsigned cp, dg, r;
    // n is used only through s == n - 1; the network needs n >= 2 stages.
    cp = p / k;
    dg = p % k;
    if (s == 0 && t != RUFT_PL) begin
      // Digit 0 of d (primary) or of d with its LSB inverted (secondary).
      return (dg == digit(d, k, 0)) || (dg == digit(d ^ 1, k, 0));
    end
    r = (t != RUFT_PL && sec) ? (d ^ 1) : d;
    if (s == n - 1 && t != RUFT_PL)
      return (dg == digit(r, k, s)) && (cp == int'(sec));
    return dg == digit(r, k, s);
  endfunction

  // Secondary-ejection bit given to a packet that leaves a stage-0 switch of
  // an FT variant through port p.
  function automatic logic sec_of_port(int unsigned k, int unsigned p, int unsigned d);
    return (p % k) != digit(d, k, 0);
  endfunction

endpackage
