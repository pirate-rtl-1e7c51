// pirate_pkg: types, constants and elaboration-time functions shared by the
// PIRATE network-on-chip RTL.
//
// Flit format. Every flit on a switch port or a network link is a flat vector
// of FLIT_W = DATA_W + 2 bits: {head, tail, payload[DATA_W-1:0]}. A packet is
// one head flit, any number of body flits and one tail flit (a one-flit packet
// has both head and tail set). The low DEST_W bits of a head flit's payload hold
// the destination node address; the rest of the payload is free for the user.
// This format is a choice of this design: the switches only need to find the
// head and tail of a packet and the destination, which wormhole routing with a
// static routing table requires.
//
// Topologies. The network joins NUM_SWITCHES switches, each with LOCAL_PORTS
// ports for attached masters/slaves and LINK_PORTS = 3 ports towards other
// switches. The standard topologies are Ring, Double-Ring, Mesh, Cube,
// Binary-Tree and Octagon; link_dst_sw/link_dst_port below say, for output link
// k of switch s, which switch and input link it drives. route_link() computes a
// static shortest-path routing table from that wiring; taking the lowest-numbered
// link on ties gives dimension-order routing on the Cube and X-then-Y routing on
// the Mesh. The mesh is 2 rows of NUM_SWITCHES/2 columns, so every topology here
// fits in 3 link ports.
package pirate_pkg;

  // Link ports per switch (switch ports LOCAL_PORTS .. LOCAL_PORTS+2).
  localparam int unsigned LINK_PORTS = 3;
  // Largest network the elaboration-time routing functions handle.
  localparam int unsigned MAX_SWITCHES = 32;

  typedef enum logic [2:0] {
    TOPO_RING        = 3'd0,  // unidirectional ring, s -> s+1
    TOPO_DOUBLE_RING = 3'd1,  // two counter-rotating rings, s <-> s+1
    TOPO_MESH        = 3'd2,  // 2 x (n/2) mesh
    TOPO_CUBE        = 3'd3,  // hypercube, n a power of two, at most 3 dimensions
    TOPO_BINARY_TREE = 3'd4,  // switch s is parent of 2s+1 and 2s+2
    TOPO_OCTAGON     = 3'd5   // ring of 8 with a link to the opposite switch
  } topology_e;

  // Neighbour reached through output link k of switch s, or -1 if that link is
  // unused. Links are bidirectional except in the unidirectional Ring.
  function automatic int neighbour(topology_e topo, int n, int s, int k);
    int r, c, cols;
    neighbour = -1;
    case (topo)
      TOPO_RING:        if (k == 0) neighbour = (s + 1) % n;
      TOPO_DOUBLE_RING: begin
        if (k == 0) neighbour = (s + 1) % n;
        if (k == 1) neighbour = (s + n - 1) % n;
      end
      TOPO_MESH: begin
        cols = n / 2;
        r = s / cols;
        c = s % cols;
        if (k == 0 && c + 1 < cols) neighbour = s + 1;      // east
        if (k == 1 && c > 0)        neighbour = s - 1;      // west
        if (k == 2)                 neighbour = (r == 0) ? s + cols : s - cols; // north/south
      end
      TOPO_CUBE: if ((1 << k) < n) neighbour = s ^ (1 << k);
      TOPO_BINARY_TREE: begin
        if (k == 0 && s > 0)         neighbour = (s - 1) / 2;  // parent
        if (k == 1 && 2*s + 1 < n)   neighbour = 2*s + 1;      // left child
        if (k == 2 && 2*s + 2 < n)   neighbour = 2*s + 2;      // right child
      end
      TOPO_OCTAGON: begin
        if (k == 0) neighbour = (s + 1) % n;
        if (k == 1) neighbour = (s + n - 1) % n;
        if (k == 2) neighbour = (s + n / 2) % n;
      end
      default: neighbour = -1;
    endcase
  endfunction

  // Switch driven by output link k of switch s (-1: none).
  function automatic int link_dst_sw(topology_e topo, int n, int s, int k);
    return neighbour(topo, n, s, k);
  endfunction

  // Input link of link_dst_sw() fed by output link k of switch s.
  function automatic int link_dst_port(topology_e topo, int n, int s, int k);
    int d;
    d = neighbour(topo, n, s, k);
    link_dst_port = -1;
    if (d >= 0) begin
      if (topo == TOPO_RING) link_dst_port = 0;
      else begin
        for (int j = int'(LINK_PORTS) - 1; j >= 0; j--)
          if (neighbour(topo, n, d, j) == s) link_dst_port = j;
      end
    end
  endfunction

  // Switch feeding input link k of switch d (-1: none), and its output link.
  function automatic int link_src_sw(topology_e topo, int n, int d, int k);
    link_src_sw = -1;
    for (int s = 0; s < n; s++)
      for (int j = 0; j < int'(LINK_PORTS); j++)
        if (link_dst_sw(topo, n, s, j) == d && link_dst_port(topo, n, s, j) == k)
          link_src_sw = s;
  endfunction

  function automatic int link_src_port(topology_e topo, int n, int d, int k);
    link_src_port = -1;
    for (int s = 0; s < n; s++)
      for (int j = 0; j < int'(LINK_PORTS); j++)
        if (link_dst_sw(topo, n, s, j) == d && link_dst_port(topo, n, s, j) == k)
          link_src_port = j;
  endfunction

  // Static routing table entry: the output link (0..LINK_PORTS-1) that switch
  // s uses for packets to switch d != s, on a shortest path; the lowest-numbered
  // link wins ties. Returns -1 when d is unreachable or d == s.
  function automatic int route_link(topology_e topo, int n, int s, int d);
    int hops [MAX_SWITCHES*MAX_SWITCHES];   // hops[i*MAX_SWITCHES+j]: distance i -> j
    int nb;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        hops[i*MAX_SWITCHES+j] = (i == j) ? 0 : 1000;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < int'(LINK_PORTS); k++) begin
        nb = neighbour(topo, n, i, k);
        if (nb >= 0) hops[i*MAX_SWITCHES+nb] = 1;
      end
    for (int m = 0; m < n; m++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (hops[i*MAX_SWITCHES+m] + hops[m*MAX_SWITCHES+j] < hops[i*MAX_SWITCHES+j])
            hops[i*MAX_SWITCHES+j] = hops[i*MAX_SWITCHES+m] + hops[m*MAX_SWITCHES+j];
    route_link = -1;
    if (s != d && hops[s*MAX_SWITCHES+d] < 1000) begin
      for (int k = int'(LINK_PORTS) - 1; k >= 0; k--) begin
        nb = neighbour(topo, n, s, k);
        if (nb >= 0 && hops[nb*MAX_SWITCHES+d] == hops[s*MAX_SWITCHES+d] - 1) route_link = k;
      end
    end
  endfunction

  // Largest number of attached nodes (switches x local ports) a routing table
  // holds, and the bits of one table entry (a switch port number).
  localparam int unsigned MAX_NODES   = 64;
  localparam int unsigned ROUTE_ENT_W = 8;
  typedef logic [MAX_NODES*ROUTE_ENT_W-1:0] route_table_t;

  // Static routing table of switch s: entry d (bits d*ROUTE_ENT_W +:
  // ROUTE_ENT_W) is the switch port that packets for node d leave by. Node d is
  // local port d % local_ports of switch d / local_ports. Local ports are
  // switch ports 0 .. local_ports-1, link k is switch port local_ports + k.
  function automatic route_table_t route_table(topology_e topo, int n, int local_ports, int s);
    route_table_t t;
    int d_sw, k;
    t = '0;
    for (int d = 0; d < n * local_ports && d < int'(MAX_NODES); d++) begin
      d_sw = d / local_ports;
      if (d_sw == s) t[d*ROUTE_ENT_W +: ROUTE_ENT_W] = ROUTE_ENT_W'(d % local_ports);
      else begin
        k = route_link(topo, n, s, d_sw);
        if (k >= 0) t[d*ROUTE_ENT_W +: ROUTE_ENT_W] = ROUTE_ENT_W'(local_ports + k);
      end
    end
    return t;
  endfunction

  // Routing tables of a whole network, entry s for switch s.
  typedef route_table_t [MAX_SWITCHES-1:0] route_tables_t;

  function automatic route_tables_t all_route_tables(topology_e topo, int n, int local_ports);
    route_tables_t t;
    t = '0;
    for (int s = 0; s < n && s < int'(MAX_SWITCHES); s++) t[s] = route_table(topo, n, local_ports, s);
    return t;
  endfunction

  // Number of link hops between switches s and d along the static routes.
  function automatic int route_hops(topology_e topo, int n, int s, int d);
    int cur, k, h;
    cur = s;
    h = 0;
    while (cur != d && h < n) begin
      k = route_link(topo, n, cur, d);
      cur = neighbour(topo, n, cur, k);
      h++;
    end
    return h;
  endfunction

endpackage
