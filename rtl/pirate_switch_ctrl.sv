// pirate_switch_ctrl: the Switch Controller of a PIRATE switch, holding the
// static routing table and the arbitration logic that steer the crossbar
// between the input and the output queues.
//
// Wormhole routing. When a head flit reaches the front of input queue i, its
// destination node (the low DEST_W payload bits) is looked up in the static
// routing table ROUTE_TABLE, which gives the output port. Each output port has
// a round-robin arbiter (pirate_rr_arbiter) among the inputs whose head flits
// ask for it. The winning head flit locks the output to its input; the body
// flits that follow need no lookup and go to the same output, and the tail
// flit releases the output and the input. A locked output serves only its
// owner, so the flits of two packets never interleave on one port.
//
// Per cycle, output o moves one flit (xbar_en[o]) from input xbar_sel[o] when
// that input has a flit for it and output queue o has room (out_ready[o]); the
// input queue is popped in the same cycle (pop[i]). Every decision is
// combinational from the queue heads and registered lock state, so a flit at
// the head of an input queue leaves the switch in the cycle it is seen.
//
// The routing table is a parameter, by default the shortest-path table that
// pirate_pkg::route_table() computes for the topology; a designer may pass any
// other table. Static routing tables, the arbitration logic and wormhole
// routing follow the original switch; round-robin, the lock bookkeeping and
// the flit format are this design's choices.
module pirate_switch_ctrl
  import pirate_pkg::*;
#(
  parameter int unsigned  DATA_W       = 32,
  parameter int unsigned  LOCAL_PORTS  = 1,
  parameter int unsigned  NUM_SWITCHES = 8,
  parameter int unsigned  SWITCH_ID    = 0,
  parameter topology_e    TOPOLOGY     = TOPO_OCTAGON,
  parameter route_table_t ROUTE_TABLE  = route_table(TOPOLOGY, NUM_SWITCHES, LOCAL_PORTS, SWITCH_ID),
  localparam int unsigned N_PORTS      = LOCAL_PORTS + LINK_PORTS,
  localparam int unsigned FLIT_W       = DATA_W + 2,
  localparam int unsigned PW           = $clog2(N_PORTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Heads of the input queues.
  input  logic [N_PORTS-1:0] head_valid,
  input  logic [FLIT_W-1:0]  head_flit  [N_PORTS],
  output logic [N_PORTS-1:0] pop,
  // Room in the output queues.
  input  logic [N_PORTS-1:0] out_ready,
  // Crossbar control.
  output logic [PW-1:0]      xbar_sel   [N_PORTS],
  output logic [N_PORTS-1:0] xbar_en,
  // Activity: output o is locked to a packet.
  output logic [N_PORTS-1:0] out_locked
);

  localparam int unsigned NUM_NODES = NUM_SWITCHES * LOCAL_PORTS;
  localparam int unsigned DEST_W    = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1;

  // Registered wormhole state.
  logic [N_PORTS-1:0] in_bound;               // input i is in the middle of a packet
  logic [PW-1:0]      in_port  [N_PORTS];     // ... and sends it to this output
  logic [N_PORTS-1:0] locked;                 // output o is held by a packet
  logic [PW-1:0]      owner    [N_PORTS];     // ... coming from this input

  // Combinational routing and arbitration.
  logic [PW-1:0]      target   [N_PORTS];     // output the head flit of input i needs
  logic [N_PORTS-1:0] arb_req  [N_PORTS];     // per output: requesting unbound inputs
  logic [PW-1:0]      arb_idx  [N_PORTS];
  logic [N_PORTS-1:0] arb_valid;
  logic [N_PORTS-1:0] arb_accept;
  logic [N_PORTS-1:0] fire;

  function automatic logic [PW-1:0] lookup(logic [DEST_W-1:0] dest);
    return PW'(ROUTE_TABLE[dest*ROUTE_ENT_W +: ROUTE_ENT_W]);
  endfunction

  always_comb begin
    for (int i = 0; i < int'(N_PORTS); i++)
      target[i] = in_bound[i] ? in_port[i] : lookup(head_flit[i][DEST_W-1:0]);
    for (int o = 0; o < int'(N_PORTS); o++)
      for (int i = 0; i < int'(N_PORTS); i++)
        arb_req[o][i] = !locked[o] && head_valid[i] && !in_bound[i] && target[i] == PW'(o);
  end

  for (genvar o = 0; o < int'(N_PORTS); o++) begin : g_arb
    pirate_rr_arbiter #(.N(N_PORTS)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (arb_req[o]),
      .accept   (arb_accept[o]),
      .gnt      (),
      .gnt_idx  (arb_idx[o]),
      .gnt_valid(arb_valid[o])
    );
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < int'(N_PORTS); o++) begin
      if (locked[o]) begin
        xbar_sel[o] = owner[o];
        fire[o]     = head_valid[owner[o]] && out_ready[o];
      end else begin
        xbar_sel[o] = arb_idx[o];
        fire[o]     = arb_valid[o] && out_ready[o];
      end
      arb_accept[o] = !locked[o] && fire[o];
      xbar_en[o]    = fire[o];
      if (fire[o]) pop[xbar_sel[o]] = 1'b1;
    end
  end

  assign out_locked = locked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_bound <= '0;
      locked   <= '0;
      for (int p = 0; p < int'(N_PORTS); p++) begin
        in_port[p] <= '0;
        owner[p]   <= '0;
      end
    end else begin
      for (int o = 0; o < int'(N_PORTS); o++) begin
        if (fire[o]) begin
          if (head_flit[xbar_sel[o]][FLIT_W-2]) begin
            // Tail flit: the packet has passed, release the path.
            locked[o]             <= 1'b0;
            in_bound[xbar_sel[o]] <= 1'b0;
          end else if (!locked[o]) begin
            // Head flit of a longer packet: hold the path for its body.
            locked[o]             <= 1'b1;
            owner[o]              <= xbar_sel[o];
            in_bound[xbar_sel[o]] <= 1'b1;
            in_port[xbar_sel[o]]  <= PW'(o);
          end
        end
      end
    end
  end

  // Handshake rule: a flit at an input that is not inside a packet must be a
  // head flit.
  for (genvar i = 0; i < int'(N_PORTS); i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     head_valid[i] && !in_bound[i] |-> head_flit[i][FLIT_W-1]);
  end

endmodule
