// pirate_noc: the PIRATE network-on-chip, NUM_SWITCHES switches joined in a
// standard topology, each serving LOCAL_PORTS attached masters/slaves.
//
// Every attached node has an injection port (inj_*) into its switch's local
// input queue and an ejection port (ej_*) from the local output queue, both
// valid/ready flit streams (flit format in pirate_pkg). Node m sits on local
// port m % LOCAL_PORTS of switch m / LOCAL_PORTS; a packet is sent to node d by
// putting d in the low bits of its head flit. TOPOLOGY selects Octagon (the
// default), Cube, Double-Ring, Mesh (2 rows), Binary-Tree or a unidirectional
// Ring; pirate_pkg computes, at elaboration, which link of which switch feeds
// which. ROUTE_TABLES holds every switch's static routing table (entry s for
// switch s, format in pirate_pkg); by default the shortest-path tables, but a
// designer may pass tables of their own, e.g. to balance traffic or to keep
// routes off a link.
//
// Timing: each switch costs one cycle per hop. A flit injected at a clock edge
// into a free network is offered on ej_* of its destination after h further
// edges, where h is the number of links on its route (h = 0 for a node on the
// same switch), and is taken at the edge after that.
//
// LINK_BUS_INVERT inserts a bus-invert encoder/decoder pair
// (pirate_bi_encoder/pirate_bi_decoder) on every switch-to-switch link; the
// pair adds no cycle. Node count 8, the topologies, one-cycle hops, static
// routing tables, wormhole switching and optional link encoding follow the
// original network; flit width, queue depths, the choice of bus-invert and the
// mesh shape are this design's.
module pirate_noc
  import pirate_pkg::*;
#(
  parameter int unsigned DATA_W          = 32,
  parameter int unsigned IN_DEPTH        = 4,
  parameter int unsigned OUT_DEPTH       = 4,
  parameter int unsigned LOCAL_PORTS     = 1,
  parameter int unsigned NUM_SWITCHES    = 8,
  parameter topology_e   TOPOLOGY        = TOPO_OCTAGON,
  parameter bit          LINK_BUS_INVERT = 1'b1,
  parameter route_tables_t ROUTE_TABLES  = all_route_tables(TOPOLOGY, NUM_SWITCHES, LOCAL_PORTS),
  localparam int unsigned NUM_NODES      = NUM_SWITCHES * LOCAL_PORTS,
  localparam int unsigned FLIT_W         = DATA_W + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_NODES-1:0] inj_valid,
  output logic [NUM_NODES-1:0] inj_ready,
  input  logic [FLIT_W-1:0]    inj_flit [NUM_NODES],
  output logic [NUM_NODES-1:0] ej_valid,
  input  logic [NUM_NODES-1:0] ej_ready,
  output logic [FLIT_W-1:0]    ej_flit  [NUM_NODES],
  // Per switch, the output ports held by a packet (for activity monitoring).
  output logic [LOCAL_PORTS+LINK_PORTS-1:0] sw_locked [NUM_SWITCHES]
);

  localparam int unsigned NP = LOCAL_PORTS + LINK_PORTS;
  localparam int unsigned L  = LOCAL_PORTS;

  logic [NP-1:0]     sw_in_valid  [NUM_SWITCHES];
  logic [NP-1:0]     sw_in_ready  [NUM_SWITCHES];
  logic [FLIT_W-1:0] sw_in_flit   [NUM_SWITCHES][NP];
  logic [NP-1:0]     sw_out_valid [NUM_SWITCHES];
  logic [NP-1:0]     sw_out_ready [NUM_SWITCHES];
  logic [FLIT_W-1:0] sw_out_flit  [NUM_SWITCHES][NP];

  // Wires of each switch-to-switch link, named by its sending switch and link.
  logic [FLIT_W-1:0] link_bus [NUM_SWITCHES][LINK_PORTS];
  logic              link_inv [NUM_SWITCHES][LINK_PORTS];

  for (genvar s = 0; s < int'(NUM_SWITCHES); s++) begin : g_sw
    pirate_switch #(
      .DATA_W      (DATA_W),
      .IN_DEPTH    (IN_DEPTH),
      .OUT_DEPTH   (OUT_DEPTH),
      .LOCAL_PORTS (LOCAL_PORTS),
      .NUM_SWITCHES(NUM_SWITCHES),
      .SWITCH_ID   (s),
      .TOPOLOGY    (TOPOLOGY),
      .ROUTE_TABLE (ROUTE_TABLES[s])
    ) u_switch (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (sw_in_valid[s]),
      .in_ready  (sw_in_ready[s]),
      .in_flit   (sw_in_flit[s]),
      .out_valid (sw_out_valid[s]),
      .out_ready (sw_out_ready[s]),
      .out_flit  (sw_out_flit[s]),
      .out_locked(sw_locked[s])
    );

    // Attached nodes.
    for (genvar p = 0; p < int'(L); p++) begin : g_local
      assign sw_in_valid[s][p]  = inj_valid[s*L + p];
      assign sw_in_flit[s][p]   = inj_flit[s*L + p];
      assign inj_ready[s*L + p] = sw_in_ready[s][p];
      assign ej_valid[s*L + p]  = sw_out_valid[s][p];
      assign ej_flit[s*L + p]   = sw_out_flit[s][p];
      assign sw_out_ready[s][p] = ej_ready[s*L + p];
    end

    for (genvar k = 0; k < int'(LINK_PORTS); k++) begin : g_link
      localparam int DST_SW = link_dst_sw(TOPOLOGY, NUM_SWITCHES, s, k);
      localparam int DST_K  = link_dst_port(TOPOLOGY, NUM_SWITCHES, s, k);
      localparam int SRC_SW = link_src_sw(TOPOLOGY, NUM_SWITCHES, s, k);
      localparam int SRC_K  = link_src_port(TOPOLOGY, NUM_SWITCHES, s, k);

      // Sending side of output link k.
      if (DST_SW >= 0) begin : g_out
        assign sw_out_ready[s][L+k] = sw_in_ready[DST_SW][L+DST_K];
        if (LINK_BUS_INVERT) begin : g_enc
          pirate_bi_encoder #(.WIDTH(FLIT_W)) u_enc (
            .clk    (clk),
            .rst_n  (rst_n),
            .valid  (sw_out_valid[s][L+k]),
            .data   (sw_out_flit[s][L+k]),
            .bus    (link_bus[s][k]),
            .bus_inv(link_inv[s][k])
          );
        end else begin : g_plain
          assign link_bus[s][k] = sw_out_flit[s][L+k];
          assign link_inv[s][k] = 1'b0;
        end
      end else begin : g_no_out
        // Unused link: the routing table never selects it.
        assign sw_out_ready[s][L+k] = 1'b0;
        assign link_bus[s][k]       = '0;
        assign link_inv[s][k]       = 1'b0;
      end

      // Receiving side of input link k.
      if (SRC_SW >= 0) begin : g_in
        assign sw_in_valid[s][L+k] = sw_out_valid[SRC_SW][L+SRC_K];
        if (LINK_BUS_INVERT) begin : g_dec
          pirate_bi_decoder #(.WIDTH(FLIT_W)) u_dec (
            .bus    (link_bus[SRC_SW][SRC_K]),
            .bus_inv(link_inv[SRC_SW][SRC_K]),
            .data   (sw_in_flit[s][L+k])
          );
        end else begin : g_plain
          assign sw_in_flit[s][L+k] = link_bus[SRC_SW][SRC_K];
        end
      end else begin : g_no_in
        assign sw_in_valid[s][L+k] = 1'b0;
        assign sw_in_flit[s][L+k]  = '0;
      end
    end
  end

endmodule
