// pirate_switch: one PIRATE network switch, an N x N crossbar between N input
// FIFO queues and N output FIFO queues, steered by the Switch Controller.
//
// N_PORTS = LOCAL_PORTS + 3: ports 0 .. LOCAL_PORTS-1 attach masters/slaves,
// ports LOCAL_PORTS .. LOCAL_PORTS+2 are links to neighbouring switches. Every
// port is a valid/ready flit stream (FLIT_W = DATA_W + 2 bits, see
// pirate_pkg): in_* towards the switch, out_* away from it. in_ready is the
// input queue's "not full" and never depends on out_ready.
//
// Datapath: a flit is written into its input queue (pirate_fifo, registered)
// at a clock edge; in the next cycle the controller (pirate_switch_ctrl) routes
// it through the crossbar (pirate_crossbar) into the output queue, which is a
// fall-through pirate_fifo and so presents the flit on out_* in that same
// cycle; the next switch captures it at the following edge. A hop therefore
// costs one clock cycle when the path is free; the output queue only fills
// while the next switch stalls. Queue lengths IN_DEPTH and OUT_DEPTH are
// parameters like the original switch's; their default of 4 flits is this
// design's choice. Wormhole routing with a static routing table follows the
// original switch.
module pirate_switch
  import pirate_pkg::*;
#(
  parameter int unsigned  DATA_W       = 32,
  parameter int unsigned  IN_DEPTH     = 4,
  parameter int unsigned  OUT_DEPTH    = 4,
  parameter int unsigned  LOCAL_PORTS  = 1,
  parameter int unsigned  NUM_SWITCHES = 8,
  parameter int unsigned  SWITCH_ID    = 0,
  parameter topology_e    TOPOLOGY     = TOPO_OCTAGON,
  parameter route_table_t ROUTE_TABLE  = route_table(TOPOLOGY, NUM_SWITCHES, LOCAL_PORTS, SWITCH_ID),
  localparam int unsigned N_PORTS      = LOCAL_PORTS + LINK_PORTS,
  localparam int unsigned FLIT_W       = DATA_W + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_PORTS-1:0] in_valid,
  output logic [N_PORTS-1:0] in_ready,
  input  logic [FLIT_W-1:0]  in_flit  [N_PORTS],
  output logic [N_PORTS-1:0] out_valid,
  input  logic [N_PORTS-1:0] out_ready,
  output logic [FLIT_W-1:0]  out_flit [N_PORTS],
  // Output ports currently reserved by a packet (wormhole path held).
  output logic [N_PORTS-1:0] out_locked
);

  localparam int unsigned PW = $clog2(N_PORTS);

  logic [N_PORTS-1:0] iq_valid, iq_pop;
  logic [FLIT_W-1:0]  iq_flit  [N_PORTS];
  logic [N_PORTS-1:0] oq_ready;
  logic [FLIT_W-1:0]  xbar_flit [N_PORTS];
  logic [PW-1:0]      xbar_sel  [N_PORTS];
  logic [N_PORTS-1:0] xbar_en;

  for (genvar p = 0; p < int'(N_PORTS); p++) begin : g_port
    pirate_fifo #(.WIDTH(FLIT_W), .DEPTH(IN_DEPTH), .FALL_THROUGH(1'b0)) u_in_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[p]),
      .in_ready (in_ready[p]),
      .in_data  (in_flit[p]),
      .out_valid(iq_valid[p]),
      .out_ready(iq_pop[p]),
      .out_data (iq_flit[p]),
      .count    ()
    );

    pirate_fifo #(.WIDTH(FLIT_W), .DEPTH(OUT_DEPTH), .FALL_THROUGH(1'b1)) u_out_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (xbar_en[p]),
      .in_ready (oq_ready[p]),
      .in_data  (xbar_flit[p]),
      .out_valid(out_valid[p]),
      .out_ready(out_ready[p]),
      .out_data (out_flit[p]),
      .count    ()
    );
  end

  pirate_switch_ctrl #(
    .DATA_W      (DATA_W),
    .LOCAL_PORTS (LOCAL_PORTS),
    .NUM_SWITCHES(NUM_SWITCHES),
    .SWITCH_ID   (SWITCH_ID),
    .TOPOLOGY    (TOPOLOGY),
    .ROUTE_TABLE (ROUTE_TABLE)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .head_valid(iq_valid),
    .head_flit (iq_flit),
    .pop       (iq_pop),
    .out_ready (oq_ready),
    .xbar_sel  (xbar_sel),
    .xbar_en   (xbar_en),
    .out_locked(out_locked)
  );

  pirate_crossbar #(.N(N_PORTS), .WIDTH(FLIT_W)) u_xbar (
    .in_data  (iq_flit),
    .sel      (xbar_sel),
    .en       (xbar_en),
    .out_data (xbar_flit)
  );

endmodule
