// tb_pirate_noc_topologies: the topology exploration workload on RTL.
//
// Six 8-node networks side by side - Octagon, Cube, Double-Ring, Mesh (2 x 4),
// Binary-Tree and a unidirectional Ring - each under uniform random traffic of
// single-flit packets (so the injection rate is in packets per cycle per
// node) at injection rates of 0.1, 0.3, 0.5 and 0.7 (Double-Ring 0.1 and 0.3,
// Ring 0.1 only). pirate_noc_traffic checks
// every packet and the zero-load latency of every node pair (hops+1 cycles)
// and prints the average packet latency per rate. The Mesh network is built
// without bus-invert links to cover the plain link path.
module tb_pirate_noc_topologies;
  import pirate_pkg::*;
  localparam int NODES = 8;
  localparam int FW = 34;
  localparam int NT = 6;
  localparam topology_e TOPOS [NT] = '{TOPO_OCTAGON, TOPO_CUBE, TOPO_DOUBLE_RING,
                                        TOPO_MESH, TOPO_BINARY_TREE, TOPO_RING};

  // Injection rates (percent) per network. The two rings stop at the rates they
  // complete: shortest-path wormhole routing on a ring has a cyclic channel
  // dependency and, without virtual channels, can deadlock under heavy load.
  localparam int NRATES     [NT] = '{4, 4, 2, 4, 4, 1};
  localparam int RATE_STEP  [NT] = '{20, 20, 20, 20, 20, 10};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bit done [NT];
  int checks [NT], failures [NT], n_bp [NT], n_ejs [NT], n_mh [NT];

  for (genvar t = 0; t < NT; t++) begin : g_net
    logic [NODES-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
    logic [FW-1:0]    inj_flit [NODES], ej_flit [NODES];
    logic [3:0]       sw_locked [NODES];

    pirate_noc #(.TOPOLOGY(TOPOS[t]), .LINK_BUS_INVERT(TOPOS[t] != TOPO_MESH)) u_noc (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
      .sw_locked(sw_locked)
    );

    pirate_noc_traffic #(.NODES(NODES), .TOPO(int'(TOPOS[t])), .MAX_LEN(1),
                         .NRATES(NRATES[t]), .RATE_FIRST(10), .RATE_STEP(RATE_STEP[t]), .LOAD_CYCLES(800),
                         .EJ_READY_PCT(100)) u_traffic (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
      .done(done[t]), .checks(checks[t]), .failures(failures[t]),
      .n_backpressure(n_bp[t]), .n_ej_stall(n_ejs[t]), .n_multihop(n_mh[t])
    );
  end

  function automatic int total(int v [NT]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NT; t++) wait (done[t]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
