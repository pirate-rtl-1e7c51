// tb_pirate_noc_configs: two network configurations beyond the defaults.
//
// Network 0 is an Octagon with two nodes on every switch (16 nodes, packets
// of 1..4 flits at injection rates 0.05 and 0.15): switches with several local
// ports, the way a system with more modules than switches is attached.
// Network 1 is a Double-Ring given routing tables of the testbench's own that
// never use the wrap-around links: designer-supplied routing tables, which
// remove the ring's cyclic channel dependency so it runs single-flit uniform
// traffic up to 0.7 packets/cycle/node without deadlock. pirate_noc_traffic
// checks every packet and every zero-load latency.
module tb_pirate_noc_configs;
  import pirate_pkg::*;
  localparam int NODES = 8;
  localparam int FW = 34;
  localparam int NX = 2;

  bit done [NX];
  int checks [NX], failures [NX], n_bp [NX], n_ejs [NX], n_mh [NX];

  // Designer routing tables for the Double-Ring: never use the wrap-around
  // links 7 -> 0 and 0 -> 7, i.e. route as on a line (up on link 0 when the
  // destination is higher, down on link 1 when lower). Longer paths, but no
  // cyclic channel dependency, so no deadlock at any load.
  function automatic route_tables_t line_tables();
    route_tables_t t = '0;
    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++)
        t[s][d*ROUTE_ENT_W +: ROUTE_ENT_W] = ROUTE_ENT_W'(d == s ? 0 : (d > s ? 1 : 2));
    return t;
  endfunction
  localparam route_tables_t LINE_TABLES = line_tables();

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  begin : g_two_local
    logic [15:0] inj_valid, inj_ready, ej_valid, ej_ready;
    logic [FW-1:0] inj_flit [16], ej_flit [16];
    logic [4:0]    sw_locked [NODES];

    pirate_noc #(.LOCAL_PORTS(2)) u_noc (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
      .sw_locked(sw_locked)
    );

    pirate_noc_traffic #(.NODES(16), .LOCAL_PORTS(2), .TOPO(int'(TOPO_OCTAGON)), .MAX_LEN(4),
                         .NRATES(2), .RATE_FIRST(5), .RATE_STEP(10), .LOAD_CYCLES(800)) u_traffic (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
      .done(done[0]), .checks(checks[0]), .failures(failures[0]),
      .n_backpressure(n_bp[0]), .n_ej_stall(n_ejs[0]), .n_multihop(n_mh[0])
    );
  end

  begin : g_custom_tables
    logic [NODES-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
    logic [FW-1:0]    inj_flit [NODES], ej_flit [NODES];
    logic [3:0]       sw_locked [NODES];

    pirate_noc #(.TOPOLOGY(TOPO_DOUBLE_RING), .ROUTE_TABLES(LINE_TABLES)) u_noc (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
      .sw_locked(sw_locked)
    );

    // Topology code 6 tells the checker to expect line distances |s - d|.
    pirate_noc_traffic #(.NODES(NODES), .TOPO(6), .MAX_LEN(1),
                         .NRATES(4), .RATE_FIRST(10), .RATE_STEP(20), .LOAD_CYCLES(800),
                         .EJ_READY_PCT(100)) u_traffic (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
      .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
      .done(done[1]), .checks(checks[1]), .failures(failures[1]),
      .n_backpressure(n_bp[1]), .n_ej_stall(n_ejs[1]), .n_multihop(n_mh[1])
    );
  end

  function automatic int total(int v [NX]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NX; t++) wait (done[t]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
