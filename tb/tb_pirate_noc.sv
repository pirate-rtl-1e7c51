// tb_pirate_noc: end-to-end test of the PIRATE network at its default
// configuration (8 nodes, Octagon, 4-flit queues, bus-invert links).
//
// pirate_noc_traffic sends every node-to-node pair at zero load (latency must
// be hops+1 cycles, one cycle per hop) and then uniform random traffic of 1..4
// flit packets at injection rates of 0.10, 0.22 and 0.34 packets per cycle per node, with random ejection back-pressure,
// checking delivery, order and integrity of every packet. This testbench also
// counts, inside the network, how often each mechanism of the design acted:
// a flit waiting in an output queue (downstream stall), two head flits
// competing for one output in a cycle (arbitration), a head flit waiting for
// an output held by another packet (wormhole lock), and a bus-invert link
// sending an inverted word. Each must happen at least once.
module tb_pirate_noc;
  import pirate_pkg::*;
  localparam int NODES = 8;
  localparam int FW = 34;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODES-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  logic [FW-1:0]    inj_flit [NODES], ej_flit [NODES];
  logic [3:0]       sw_locked [NODES];

  pirate_noc u_dut (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
    .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
    .sw_locked(sw_locked)
  );

  bit done;
  int checks, failures, n_bp, n_ejs, n_mh;

  pirate_noc_traffic #(.NODES(NODES), .TOPO(int'(TOPO_OCTAGON)), .MAX_LEN(4),
                       .NRATES(3), .RATE_FIRST(10), .RATE_STEP(12), .LOAD_CYCLES(1500)) u_traffic (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
    .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit),
    .done(done), .checks(checks), .failures(failures),
    .n_backpressure(n_bp), .n_ej_stall(n_ejs), .n_multihop(n_mh)
  );

  // Mechanism counters, observed inside the switches.
  int n_outq_buffered = 0, n_arb_conflict = 0, n_lock_wait = 0, n_inverted = 0;

  for (genvar s = 0; s < NODES; s++) begin : g_mon
    for (genvar p = 0; p < 4; p++) begin : g_port
      always @(posedge clk) if (rst_n) begin
        if (u_dut.g_sw[s].u_switch.g_port[p].u_out_q.count != 0) n_outq_buffered++;
        if ($countones(u_dut.g_sw[s].u_switch.u_ctrl.arb_req[p]) > 1) n_arb_conflict++;
        if (u_dut.g_sw[s].u_switch.iq_valid[p] && !u_dut.g_sw[s].u_switch.u_ctrl.in_bound[p] &&
            sw_locked[s][u_dut.g_sw[s].u_switch.u_ctrl.target[p]]) n_lock_wait++;
      end
    end
    for (genvar k = 0; k < 3; k++) begin : g_link
      always @(posedge clk) if (rst_n) begin
        if (u_dut.g_sw[s].u_switch.out_valid[1+k] && u_dut.link_inv[s][k]) n_inverted++;
      end
    end
  end

  int extra_checks = 0, extra_failures = 0;
  task automatic need(input int count, input string what);
    extra_checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      extra_failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    need(n_mh,            "packets over two links");
    need(n_bp,            "injection back-pressure cycles");
    need(n_ejs,           "ejection stall cycles");
    need(n_outq_buffered, "output-queue buffering cycles");
    need(n_arb_conflict,  "arbitration conflicts");
    need(n_lock_wait,     "heads waiting on a held output");
    need(n_inverted,      "bus-inverted link transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end
endmodule
