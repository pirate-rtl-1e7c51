// pirate_noc_traffic: traffic generator and checker for a PIRATE network of
// NODES nodes, used by the network testbenches.
//
// Phase 1, zero load: one single-flit packet at a time from every node to
// every node; each must arrive at its destination exactly hops+1 cycles after
// it was injected, hops being the shortest distance in the topology (computed
// here by a breadth-first search over the topology's links, written out
// independently of the RTL's routing functions).
// Phase 2, uniform random traffic: for each of NRATES injection rates, every
// node starts a packet in a cycle with probability RATE_FIRST + r * RATE_STEP percent (a
// Bernoulli process, the discrete form of Poisson arrivals) to a uniformly
// random other node, of 1..MAX_LEN flits, for LOAD_CYCLES cycles; the network
// is then drained. Packets wait in an unbounded source queue, so the measured
// latency (creation to tail delivery) includes source queueing.
// Every delivered flit is checked: right node, intact payload, packets whole
// and not interleaved, packets of each source/destination pair in order; every
// packet must arrive. Ejection ports are randomly not ready EJ_READY_PCT
// percent of the time.
module pirate_noc_traffic #(
  parameter int NODES         = 8,           // attached nodes
  parameter int LOCAL_PORTS   = 1,           // nodes per switch
  parameter int TOPO          = 5,           // pirate_pkg::topology_e value, 6 = line
  parameter int DATA_W        = 32,
  parameter int MAX_LEN       = 4,
  parameter int NRATES        = 3,
  parameter int RATE_FIRST    = 10,          // injection rates in percent:
  parameter int RATE_STEP     = 20,          // RATE_FIRST + r * RATE_STEP, r < NRATES
  parameter int LOAD_CYCLES   = 1000,
  parameter int EJ_READY_PCT  = 90,
  parameter int DRAIN_LIMIT   = 20000,
  localparam int FW = DATA_W + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [NODES-1:0] inj_valid,
  input  logic [NODES-1:0] inj_ready,
  output logic [FW-1:0]    inj_flit [NODES],
  input  logic [NODES-1:0] ej_valid,
  output logic [NODES-1:0] ej_ready,
  input  logic [FW-1:0]    ej_flit  [NODES],
  output bit               done,
  output int               checks,
  output int               failures,
  output int               n_backpressure,  // cycles a node could not inject
  output int               n_ej_stall,      // cycles a flit waited at a busy ejection port
  output int               n_multihop       // packets that crossed 2 or more links
);

  // ---- topology, written out as neighbour lists, and hop counts by BFS ----
  localparam int NSW = NODES / LOCAL_PORTS;   // switches
  function automatic bit linked(int a, int b);
    int cols;
    case (TOPO)
      0: return b == (a + 1) % NSW;                                          // ring
      1: return b == (a + 1) % NSW || a == (b + 1) % NSW;                  // double ring
      2: begin                                                                 // 2-row mesh
        cols = NSW / 2;
        if (a / cols == b / cols && (a - b == 1 || b - a == 1)) return 1;
        return a % cols == b % cols && a != b;
      end
      3: return $countones(a ^ b) == 1;                                        // cube
      4: return b == 2 * a + 1 || b == 2 * a + 2 || a == 2 * b + 1 || a == 2 * b + 2; // tree
      5: return b == (a + 1) % NSW || a == (b + 1) % NSW || b == (a + NSW / 2) % NSW; // octagon
      6: return a - b == 1 || b - a == 1;  // a line: a Double-Ring routed without its wrap-around links
      default: return 0;
    endcase
  endfunction

  int sw_hops [NSW][NSW];
  int hops [NODES][NODES];     // links between the switches of two nodes

  function automatic int RATE_PCT(int r);
    return RATE_FIRST + r * RATE_STEP;
  endfunction

  function automatic void compute_hops();
    int q [$];
    int cur;
    for (int s = 0; s < NSW; s++) begin
      for (int d = 0; d < NSW; d++) sw_hops[s][d] = -1;
      sw_hops[s][s] = 0;
      q.push_back(s);
      while (q.size() > 0) begin
        cur = q.pop_front();
        for (int n = 0; n < NSW; n++)
          if (linked(cur, n) && sw_hops[s][n] < 0) begin
            sw_hops[s][n] = sw_hops[s][cur] + 1;
            q.push_back(n);
          end
      end
    end
    for (int a = 0; a < NODES; a++)
      for (int b = 0; b < NODES; b++) hops[a][b] = sw_hops[a / LOCAL_PORTS][b / LOCAL_PORTS];
  endfunction

  // ---- packets ----
  // Payload: [7:0] dest, [15:8] source, [27:16] sequence number per source,
  // [30:28] flit number, [31] set when bits [30:0] are sent complemented. Body
  // flits are complemented at random so that link words change in many bits
  // (head flits keep their destination plain for the switches).
  function automatic logic [FW-1:0] mk(bit h, bit t, int dest, int src, int seq, int idx);
    logic [31:0] p;
    p = {1'b0, 3'(idx), 12'(seq), 8'(src), 8'(dest)};
    if (!h && $urandom % 2) p = {1'b1, ~p[30:0]};
    return {h, t, DATA_W'(p)};
  endfunction

  function automatic logic [31:0] plain(logic [FW-1:0] f);
    logic [31:0] p;
    p = 32'(f[DATA_W-1:0]);
    return p[31] ? {1'b0, ~p[30:0]} : p;
  endfunction

  logic [FW-1:0] srcq [NODES][$];
  int            seq  [NODES];
  int            born [int];         // creation cycle, key src*4096+seq
  int            sent, received, cycle;
  int            lat_sum, lat_cnt;
  bit            zero_load;
  int            zl_expect [int];    // expected zero-load latency, same key
  int            zl_inj    [int];    // injection cycle, same key
  bit            in_pkt [NODES];
  int            cur_src [NODES], cur_seq [NODES], cur_idx [NODES];
  int            last_seq [NODES][NODES];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t topo %0d: %s", $time, TOPO, what);
    end
  endtask

  task automatic new_packet(int s, int d, int len);
    for (int f = 0; f < len; f++) srcq[s].push_back(mk(f == 0, f == len - 1, d, s, seq[s], f));
    born[s * 4096 + seq[s]] = cycle;
    if (zero_load) zl_expect[s * 4096 + seq[s]] = hops[s][d] + 1;
    seq[s] = (seq[s] + 1) % 4096;
    sent++;
  endtask

  // Port driver and monitor.
  initial begin
    cycle = 0; sent = 0; received = 0; lat_sum = 0; lat_cnt = 0;
    checks = 0; failures = 0; n_backpressure = 0; n_ej_stall = 0; n_multihop = 0;
    inj_valid = '0; ej_ready = '0;
    for (int i = 0; i < NODES; i++) begin
      inj_flit[i] = '0; seq[i] = 0; in_pkt[i] = 0;
      for (int j = 0; j < NODES; j++) last_seq[i][j] = -1;
    end
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      for (int i = 0; i < NODES; i++) begin
        inj_valid[i] = srcq[i].size() > 0;
        inj_flit[i]  = srcq[i].size() > 0 ? srcq[i][0] : '0;
        ej_ready[i]  = zero_load || ($urandom % 100) < EJ_READY_PCT;
      end
      #1;
      for (int n = 0; n < NODES; n++) begin
        if (inj_valid[n] && !inj_ready[n]) n_backpressure++;
        if (ej_valid[n] && !ej_ready[n]) n_ej_stall++;
        if (ej_valid[n] && ej_ready[n]) begin
          automatic logic [FW-1:0] f = {ej_flit[n][FW-1:FW-2], DATA_W'(plain(ej_flit[n]))};
          automatic int d = int'(f[7:0]), s = int'(f[15:8]), sq = int'(f[27:16]), ix = int'(f[30:28]);
          check(d == n, $sformatf("flit for node %0d delivered to node %0d", d, n));
          check(s < NODES, "source field");
          if (!in_pkt[n]) begin
            check(f[FW-1] && ix == 0, "packet starts with its head flit");
            check(s < NODES && (sq > last_seq[s][n] || (last_seq[s][n] > 3000 && sq < 1000)),
                  $sformatf("order of packets %0d -> %0d", s, n));
            if (s < NODES) last_seq[s][n] = sq;
            cur_src[n] = s; cur_seq[n] = sq; cur_idx[n] = 0;
          end else begin
            check(!f[FW-1] && s == cur_src[n] && sq == cur_seq[n] && ix == cur_idx[n] + 1,
                  $sformatf("no interleaving at node %0d", n));
            cur_idx[n]++;
          end
          in_pkt[n] = !f[FW-2];
          if (f[FW-2] && s < NODES) begin
            automatic int key = s * 4096 + sq;
            received++;
            if (born.exists(key)) begin
              lat_sum += cycle - born[key];
              lat_cnt++;
              born.delete(key);
            end else check(0, "packet delivered twice or never sent");
            if (hops[s][n] >= 2) n_multihop++;
            if (zl_expect.exists(key)) begin
              check(cycle - zl_inj[key] == zl_expect[key],
                    $sformatf("zero-load latency %0d -> %0d: %0d cycles, expected %0d",
                              s, n, cycle - zl_inj[key], zl_expect[key]));
              zl_expect.delete(key);
            end
          end
        end
      end
      // Both handshakes seen here complete at the coming clock edge, so
      // latencies are differences of the cycle count at this point.
      for (int i = 0; i < NODES; i++)
        if (zero_load && inj_valid[i] && inj_ready[i] && srcq[i][0][FW-1])
          zl_inj[i * 4096 + int'(srcq[i][0][27:16])] = cycle;
      @(posedge clk);
      for (int i = 0; i < NODES; i++)
        if (inj_valid[i] && inj_ready[i]) void'(srcq[i].pop_front());
    end
  end

  // Phases.
  initial begin
    done = 0;
    compute_hops();
    zero_load = 1;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++) begin
        check(hops[s][d] >= 0, "topology connected");
        new_packet(s, d, 1);
        wait (received == sent);
        @(posedge clk);
      end
    check(zl_expect.size() == 0, "all zero-load packets measured");
    zero_load = 0;
    for (int r = 0; r < NRATES; r++) begin
      automatic int start_sent = sent, t0;
      lat_sum = 0; lat_cnt = 0;
      for (int c = 0; c < LOAD_CYCLES; c++) begin
        @(negedge clk);
        for (int s = 0; s < NODES; s++)
          if (($urandom % 1000) < 10 * RATE_PCT(r)) begin
            automatic int d = $urandom % (NODES - 1);
            if (d >= s) d++;
            new_packet(s, d, 1 + $urandom % MAX_LEN);
          end
      end
      t0 = cycle;
      while (received != sent && cycle - t0 < DRAIN_LIMIT) @(posedge clk);
      check(received == sent, $sformatf("all packets delivered at rate %0d%%", RATE_PCT(r)));
      $display("topology %0d rate %0d%%: %0d packets, average latency %0d.%02d cycles",
               TOPO, RATE_PCT(r), sent - start_sent,
               lat_cnt ? lat_sum / lat_cnt : 0, lat_cnt ? (100 * lat_sum / lat_cnt) % 100 : 0);
    end
    done = 1;
  end

endmodule
