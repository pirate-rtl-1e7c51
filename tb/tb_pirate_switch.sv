// tb_pirate_switch: self-checking test of one PIRATE switch with its queues.
//
// Switch 0 of an 8-node Octagon (4 ports, 4-flit queues), ports driven as
// valid/ready streams. Phase 1 (zero load): one packet at a time from every
// input to every destination; each flit must leave by the hand-computed
// Octagon port exactly one cycle after it was taken in, the one-cycle hop.
// Phase 2 (load): every input sends 200 packets of 1..5 flits to random
// destinations while the outputs are randomly not ready. Checked: the port of
// every flit, whole packets per output with no interleaving, the order of the
// packets of each input on each output, the payload, and that all packets
// arrive. Counted and required: output-queue back-pressure (an input not
// ready) and a head flit that had to wait for an output held by another
// packet.
module tb_pirate_switch;
  localparam int DATA_W = 32;
  localparam int FW = DATA_W + 2;
  localparam int NP = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready, out_locked;
  logic [FW-1:0] in_flit [NP], out_flit [NP];

  pirate_switch #(.DATA_W(DATA_W)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_flit(in_flit),
    .out_valid(out_valid), .out_ready(out_ready), .out_flit(out_flit), .out_locked(out_locked)
  );

  // Octagon switch 0 (see tb_pirate_switch_ctrl): port per destination node.
  localparam int ROUTE [8] = '{0, 1, 1, 2, 3, 1, 2, 2};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Payload: [2:0] dest, [7:4] input, [15:8] packet number, [23:16] flit number,
  // [31:24] check byte.
  function automatic logic [FW-1:0] mk(bit h, bit t, int dest, int src, int pkt, int idx);
    logic [7:0] chk;
    chk = 8'(dest * 37 + src * 11 + pkt * 3 + idx);
    return {h, t, chk, 8'(idx), 8'(pkt), 4'(src), 1'b0, 3'(dest)};
  endfunction

  logic [FW-1:0] inq [NP][$];
  int sent = 0, received = 0;
  int cycle = 0;
  bit load_phase = 0;
  int in_time [NP][$];          // cycle each flit was taken in, per input
  int lat_checked = 0, backpressure = 0, held = 0;
  bit in_pkt_out [NP];
  int cur_src [NP], cur_pkt [NP], cur_idx [NP];
  int last_pkt [NP][NP];        // per (input, output): last packet number seen

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive inputs from the per-input packet lists, monitor outputs.
  initial begin
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < NP; i++) begin
      in_flit[i] = '0;
      for (int o = 0; o < NP; o++) last_pkt[i][o] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    forever begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        in_valid[i] = inq[i].size() > 0 && (!load_phase || $urandom % 4 != 0);
        in_flit[i]  = inq[i].size() > 0 ? inq[i][0] : '0;
      end
      out_ready = load_phase ? (NP'($urandom) | NP'($urandom)) : '1;
      #1;
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          automatic logic [FW-1:0] f = out_flit[o];
          automatic int src = int'(f[7:4]);
          check(ROUTE[f[2:0]] == o, $sformatf("dest %0d left by port %0d", f[2:0], o));
          check(f == mk(f[FW-1], f[FW-2], int'(f[2:0]), src, int'(f[15:8]), int'(f[23:16])), "payload");
          if (!in_pkt_out[o]) begin
            check(f[FW-1] && f[23:16] == 0, "packet starts with its head flit");
            check(int'(f[15:8]) > last_pkt[src][o], "packet order per input and output");
            last_pkt[src][o] = int'(f[15:8]);
            cur_src[o] = src; cur_pkt[o] = int'(f[15:8]); cur_idx[o] = 0;
          end else begin
            check(src == cur_src[o] && int'(f[15:8]) == cur_pkt[o] && int'(f[23:16]) == cur_idx[o] + 1,
                  $sformatf("no interleaving on output %0d", o));
            cur_idx[o]++;
          end
          in_pkt_out[o] = !f[FW-2];
          if (f[FW-2]) received++;
          if (!load_phase && src < NP && in_time[src].size() > 0) begin
            check(cycle - in_time[src].pop_front() == 1, "one cycle per hop at zero load");
            lat_checked++;
          end
        end
      end
      for (int i = 0; i < NP; i++) begin
        if (in_valid[i] && !in_ready[i]) backpressure++;
        // A head flit waiting at an input queue head for an output that is locked.
        if (u_dut.iq_valid[i] && !u_dut.u_ctrl.in_bound[i] && u_dut.iq_flit[i][FW-1] &&
            out_locked[ROUTE[u_dut.iq_flit[i][2:0]]]) held++;
      end
      @(posedge clk);
      for (int i = 0; i < NP; i++)
        if (in_valid[i] && in_ready[i]) begin
          void'(inq[i].pop_front());
          if (!load_phase) in_time[i].push_back(cycle);
        end
    end
  end

  initial begin
    @(posedge rst_n);
    // Phase 1: zero load, one single-flit packet at a time.
    for (int i = 0; i < NP; i++)
      for (int d = 0; d < 8; d++) begin
        inq[i].push_back(mk(1, 1, d, i, d, 0));
        sent++;
        wait (received == sent);
        repeat (2) @(posedge clk);
      end
    check(lat_checked == NP * 8, "all zero-load latencies measured");
    // Phase 2: load.
    load_phase = 1;
    for (int i = 0; i < NP; i++)
      for (int p = 8; p < 208; p++) begin
        automatic int len = 1 + $urandom % 5;
        automatic int d = $urandom % 8;
        for (int f = 0; f < len; f++) inq[i].push_back(mk(f == 0, f == len - 1, d, i, p, f));
        sent++;
      end
    wait (received == sent);
    check(backpressure > 0, "input back-pressure happened");
    check(held > 0, "a head flit waited for a held output");
    $display("packets %0d, back-pressure cycles %0d, head blocked by held output %0d",
             received, backpressure, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
