// tb_pirate_switch_ctrl: self-checking test of the switch controller.
//
// Switch 0 of an 8-node Octagon (1 local port + 3 links = 4 ports). The
// testbench plays the input queues (one list of packets of 1..4 flits per
// input) and the output queues (random room). The controller's outputs are
// checked against rules worked out here, not against a copy of its logic:
//  - every flit leaves by the port that the Octagon's shortest route gives,
//    using a routing table written out by hand for switch 0;
//  - an output is only enabled when it has room, an input is popped exactly
//    when one enabled output selects it;
//  - on each output, the flits form whole packets from one input, in order
//    (wormhole: no interleaving);
//  - no output idles while it is free, has room, and an unbound input holds a
//    head flit for it (work conservation);
//  - every packet sent is delivered.
module tb_pirate_switch_ctrl;
  localparam int DATA_W = 32;
  localparam int FW = DATA_W + 2;
  localparam int NP = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [NP-1:0] head_valid, pop, out_ready, xbar_en, out_locked;
  logic [FW-1:0] head_flit [NP];
  logic [1:0]    xbar_sel  [NP];

  pirate_switch_ctrl #(.DATA_W(DATA_W)) u_dut (
    .clk(clk), .rst_n(rst_n), .head_valid(head_valid), .head_flit(head_flit), .pop(pop),
    .out_ready(out_ready), .xbar_sel(xbar_sel), .xbar_en(xbar_en), .out_locked(out_locked)
  );

  // Octagon switch 0: port 0 local, 1 -> link to 1, 2 -> link to 7, 3 -> link
  // to 4 (across). Every switch is within 2 hops; on ties the lower port wins:
  // 2 via 1, 3 via 7 (7 -> 3 is across), 5 via 1 (1 -> 5 across), 6 via 7.
  localparam int ROUTE [8] = '{0, 1, 1, 2, 3, 1, 2, 2};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Flit payload: [2:0] dest, [7:4] input, [15:8] packet number, [23:16] flit number.
  function automatic logic [FW-1:0] mk(bit h, bit t, int dest, int src, int pkt, int idx);
    return {h, t, 8'd0, 8'(idx), 8'(pkt), 4'(src), 1'b0, 3'(dest)};
  endfunction

  logic [FW-1:0] inq [NP][$];
  int sent = 0, received = 0, conflicts = 0, stalls = 0;
  bit in_pkt_out [NP];       // output o is inside a packet
  int cur_src [NP], cur_pkt [NP], cur_idx [NP];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int npkt [NP];
    automatic bit unbound [NP];
    // Packets: 150 per input, random destination and length.
    for (int i = 0; i < NP; i++) begin
      for (int p = 0; p < 150; p++) begin
        automatic int len = 1 + $urandom % 4;
        automatic int d = $urandom % 8;
        for (int f = 0; f < len; f++) inq[i].push_back(mk(f == 0, f == len - 1, d, i, p, f));
        sent++;
      end
      unbound[i] = 1;
    end
    head_valid = '0; out_ready = '0;
    for (int i = 0; i < NP; i++) head_flit[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (received < sent) begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        head_valid[i] = inq[i].size() > 0 && ($urandom % 8 != 0);
        head_flit[i]  = inq[i].size() > 0 ? inq[i][0] : '0;
      end
      out_ready = NP'($urandom) | NP'($urandom);
      #1;
      // Enables, selects and pops.
      for (int i = 0; i < NP; i++) begin
        automatic int n = 0;
        for (int o = 0; o < NP; o++) if (xbar_en[o] && xbar_sel[o] == 2'(i)) n++;
        check(n <= 1, "input selected by two outputs");
        check(pop[i] == (n == 1), "pop matches selection");
      end
      for (int o = 0; o < NP; o++) begin
        if (xbar_en[o]) begin
          automatic logic [FW-1:0] f = head_flit[xbar_sel[o]];
          check(out_ready[o], "enabled output had room");
          check(head_valid[xbar_sel[o]], "selected input had a flit");
          check(ROUTE[f[2:0]] == o, $sformatf("route dest %0d via port %0d", f[2:0], o));
          if (!in_pkt_out[o]) begin
            check(f[FW-1] == 1'b1, "packet starts with a head flit");
            check(f[23:16] == 0, "first flit number");
            cur_src[o] = int'(f[7:4]); cur_pkt[o] = int'(f[15:8]); cur_idx[o] = 0;
          end else begin
            check(int'(f[7:4]) == cur_src[o] && int'(f[15:8]) == cur_pkt[o] &&
                  int'(f[23:16]) == cur_idx[o] + 1, $sformatf("no interleaving on output %0d", o));
            cur_idx[o]++;
          end
          in_pkt_out[o] = !f[FW-2];
          if (f[FW-2]) received++;
        end else begin
          // Work conservation: a free output with room must take a waiting head flit.
          automatic bit want = 0;
          for (int i = 0; i < NP; i++) begin
            if (head_valid[i] && unbound[i] && head_flit[i][FW-1] && ROUTE[head_flit[i][2:0]] == o) begin
              want = 1;
            end
          end
          if (!in_pkt_out[o] && out_ready[o] && want) begin
            check(0, $sformatf("output %0d idle with a waiting head", o));
          end
          if (want && in_pkt_out[o]) conflicts++;
          if (want && !out_ready[o]) stalls++;
        end
      end
      @(posedge clk);
      for (int i = 0; i < NP; i++)
        if (pop[i]) begin
          unbound[i] = inq[i][0][FW-2];
          void'(inq[i].pop_front());
        end
    end
    check(conflicts > 0, "an output was held by a packet while another waited");
    check(stalls > 0, "an output without room stalled a head flit");
    $display("packets %0d, blocked by lock %0d, blocked by full output %0d", received, conflicts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
