// tb_pirate_fifo: self-checking test of pirate_fifo in both of its modes.
//
// Two queues of depth 4 (a registered input queue and a fall-through output
// queue) get random writes and reads for 4000 cycles. A queue model in the
// testbench predicts in_ready, out_valid and every word read. The timing is
// checked too: a word written into the empty registered queue must not be
// visible before the next cycle, and the fall-through queue must show an
// incoming word in the cycle it arrives when it is empty.
module tb_pirate_fifo;
  localparam int W = 16;
  localparam int D = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         in_valid [2];
  logic         in_ready [2];
  logic [W-1:0] in_data  [2];
  logic         out_valid[2];
  logic         out_ready[2];
  logic [W-1:0] out_data [2];
  logic [$clog2(D+1)-1:0] count [2];

  for (genvar m = 0; m < 2; m++) begin : g_dut
    pirate_fifo #(.WIDTH(W), .DEPTH(D), .FALL_THROUGH(m == 1)) u_dut (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid[m]), .in_ready(in_ready[m]), .in_data(in_data[m]),
      .out_valid(out_valid[m]), .out_ready(out_ready[m]), .out_data(out_data[m]),
      .count(count[m])
    );
  end

  logic [W-1:0] model [2][$];
  int bypassed = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    // Watchdog.
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit push [2], pop [2];
    for (int m = 0; m < 2; m++) begin
      in_valid[m] = 0; in_data[m] = 0; out_ready[m] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int m = 0; m < 2; m++) begin
        // Phases of mostly-writing and mostly-reading to reach full and empty.
        in_valid[m]  = ($urandom % 100) < ((cyc / 200) % 2 ? 80 : 30);
        out_ready[m] = ($urandom % 100) < ((cyc / 200) % 2 ? 30 : 80);
        in_data[m]   = W'($urandom);
      end
      #1;
      for (int m = 0; m < 2; m++) begin
        automatic int n = model[m].size();
        check(in_ready[m] == (n < D), $sformatf("q%0d in_ready", m));
        check(count[m] == n, $sformatf("q%0d count", m));
        if (m == 0) check(out_valid[m] == (n > 0), "q0 out_valid");
        else        check(out_valid[m] == (n > 0 || in_valid[m]), "q1 out_valid");
        if (out_valid[m]) begin
          logic [W-1:0] exp;
          exp = (n > 0) ? model[m][0] : in_data[m];
          check(out_data[m] == exp, $sformatf("q%0d out_data %h exp %h", m, out_data[m], exp));
          if (m == 1 && n == 0 && out_ready[m]) bypassed++;
        end
        push[m] = in_valid[m] && in_ready[m];
        pop[m]  = out_valid[m] && out_ready[m];
      end
      @(posedge clk);
      for (int m = 0; m < 2; m++) begin
        if (push[m]) model[m].push_back(in_data[m]);
        if (pop[m])  void'(model[m].pop_front());
      end
    end
    check(bypassed > 0, "fall-through path used");
    $display("fall-through transfers: %0d", bypassed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
