// tb_pirate_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Random request vectors and accept strobes drive a 4-way and a 5-way
// arbiter. A reference pointer kept in the testbench predicts every grant: the
// first request at or after the pointer, the pointer moving past the winner
// when the grant is accepted. A fairness check keeps all lines requesting and
// accepting and requires each line to be granted exactly once in every N
// consecutive grants.
module tb_pirate_rr_arbiter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] req4, gnt4;  logic [1:0] idx4; logic v4, acc4;
  logic [4:0] req5, gnt5;  logic [2:0] idx5; logic v5, acc5;

  pirate_rr_arbiter #(.N(4)) u_a4 (.clk(clk), .rst_n(rst_n), .req(req4), .accept(acc4),
                                   .gnt(gnt4), .gnt_idx(idx4), .gnt_valid(v4));
  pirate_rr_arbiter #(.N(5)) u_a5 (.clk(clk), .rst_n(rst_n), .req(req5), .accept(acc5),
                                   .gnt(gnt5), .gnt_idx(idx5), .gnt_valid(v5));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Reference: winner of a round-robin scan from ptr, -1 if none.
  function automatic int ref_winner(int n, int ptr, logic [7:0] req);
    for (int i = 0; i < n; i++)
      if (req[(ptr + i) % n]) return (ptr + i) % n;
    return -1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int p4 = 0, p5 = 0, w4, w5;
    automatic int seen [5];
    req4 = '0; req5 = '0; acc4 = 0; acc5 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc < 2000) begin
        req4 = 4'($urandom); req5 = 5'($urandom);
        acc4 = ($urandom % 4) != 0; acc5 = ($urandom % 4) != 0;
      end else begin
        req4 = '1; req5 = '1; acc4 = 1; acc5 = 1;
      end
      #1;
      w4 = ref_winner(4, p4, 8'(req4));
      w5 = ref_winner(5, p5, 8'(req5));
      check(v4 == (w4 >= 0), "4-way valid");
      check(v5 == (w5 >= 0), "5-way valid");
      if (w4 >= 0) begin
        check(idx4 == 2'(w4) && gnt4 == 4'(1 << w4), $sformatf("4-way grant %0d exp %0d", idx4, w4));
      end else check(gnt4 == '0, "4-way no grant");
      if (w5 >= 0) begin
        check(idx5 == 3'(w5) && gnt5 == 5'(1 << w5), $sformatf("5-way grant %0d exp %0d", idx5, w5));
      end else check(gnt5 == '0, "5-way no grant");
      if (cyc >= 2000) begin
        seen[idx5]++;
        if ((cyc - 2000) % 5 == 4) begin
          for (int i = 0; i < 5; i++) begin
            check(seen[i] == 1, $sformatf("fairness line %0d granted %0d times in 5", i, seen[i]));
            seen[i] = 0;
          end
        end
      end
      @(posedge clk);
      if (acc4 && w4 >= 0) p4 = (w4 + 1) % 4;
      if (acc5 && w5 >= 0) p5 = (w5 + 1) % 5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
