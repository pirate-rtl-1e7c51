// tb_pirate_crossbar: self-checking test of the N x N crossbar.
//
// For 2000 random settings of the input words, the per-output selects and the
// enables, every enabled output must carry the word of the input it selects
// and every other output must be zero. Runs a 4 x 4 and a 5 x 5 crossbar.
module tb_pirate_crossbar;
  localparam int W = 34;
  int checks = 0, failures = 0;

  logic [W-1:0] in4 [4], out4 [4];
  logic [1:0]   sel4 [4];
  logic [3:0]   en4;
  logic [W-1:0] in5 [5], out5 [5];
  logic [2:0]   sel5 [5];
  logic [4:0]   en5;

  pirate_crossbar #(.N(4), .WIDTH(W)) u_x4 (.in_data(in4), .sel(sel4), .en(en4), .out_data(out4));
  pirate_crossbar #(.N(5), .WIDTH(W)) u_x5 (.in_data(in5), .sel(sel5), .en(en5), .out_data(out5));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++) begin
        in4[i]  = {W{1'b0}} | {$urandom, $urandom};
        sel4[i] = 2'($urandom);
      end
      for (int i = 0; i < 5; i++) begin
        in5[i]  = {W{1'b0}} | {$urandom, $urandom};
        sel5[i] = 3'($urandom % 5);
      end
      en4 = 4'($urandom);
      en5 = 5'($urandom);
      #1;
      for (int o = 0; o < 4; o++) begin
        check(out4[o] == (en4[o] ? in4[sel4[o]] : '0), $sformatf("4x4 out %0d data", o));
      end
      for (int o = 0; o < 5; o++) begin
        check(out5[o] == (en5[o] ? in5[sel5[o]] : '0), $sformatf("5x5 out %0d data", o));
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
