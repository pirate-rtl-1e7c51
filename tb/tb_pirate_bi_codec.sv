// tb_pirate_bi_codec: self-checking test of the bus-invert encoder and
// decoder as a pair on one link.
//
// Random words, with valid toggling, are sent through pirate_bi_encoder and
// pirate_bi_decoder. Checked every cycle: the decoder returns the sent word;
// the encoder inverts exactly when more than half of the wires would toggle
// against the previous bus value (computed here independently); no more than
// WIDTH/2 + 1 wires (data plus invert) toggle on a valid cycle; and the bus
// holds still while valid is low. Biased words that mostly invert the bus make
// sure the inverting path is used.
module tb_pirate_bi_codec;
  localparam int W = 34;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         valid;
  logic [W-1:0] data, bus, dec;
  logic         inv;

  pirate_bi_encoder #(.WIDTH(W)) u_enc (.clk(clk), .rst_n(rst_n), .valid(valid), .data(data),
                                        .bus(bus), .bus_inv(inv));
  pirate_bi_decoder #(.WIDTH(W)) u_dec (.bus(bus), .bus_inv(inv), .data(dec));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [W-1:0] prev_bus = '0;
    automatic logic         prev_inv = 1'b0;
    automatic int inverted = 0, ndiff;
    valid = 0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      valid = ($urandom % 4) != 0;
      if ($urandom % 2) data = ~prev_bus ^ W'(1 << ($urandom % W));  // mostly toggling
      else              data = {$urandom, $urandom};
      #1;
      ndiff = $countones(data ^ prev_bus);
      if (valid) begin
        check(dec == data, "decoded word");
        check(inv == (ndiff > W / 2), $sformatf("invert decision ndiff=%0d", ndiff));
        check($countones(bus ^ prev_bus) <= W / 2, "data wires toggled");
        if (inv) inverted++;
      end else begin
        check(bus == prev_bus && inv == prev_inv, "bus holds while idle");
      end
      @(posedge clk);
      prev_bus = bus;
      prev_inv = inv;
    end
    check(inverted > 0, "inversion used");
    $display("inverted transfers: %0d", inverted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
