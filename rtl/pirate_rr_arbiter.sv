// pirate_rr_arbiter: round-robin arbiter of the PIRATE switch controller, one
// per output port.
//
// Among the N request lines it grants the first one at or after the priority
// pointer, scanning upwards and wrapping around. The grant is combinational
// (one-hot gnt plus its index gnt_idx, gnt_valid when any request is set). When
// the grant is used (accept high at a clock edge) the pointer moves to the
// port after the winner, so a port that has just been served has the lowest
// priority next time and every requester is served within N grants. The
// original switch names its arbitration logic without saying which policy it
// uses; round-robin is this design's choice.
module pirate_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 accept,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    logic [IW-1:0] idx;
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = IW'((int'(ptr) + i) % N);
      if (!gnt_valid && req[idx]) begin
        gnt_valid    = 1'b1;
        gnt_idx      = idx;
        gnt[idx]     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   ptr <= '0;
    else if (accept && gnt_valid) ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
