// pirate_crossbar: the N x N crossbar of a PIRATE switch.
//
// Each output port o is a multiplexer that selects the input queue named by
// sel[o]. The switch controller sets en[o] when output o takes a flit in this
// cycle; out_data[o] is then the selected input's head, and it is held at
// zero while en[o] is low so an idle output does not follow the inputs.
// Purely combinational: the crossbar adds no cycle to a hop. Several outputs
// may select the same input (the controller never does so, since an input
// follows one route). The crossbar structure follows the original switch; the
// select/enable interface is this design's.
module pirate_crossbar #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 34
) (
  input  logic [WIDTH-1:0]         in_data  [N],
  input  logic [$clog2(N)-1:0]     sel      [N],
  input  logic [N-1:0]             en,
  output logic [WIDTH-1:0]         out_data [N]
);

  always_comb begin
    for (int o = 0; o < int'(N); o++) begin
      out_data[o] = en[o] ? in_data[sel[o]] : '0;
    end
  end

endmodule
