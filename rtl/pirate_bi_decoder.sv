// pirate_bi_decoder: bus-invert decoder at the receiving end of an encoded
// network connection (see pirate_bi_encoder).
//
// Combinational: the received word is the bus value, inverted when the invert
// wire is set. It adds no cycle to the link.
module pirate_bi_decoder #(
  parameter int unsigned WIDTH = 34
) (
  input  logic [WIDTH-1:0] bus,
  input  logic             bus_inv,
  output logic [WIDTH-1:0] data
);

  always_comb data = bus_inv ? ~bus : bus;

endmodule
