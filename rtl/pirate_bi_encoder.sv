// pirate_bi_encoder: bus-invert encoder placed at the sending end of a
// network connection to cut the number of wire transitions.
//
// The link carries WIDTH data wires plus one invert wire. For each valid word
// the encoder counts the wires that would toggle against the value now on the
// bus (the register bus_q); if more than half of them would, it drives the
// inverted word and sets the invert wire, so at most WIDTH/2 data wires toggle
// per transfer. While valid is low the bus keeps its last value and nothing
// toggles. The code is combinational in the word and bus_q, adds no cycle, and
// is idempotent while a word waits for ready (re-encoding against its own
// encoded value gives the same code). pirate_bi_decoder undoes it. The network
// lets a designer insert a standard encoding on its connections; which code to
// use is this design's choice, and bus-invert is the one provided.
module pirate_bi_encoder #(
  parameter int unsigned WIDTH = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] bus,
  output logic             bus_inv
);

  logic [WIDTH-1:0] bus_q;
  logic             inv_q;
  logic [$clog2(WIDTH+1)-1:0] toggles;

  always_comb begin
    toggles = '0;
    for (int b = 0; b < int'(WIDTH); b++)
      toggles += ($clog2(WIDTH+1))'(data[b] ^ bus_q[b]);
    if (!valid) begin
      bus     = bus_q;
      bus_inv = inv_q;
    end else if (int'(toggles) > int'(WIDTH) / 2) begin
      bus     = ~data;
      bus_inv = 1'b1;
    end else begin
      bus     = data;
      bus_inv = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_q <= '0;
      inv_q <= 1'b0;
    end else begin
      bus_q <= bus;
      inv_q <= bus_inv;
    end
  end

endmodule
