// pirate_fifo: the configurable-length FIFO queue used for the input and the
// output queues of a PIRATE switch.
//
// A circular buffer of DEPTH words of WIDTH bits with valid/ready handshakes on
// both sides. A word is written when in_valid && in_ready and read when
// out_valid && out_ready; in_ready is !full and does not depend on out_ready, so
// a chain of queues has no combinational ready path.
//
// FALL_THROUGH = 0 (input queue): a written word appears at the output on the
// cycle after the write edge. FALL_THROUGH = 1 (output queue): when the queue
// is empty, an incoming word is presented at the output in the same cycle and,
// if taken, never stored; it is stored only when the receiver is not ready.
// With registered input queues and fall-through output queues a flit crosses a
// switch and its outgoing link in one clock cycle, the one-cycle-per-hop timing
// of the PIRATE switch. The queue length is a parameter, as in the original
// switch; the default of 4 and the bypass structure are this design's choices.
module pirate_fifo #(
  parameter int unsigned WIDTH        = 34,
  parameter int unsigned DEPTH        = 4,
  parameter bit          FALL_THROUGH = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             empty, full, push, pop, bypass;

  assign empty    = (count == '0);
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign in_ready = !full;

  always_comb begin
    bypass = FALL_THROUGH && empty;
    if (bypass) begin
      out_valid = in_valid;
      out_data  = in_data;
    end else begin
      out_valid = !empty;
      out_data  = mem[rd_ptr];
    end
    // A bypassed word that the receiver takes is never stored.
    push = in_valid && in_ready && !(bypass && out_ready);
    pop  = !empty && out_ready;
  end

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A word is never written into a full queue nor read from an empty one.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
