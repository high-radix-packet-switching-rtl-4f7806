// Packet FIFO: the input buffer of a mini-router VC and the input FIFO of an IOM.
//
// Holds up to DEPTH whole packets (cells). A write and a read may happen in the
// same cycle. `full` and `empty` come straight from the occupancy register, so a
// sender may use !full as its ready without a combinational path back into this
// buffer. The head packet is visible on `head` whenever !empty (first-word
// fall-through); `pop` removes it. `count` is the occupancy, used for the
// congestion metric. The switch description gives the buffer sizes (4 packets
// per router input); the pointer/counter organisation is this design's choice.
module pkt_fifo
  import clos_mdn_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  pkt_t                         din,
  input  logic                         pop,
  output pkt_t                         head,
  output logic                         full,
  output logic                         empty,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  pkt_t            mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign full  = (32'(count) == DEPTH);
  assign empty = (count == '0);
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) wr_ptr <= incr(wr_ptr);
      if (pop && !empty) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
