// Output queue of one switch output port, in an input/output module (IOM).
//
// Each of the W central modules has a link into the IOM, so up to W packets for
// this port can arrive in one cycle; they are written in the order of the CM
// index. One packet leaves per time slot, on the cycle `slot` is high, towards
// the output line. `ready` tells every CM link that a packet may be sent: it is
// high while at least W slots are free, so all W writes of a cycle always fit,
// and it is a registered value. The switch description gives the "receive up to
// n, send one per time slot" rule; the depth and the conservative ready are
// this design's choices.
module out_queue
  import clos_mdn_pkg::*;
#(
  parameter int unsigned W     = 16,   // write ports (one per CM)
  parameter int unsigned DEPTH = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [W-1:0]              wr_valid,
  input  logic [DATA_W-1:0]         wr_data [W],
  output logic                      ready,
  input  logic                      slot,
  output logic                      out_valid,
  output logic [DATA_W-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic              do_pop;

  assign ready  = (DEPTH - 32'(count)) >= W;
  assign do_pop = slot && (count != '0);

  function automatic logic [AW-1:0] advance(input logic [AW-1:0] p, input int unsigned n);
    return AW'((32'(p) + n) % DEPTH);
  endfunction

  // number of writes this cycle
  logic [31:0] nw;
  always_comb begin
    nw = 0;
    for (int unsigned i = 0; i < W; i++) nw += 32'(wr_valid[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      wr_ptr    <= advance(wr_ptr, nw);
      rd_ptr    <= do_pop ? advance(rd_ptr, 1) : rd_ptr;
      count     <= count + CW'(nw) - CW'(do_pop);
      out_valid <= do_pop;
      if (do_pop) out_data <= mem[rd_ptr];
    end
  end

  always_ff @(posedge clk) begin
    logic [31:0] k;
    k = 0;
    for (int unsigned i = 0; i < W; i++) begin
      if (wr_valid[i]) begin
        mem[advance(wr_ptr, k)] <= wr_data[i];
        k++;
      end
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                           (|wr_valid) |-> ready);
endmodule
