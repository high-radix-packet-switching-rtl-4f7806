// Input/output module (IOM): first and last stage of the Clos-MDN switch.
//
// It serves M input ports and M output ports. Input side: one FIFO per input
// port; a port takes at most one packet per time slot from its line (on the
// cycle `slot` is high) and its FIFO sends at most one packet per time slot, always
// to the same central module (FIFO i -> CM i: static dispatch). Output side: one
// output queue per output port, fed by the links from all M CMs; a packet from
// CM r is steered to the queue of its destination port. Each queue sends one
// packet per time slot to its line.
//
// Port numbering (global, N = 2*K*M ports): IOM G holds inputs G*M + i (i = 0..M-1)
// and outputs N-1-G*M-j in queue j. The static dispatch, the per-slot rates and
// the numbering follow the switch description; FIFO and queue depths and the
// handshakes are this design's choices.
//
// Timing: in_ready[i] is high only in the slot cycle, so a line packet is
// accepted there; it can reach its CM from the next cycle on. cm_pkt is the FIFO
// head (a register) and cm_ready may depend on it. out_valid[j] pulses for one
// cycle, the cycle after a slot cycle.
module iom
  import clos_mdn_pkg::*;
#(
  parameter int unsigned K        = 8,
  parameter int unsigned M        = 16,
  parameter int unsigned IN_DEPTH = 16,
  parameter int unsigned OQ_DEPTH = 32,
  parameter int unsigned RDY_W    = (M > 2) ? M : 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                slot,
  // input lines
  input  logic [M-1:0]        in_valid,
  input  logic [DATA_W-1:0]   in_data   [M],
  input  port_t               in_dst    [M],
  output logic [M-1:0]        in_ready,
  // links to the CMs (index = CM)
  output logic [M-1:0]        cm_valid,
  output pkt_t                cm_pkt    [M],
  input  logic [M-1:0]        cm_ready,
  // links from the CMs (index = CM)
  input  logic [M-1:0]        fab_valid,
  input  pkt_t                fab_pkt   [M],
  output logic [RDY_W-1:0]    fab_ready,
  // output lines (index = queue j, port N-1-G*M-j)
  output logic [M-1:0]        out_valid,
  output logic [DATA_W-1:0]   out_data  [M]
);
  localparam int unsigned NPORTS = 2 * K * M;

  // ---------------- input FIFOs
  for (genvar i = 0; i < M; i++) begin : g_in
    logic  full, empty, sent;
    pkt_t  din;

    always_comb begin
      din      = '0;
      din.data = in_data[i];
      din.dst  = in_dst[i];
    end

    assign in_ready[i] = slot && !full;
    assign cm_valid[i] = !empty && (!sent || slot);

    pkt_fifo #(.DEPTH(IN_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (in_valid[i] && in_ready[i]),
      .din  (din),
      .pop  (cm_valid[i] && cm_ready[i]),
      .head (cm_pkt[i]),
      .full (full),
      .empty(empty),
      .count()
    );

    // one packet per time slot towards the CM
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     sent <= 1'b0;
      else if (slot)  sent <= cm_valid[i] && cm_ready[i];
      else            sent <= sent || (cm_valid[i] && cm_ready[i]);
    end
  end

  // ---------------- output queues
  logic [M-1:0] q_ready;
  for (genvar j = 0; j < M; j++) begin : g_out
    logic [M-1:0]        wv;
    logic [DATA_W-1:0]   wd [M];
    always_comb begin
      for (int unsigned r = 0; r < M; r++) begin
        wv[r] = fab_valid[r] && (out_qidx(fab_pkt[r].dst, NPORTS, M) == j);
        wd[r] = fab_pkt[r].data;
      end
    end
    out_queue #(.W(M), .DEPTH(OQ_DEPTH)) u_q (
      .clk, .rst_n,
      .wr_valid (wv),
      .wr_data  (wd),
      .ready    (q_ready[j]),
      .slot     (slot),
      .out_valid(out_valid[j]),
      .out_data (out_data[j]),
      .count    ()
    );
  end

  assign fab_ready = RDY_W'(q_ready);
endmodule
