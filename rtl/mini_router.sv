// Mini-router: one node of the k x k mesh inside a central module (MDN).
//
// Four ports (N, E, S, W), each with input buffers per virtual channel, a 4x8
// crossbar and one round-robin arbiter per output. Switching is store-and-forward
// on whole single-cell packets: a packet written into an input buffer in one cycle
// can leave through the crossbar in the next. Each buffer head asks for the one
// output given by the route in its header (package function next_hop) and is
// eligible only when the buffer behind that output has room for it. Every output
// grants one buffer per cycle; two VCs of one input may leave in the same cycle on
// different outputs.
//
// Which buffers exist follows the router diagram of the switch description:
// north and south inputs carry both VCs; a west input carries only eastbound
// traffic (VC 0) and an east input only westbound traffic (VC 1), except on the
// west and east edge routers, whose outer input is the link from an IOM and
// carries both. Each input port owns BUFF packet slots. On an edge router's outer
// input they are split between the VCs evenly (ASYM = 0) or 2/3 : 1/3 (ASYM = 1),
// the larger share going to the VC that heads away from that edge. North/south
// inputs always split evenly. Rounding of the split is this design's choice.
//
// Flow control: in_ready[p][v] is "buffer (p, v) not full", a registered value.
// out_ready[o] is the matching vector of the receiver behind output o: indexed by
// VC towards another router or CM, and by output-queue index towards an IOM
// (RDY_W bits wide). One cycle per hop; no other pipeline stages.
module mini_router
  import clos_mdn_pkg::*;
#(
  parameter int unsigned K      = 8,    // mesh size (k x k)
  parameter int unsigned M      = 16,   // ports per IOM (n = m)
  parameter int unsigned ROW    = 0,
  parameter int unsigned COL    = 0,
  parameter int unsigned BUFF   = 4,    // packet slots per input port
  parameter bit          ASYM   = 1'b1, // asymmetric VC split on IOM inputs
  parameter int unsigned RDY_W  = (M > 2) ? M : 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           in_valid,
  input  pkt_t                 in_pkt   [4],
  output logic [1:0]           in_ready [4],
  output logic [3:0]           out_valid,
  output pkt_t                 out_pkt  [4],
  input  logic [RDY_W-1:0]     out_ready[4],
  output logic [OCC_W-1:0]     occ
);
  localparam int unsigned NPORTS = 2 * K * M;
  localparam int unsigned DEEP    = (2 * BUFF + 2) / 3;
  localparam int unsigned SHALLOW = (BUFF > DEEP) ? BUFF - DEEP : 1;
  localparam int unsigned HALF    = (BUFF >= 2) ? BUFF / 2 : 1;

  function automatic bit present(input int unsigned p, input int unsigned v);
    if (p == 32'(DIR_W)) return (v == 0) || (COL == 0);
    if (p == 32'(DIR_E)) return (v == 1) || (COL == K - 1);
    return 1'b1;
  endfunction

  function automatic int unsigned depth(input int unsigned p, input int unsigned v);
    if (p == 32'(DIR_W) && COL == 0)
      return ASYM ? ((v == 0) ? DEEP : SHALLOW) : HALF;
    if (p == 32'(DIR_E) && COL == K - 1)
      return ASYM ? ((v == 1) ? DEEP : SHALLOW) : HALF;
    if (p == 32'(DIR_N) || p == 32'(DIR_S)) return HALF;
    return BUFF;
  endfunction

  // Which bit of out_ready[o] governs packet p.
  function automatic int unsigned sub_index(input int unsigned o, input pkt_t p);
    if ((o == 32'(DIR_W) && COL == 0) || (o == 32'(DIR_E) && COL == K - 1))
      return out_qidx(p.dst, NPORTS, M);
    if ((o == 32'(DIR_N) && ROW == 0) || (o == 32'(DIR_S) && ROW == K - 1))
      return 32'(arrival_vc(p.dst, NPORTS, M, K));
    return 32'(p.vc);
  endfunction

  pkt_t       head   [8];
  logic [7:0] empty, full, pop;
  logic [7:0] elig;
  dir_e       want   [8];
  logic [7:0] grant  [4];
  logic [OCC_W-1:0] cnt [8];

  // Input buffers: index b = 2 * port + vc.
  for (genvar p = 0; p < 4; p++) begin : g_port
    for (genvar v = 0; v < 2; v++) begin : g_vc
      localparam int unsigned B = 2 * p + v;
      if (present(p, v)) begin : g_buf
        localparam int unsigned D = depth(p, v);
        logic [$clog2(D+1)-1:0] c;
        pkt_fifo #(.DEPTH(D)) u_buf (
          .clk, .rst_n,
          .push (in_valid[p] && in_pkt[p].vc == 1'(v) && !full[B]),
          .din  (in_pkt[p]),
          .pop  (pop[B]),
          .head (head[B]),
          .full (full[B]),
          .empty(empty[B]),
          .count(c)
        );
        assign cnt[B] = OCC_W'(c);
      end else begin : g_none
        assign head[B]  = '0;
        assign full[B]  = 1'b1;
        assign empty[B] = 1'b1;
        assign cnt[B]   = '0;
      end
      assign in_ready[p][v] = !full[B];
    end
  end

  // Route computation and eligibility of every buffer head.
  always_comb begin
    for (int unsigned b = 0; b < 8; b++) begin
      want[b] = next_hop(head[b], coord_t'(ROW), coord_t'(COL));
      elig[b] = !empty[b] && out_ready[want[b]][sub_index(32'(want[b]), head[b])];
    end
  end

  // One round-robin arbiter and crossbar column per output.
  for (genvar o = 0; o < 4; o++) begin : g_out
    logic [7:0] req;
    logic       any;
    always_comb
      for (int unsigned b = 0; b < 8; b++) req[b] = elig[b] && (want[b] == dir_e'(o));
    rr_arbiter #(.N(8)) u_arb (
      .clk, .rst_n,
      .req    (req),
      .advance(1'b1),
      .grant  (grant[o]),
      .any    (any)
    );
    always_comb begin
      out_pkt[o] = '0;
      for (int unsigned b = 0; b < 8; b++)
        if (grant[o][b]) out_pkt[o] = head[b];
    end
    assign out_valid[o] = any;
  end

  assign pop = grant[0] | grant[1] | grant[2] | grant[3];

  always_comb begin
    occ = '0;
    for (int unsigned b = 0; b < 8; b++) occ = occ + cnt[b];
  end
endmodule
