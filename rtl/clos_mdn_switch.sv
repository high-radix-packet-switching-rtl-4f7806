// Clos-MDN packet switch: a three-stage Clos network whose middle stage is made of
// multi-directional NoC modules (MDNs) joined into a ring.
//
// N = 2*K*M ports. 2K input/output modules (IOMs) each serve M input and M output
// ports; M central modules (CMs) are each a K x K mesh of mini-routers. With
// n = m = M (the Benes case) every input FIFO sends, always, to the CM of its
// index, and every CM has one link to and from every IOM: IOMs 0..K-1 on its west
// edge, K..2K-1 on its east edge. Row i of the south edge of CM r is wired to row
// 0 of the north edge of CM (r+1) mod M, column (K/2 + i) mod K, and the north
// edge of CM r to the south edge of CM (r-1) mod M with the same column shift:
// the interleaved inter-CM links that let a congested CM hand packets to a
// neighbour without adding hops.
//
// Ports: input port p is in_*[p]; output port q is out_*[q]. A line may offer
// one packet per time slot; it is taken in the slot cycle (slot = 1) when
// in_ready[p] is high. Output packets appear as one-cycle out_valid pulses. A
// time slot is SP fabric cycles (the speedup). div_*_evt and cm_occ are
// monitoring outputs: diversions to the CM below/above, per CM and IOM inlet, and
// the buffer occupancy of every CM.
//
// Default sizes are the 256-port configuration: K = 8, M = 16 (the port count,
// speedup SP = 3 and 4-packet router buffers come from the switch description;
// the K/M split of 256 ports, FIFO depths and the dispatch threshold are this
// design's choices).
module clos_mdn_switch
  import clos_mdn_pkg::*;
#(
  parameter int unsigned K        = 8,
  parameter int unsigned M        = 16,
  parameter int unsigned SP       = 3,
  parameter int unsigned BUFF     = 4,
  parameter bit          ASYM     = 1'b1,
  parameter bit          CA_EN    = 1'b1,
  parameter int unsigned HOP_W    = 1,
  parameter int unsigned THRESH   = 8,
  parameter int unsigned IN_DEPTH = 16,
  parameter int unsigned OQ_DEPTH = 32,
  parameter int unsigned N        = 2 * K * M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 slot,
  output logic [31:0]          slot_count,
  input  logic [N-1:0]         in_valid,
  input  logic [DATA_W-1:0]    in_data   [N],
  input  port_t                in_dst    [N],
  output logic [N-1:0]         in_ready,
  output logic [N-1:0]         out_valid,
  output logic [DATA_W-1:0]    out_data  [N],
  output logic [2*K-1:0]       div_up_evt   [M],
  output logic [2*K-1:0]       div_down_evt [M],
  output logic [OCC_W-1:0]     cm_occ    [M]
);
  localparam int unsigned RDY_W = (M > 2) ? M : 2;

  // IOM g <-> CM r links, indexed [g][r] on the IOM side.
  logic [M-1:0]       up_valid  [2*K];   // IOM -> CM
  pkt_t               up_pkt    [2*K][M];
  logic [M-1:0]       up_ready  [2*K];
  logic [M-1:0]       dn_valid  [2*K];   // CM -> IOM
  pkt_t               dn_pkt    [2*K][M];
  logic [RDY_W-1:0]   dn_ready  [2*K];

  // CM side views, indexed [r][g].
  logic [2*K-1:0]     c_in_valid  [M];
  pkt_t               c_in_pkt    [M][2*K];
  logic [2*K-1:0]     c_in_ready  [M];
  logic [2*K-1:0]     c_out_valid [M];
  pkt_t               c_out_pkt   [M][2*K];
  logic [RDY_W-1:0]   c_out_ready [M][2*K];

  // Inter-CM links.
  logic [K-1:0]       n_out_valid [M], n_in_valid [M], s_out_valid [M], s_in_valid [M];
  pkt_t               n_out_pkt   [M][K], n_in_pkt [M][K], s_out_pkt [M][K], s_in_pkt [M][K];
  logic [1:0]         n_out_ready [M][K], n_in_ready [M][K];
  logic [1:0]         s_out_ready [M][K], s_in_ready [M][K];

  slot_timer #(.SP(SP)) u_slot (.clk, .rst_n, .slot, .slot_count);

  // ---------------- IOMs
  for (genvar g = 0; g < 2 * K; g++) begin : g_iom
    logic [DATA_W-1:0] od [M];
    logic [DATA_W-1:0] idata [M];
    port_t             idst  [M];
    logic [M-1:0]      ov;
    for (genvar i = 0; i < M; i++) begin : g_p
      assign idata[i]                 = in_data[g*M + i];
      assign idst[i]                  = in_dst[g*M + i];
      assign out_valid[N-1-g*M-i]     = ov[i];
      assign out_data[N-1-g*M-i]      = od[i];
    end
    iom #(.K(K), .M(M), .IN_DEPTH(IN_DEPTH), .OQ_DEPTH(OQ_DEPTH), .RDY_W(RDY_W)) u_iom (
      .clk, .rst_n, .slot,
      .in_valid (in_valid[g*M +: M]),
      .in_data  (idata),
      .in_dst   (idst),
      .in_ready (in_ready[g*M +: M]),
      .cm_valid (up_valid[g]),
      .cm_pkt   (up_pkt[g]),
      .cm_ready (up_ready[g]),
      .fab_valid(dn_valid[g]),
      .fab_pkt  (dn_pkt[g]),
      .fab_ready(dn_ready[g]),
      .out_valid(ov),
      .out_data (od)
    );
  end

  // ---------------- IOM <-> CM crossing (Clos wiring)
  for (genvar g = 0; g < 2 * K; g++) begin : g_x
    for (genvar r = 0; r < M; r++) begin : g_y
      assign c_in_valid[r][g]  = up_valid[g][r];
      assign c_in_pkt[r][g]    = up_pkt[g][r];
      assign up_ready[g][r]    = c_in_ready[r][g];
      assign dn_valid[g][r]    = c_out_valid[r][g];
      assign dn_pkt[g][r]      = c_out_pkt[r][g];
      assign c_out_ready[r][g] = dn_ready[g];
    end
  end

  // ---------------- CMs and the interleaved ring
  for (genvar r = 0; r < M; r++) begin : g_cm
    localparam int unsigned RN = (r + 1) % M;       // CM below
    localparam int unsigned RP = (r + M - 1) % M;   // CM above
    for (genvar i = 0; i < K; i++) begin : g_link
      localparam int unsigned J = (K / 2 + i) % K;
      // south edge of r, column i  ->  north edge of r+1, column J
      assign n_in_valid[RN][J]  = s_out_valid[r][i];
      assign n_in_pkt[RN][J]    = s_out_pkt[r][i];
      assign s_out_ready[r][i]  = n_in_ready[RN][J];
      // north edge of r, column i  ->  south edge of r-1, column J
      assign s_in_valid[RP][J]  = n_out_valid[r][i];
      assign s_in_pkt[RP][J]    = n_out_pkt[r][i];
      assign n_out_ready[r][i]  = s_in_ready[RP][J];
    end

    mdn_cm #(
      .K(K), .M(M), .BUFF(BUFF), .ASYM(ASYM), .CA_EN(CA_EN),
      .HOP_W(HOP_W), .THRESH(THRESH), .RDY_W(RDY_W)
    ) u_cm (
      .clk, .rst_n,
      .iom_in_valid (c_in_valid[r]),
      .iom_in_pkt   (c_in_pkt[r]),
      .iom_in_ready (c_in_ready[r]),
      .iom_out_valid(c_out_valid[r]),
      .iom_out_pkt  (c_out_pkt[r]),
      .iom_out_ready(c_out_ready[r]),
      .n_out_valid  (n_out_valid[r]),
      .n_out_pkt    (n_out_pkt[r]),
      .n_out_ready  (n_out_ready[r]),
      .n_in_valid   (n_in_valid[r]),
      .n_in_pkt     (n_in_pkt[r]),
      .n_in_ready   (n_in_ready[r]),
      .s_out_valid  (s_out_valid[r]),
      .s_out_pkt    (s_out_pkt[r]),
      .s_out_ready  (s_out_ready[r]),
      .s_in_valid   (s_in_valid[r]),
      .s_in_pkt     (s_in_pkt[r]),
      .s_in_ready   (s_in_ready[r]),
      .occ_out      (cm_occ[r]),
      .occ_up       (cm_occ[RP]),
      .occ_down     (cm_occ[RN]),
      .div_up_evt   (div_up_evt[r]),
      .div_down_evt (div_down_evt[r])
    );
  end
endmodule
