// Central module (CM) of the Clos-MDN switch: a multi-directional NoC (MDN).
//
// A k x k mesh of mini-routers. The west-edge routers take the links of IOMs
// 0..k-1 (IOM g on row g) and the east-edge routers those of IOMs k..2k-1 (IOM g
// on row 2k-1-g); each such link both brings packets in and takes packets out.
// The north and south edges carry the interleaved links to the two neighbouring
// CMs of the ring.
//
// Every packet that enters the CM gets a fresh route in its header:
//  * from an IOM: the congestion-aware dispatch compares, for this packet, the
//    cost of staying (this CM's occupancy plus HOP_W per hop to its exit) with
//    the cost of crossing to the CM below (south) or above (north) through the
//    interleaved links, using the neighbours' occupancy. It crosses when that
//    is cheaper by more than THRESH packets; otherwise it takes the local XY or
//    Modulo route.
//  * from a neighbouring CM: it is never diverted again and takes the local
//    route from its arrival router to its exit.
// The occupancy of this CM (packets held in all router buffers) is registered
// each cycle on occ_out and handed to both neighbours, which is how congestion
// information travels one module away. The document names regional congestion
// awareness weighing hop count and buffer occupancy; the whole-module sum, the
// linear cost and THRESH are this design's own, simplest reading of it.
//
// Links are valid/ready. IOM inlets: iom_in_ready[g] may depend on the packet
// offered (its VC is decided here); the IOM offers a registered packet. All
// other ready vectors are per receiving buffer and never depend on the packet.
// Latency through the CM is one cycle per router visited.
module mdn_cm
  import clos_mdn_pkg::*;
#(
  parameter int unsigned K       = 8,     // mesh size; 2K IOMs
  parameter int unsigned M       = 16,    // number of CMs = ports per IOM
  parameter int unsigned BUFF    = 4,     // packet slots per router input
  parameter bit          ASYM    = 1'b1,  // asymmetric VC split on IOM inputs
  parameter bit          CA_EN   = 1'b1,  // congestion-aware diversion enabled
  parameter int unsigned HOP_W   = 1,     // cost of one hop, in packets
  parameter int unsigned THRESH  = 8,     // hysteresis before diverting
  parameter int unsigned RDY_W   = (M > 2) ? M : 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // IOM links (index = IOM number)
  input  logic [2*K-1:0]    iom_in_valid,
  input  pkt_t              iom_in_pkt     [2*K],
  output logic [2*K-1:0]    iom_in_ready,
  output logic [2*K-1:0]    iom_out_valid,
  output pkt_t              iom_out_pkt    [2*K],
  input  logic [RDY_W-1:0]  iom_out_ready  [2*K],
  // links to / from the CM above (north edge, index = column)
  output logic [K-1:0]      n_out_valid,
  output pkt_t              n_out_pkt      [K],
  input  logic [1:0]        n_out_ready    [K],
  input  logic [K-1:0]      n_in_valid,
  input  pkt_t              n_in_pkt       [K],
  output logic [1:0]        n_in_ready     [K],
  // links to / from the CM below (south edge)
  output logic [K-1:0]      s_out_valid,
  output pkt_t              s_out_pkt      [K],
  input  logic [1:0]        s_out_ready    [K],
  input  logic [K-1:0]      s_in_valid,
  input  pkt_t              s_in_pkt       [K],
  output logic [1:0]        s_in_ready     [K],
  // congestion information
  output logic [OCC_W-1:0]  occ_out,
  input  logic [OCC_W-1:0]  occ_up,        // CM above
  input  logic [OCC_W-1:0]  occ_down,      // CM below
  // dispatch events (one bit per IOM inlet, for monitoring)
  output logic [2*K-1:0]    div_up_evt,
  output logic [2*K-1:0]    div_down_evt
);
  localparam int unsigned NPORTS = 2 * K * M;

  // Mesh signals, indexed [row][col][port].
  logic [3:0]       rv_in  [K][K];
  pkt_t             rp_in  [K][K][4];
  logic [1:0]       rr_in  [K][K][4];
  logic [3:0]       rv_out [K][K];
  pkt_t             rp_out [K][K][4];
  logic [RDY_W-1:0] rr_out [K][K][4];
  logic [OCC_W-1:0] r_occ  [K][K];

  // Headers of packets entering from IOMs, after dispatch.
  pkt_t  iom_hdr [2*K];

  for (genvar y = 0; y < K; y++) begin : g_row
    for (genvar x = 0; x < K; x++) begin : g_col
      mini_router #(
        .K(K), .M(M), .ROW(y), .COL(x), .BUFF(BUFF), .ASYM(ASYM), .RDY_W(RDY_W)
      ) u_mr (
        .clk, .rst_n,
        .in_valid (rv_in[y][x]),
        .in_pkt   (rp_in[y][x]),
        .in_ready (rr_in[y][x]),
        .out_valid(rv_out[y][x]),
        .out_pkt  (rp_out[y][x]),
        .out_ready(rr_out[y][x]),
        .occ      (r_occ[y][x])
      );

      // ---- north port
      if (y == 0) begin : g_n_edge
        assign rv_in[y][x][DIR_N] = n_in_valid[x];
        assign rp_in[y][x][DIR_N] = route_local(n_in_pkt[x], coord_t'(x),
                                                NPORTS, M, K);
        assign n_in_ready[x]      = rr_in[y][x][DIR_N];
        assign n_out_valid[x]     = rv_out[y][x][DIR_N];
        assign n_out_pkt[x]       = rp_out[y][x][DIR_N];
        assign rr_out[y][x][DIR_N] = RDY_W'(n_out_ready[x]);
      end else begin : g_n_int
        assign rv_in[y][x][DIR_N]  = rv_out[y-1][x][DIR_S];
        assign rp_in[y][x][DIR_N]  = rp_out[y-1][x][DIR_S];
        assign rr_out[y][x][DIR_N] = RDY_W'(rr_in[y-1][x][DIR_S]);
      end

      // ---- south port
      if (y == K - 1) begin : g_s_edge
        assign rv_in[y][x][DIR_S] = s_in_valid[x];
        assign rp_in[y][x][DIR_S] = route_local(s_in_pkt[x], coord_t'(x),
                                                NPORTS, M, K);
        assign s_in_ready[x]      = rr_in[y][x][DIR_S];
        assign s_out_valid[x]     = rv_out[y][x][DIR_S];
        assign s_out_pkt[x]       = rp_out[y][x][DIR_S];
        assign rr_out[y][x][DIR_S] = RDY_W'(s_out_ready[x]);
      end else begin : g_s_int
        assign rv_in[y][x][DIR_S]  = rv_out[y+1][x][DIR_N];
        assign rp_in[y][x][DIR_S]  = rp_out[y+1][x][DIR_N];
        assign rr_out[y][x][DIR_S] = RDY_W'(rr_in[y+1][x][DIR_N]);
      end

      // ---- west port
      if (x == 0) begin : g_w_edge
        assign rv_in[y][x][DIR_W]  = iom_in_valid[y];
        assign rp_in[y][x][DIR_W]  = iom_hdr[y];
        assign iom_in_ready[y]     = rr_in[y][x][DIR_W][iom_hdr[y].vc];
        assign iom_out_valid[y]    = rv_out[y][x][DIR_W];
        assign iom_out_pkt[y]      = rp_out[y][x][DIR_W];
        assign rr_out[y][x][DIR_W] = iom_out_ready[y];
      end else begin : g_w_int
        assign rv_in[y][x][DIR_W]  = rv_out[y][x-1][DIR_E];
        assign rp_in[y][x][DIR_W]  = rp_out[y][x-1][DIR_E];
        assign rr_out[y][x][DIR_W] = RDY_W'(rr_in[y][x-1][DIR_E]);
      end

      // ---- east port
      if (x == K - 1) begin : g_e_edge
        assign rv_in[y][x][DIR_E]      = iom_in_valid[2*K-1-y];
        assign rp_in[y][x][DIR_E]      = iom_hdr[2*K-1-y];
        assign iom_in_ready[2*K-1-y]   = rr_in[y][x][DIR_E][iom_hdr[2*K-1-y].vc];
        assign iom_out_valid[2*K-1-y]  = rv_out[y][x][DIR_E];
        assign iom_out_pkt[2*K-1-y]    = rp_out[y][x][DIR_E];
        assign rr_out[y][x][DIR_E]     = iom_out_ready[2*K-1-y];
      end else begin : g_e_int
        assign rv_in[y][x][DIR_E]  = rv_out[y][x+1][DIR_W];
        assign rp_in[y][x][DIR_E]  = rp_out[y][x+1][DIR_W];
        assign rr_out[y][x][DIR_E] = RDY_W'(rr_in[y][x+1][DIR_W]);
      end
    end
  end

  // Congestion-aware dispatch of packets arriving from the IOMs.
  for (genvar g = 0; g < 2 * K; g++) begin : g_disp
    localparam int unsigned ROW = (g < K) ? g : 2 * K - 1 - g;
    localparam int unsigned COL = (g < K) ? 0 : K - 1;
    logic go_dn, go_up;
    always_comb begin
      pkt_t        p;
      int unsigned c_loc, c_dn, c_up;
      p          = iom_in_pkt[g];
      p.diverted = 1'b0;
      c_loc = 32'(occ_out)  + HOP_W * hops_local(coord_t'(ROW), coord_t'(COL), p.dst,
                                                 NPORTS, M, K);
      c_dn  = 32'(occ_down) + HOP_W * hops_divert(1'b1, coord_t'(ROW), coord_t'(COL),
                                                  p.dst, NPORTS, M, K);
      c_up  = 32'(occ_up)   + HOP_W * hops_divert(1'b0, coord_t'(ROW), coord_t'(COL),
                                                  p.dst, NPORTS, M, K);
      go_dn = CA_EN && (M > 1) && (c_dn + THRESH < c_loc) && (c_dn <= c_up);
      go_up = CA_EN && (M > 1) && !go_dn && (c_up + THRESH < c_loc);
      if (go_dn)      iom_hdr[g] = route_divert(p, 1'b1, coord_t'(COL), NPORTS, M, K);
      else if (go_up) iom_hdr[g] = route_divert(p, 1'b0, coord_t'(COL), NPORTS, M, K);
      else            iom_hdr[g] = route_local(p, coord_t'(COL), NPORTS, M, K);
    end
    assign div_down_evt[g] = go_dn && iom_in_valid[g] && iom_in_ready[g];
    assign div_up_evt[g]   = go_up && iom_in_valid[g] && iom_in_ready[g];
  end

  // Occupancy of the whole module, registered.
  logic [OCC_W-1:0] occ_sum;
  always_comb begin
    occ_sum = '0;
    for (int unsigned y = 0; y < K; y++)
      for (int unsigned x = 0; x < K; x++) occ_sum = occ_sum + r_occ[y][x];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) occ_out <= '0;
    else        occ_out <= occ_sum;
  end
endmodule
