// Self-checking test of one central module (K = 4: a 4 x 4 mesh, M = 4 ports per
// IOM, 32-port numbering). Its south edge is looped into its own north edge and
// its north edge into its south edge through the same k/2 column interleave the
// switch uses between neighbouring modules, so diverted packets come back in as
// arrivals from a "neighbour" and must still reach their exit.
// Phases:
//   1. single packets from every IOM inlet to every IOM outlet in an idle mesh:
//      exit link, header and latency (one cycle per router: hops + 1) checked
//      against a hop count worked out here;
//   2. random traffic from all 8 inlets, outlets refusing at random, with the
//      neighbours reported idle and this module loaded: packets must be
//      diverted, first downwards (neighbour below reported emptier), then
//      upwards; each crossing packet must carry the diverted flag and use the
//      crossing column k/2 (west exit) or k/2-1 (east exit);
// and every packet must leave on the link of its destination IOM exactly once.
module tb_mdn_cm;
  import clos_mdn_pkg::*;
  localparam int unsigned K = 4, M = 4, N = 2 * K * M;
  localparam int unsigned RDY_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2*K-1:0]   iom_in_valid, iom_in_ready, iom_out_valid;
  pkt_t             iom_in_pkt [2*K], iom_out_pkt [2*K];
  logic [RDY_W-1:0] iom_out_ready [2*K];
  logic [K-1:0]     n_out_valid, n_in_valid, s_out_valid, s_in_valid;
  pkt_t             n_out_pkt [K], n_in_pkt [K], s_out_pkt [K], s_in_pkt [K];
  logic [1:0]       n_out_ready [K], n_in_ready [K], s_out_ready [K], s_in_ready [K];
  logic [OCC_W-1:0] occ_out, occ_up, occ_down;
  logic [2*K-1:0]   div_up_evt, div_down_evt;

  mdn_cm #(.K(K), .M(M), .BUFF(4), .ASYM(1'b1), .THRESH(4)) u_dut (.*);

  // loop the edges back through the interleave
  for (genvar i = 0; i < K; i++) begin : g_loop
    localparam int unsigned J = (K / 2 + i) % K;
    assign n_in_valid[J]  = s_out_valid[i];
    assign n_in_pkt[J]    = s_out_pkt[i];
    assign s_out_ready[i] = n_in_ready[J];
    assign s_in_valid[J]  = n_out_valid[i];
    assign s_in_pkt[J]    = n_out_pkt[i];
    assign n_out_ready[i] = s_in_ready[J];
  end

  int unsigned checks = 0, failures = 0, cyc = 0;
  int unsigned exp_iom [int unsigned];
  int unsigned t_acc   [int unsigned];
  bit          got     [int unsigned];
  int unsigned n_acc = 0, n_got = 0, n_cross_s = 0, n_cross_n = 0, n_dup = 0;
  int unsigned seq = 1;
  int unsigned last_lat = 0;
  logic [2*K-1:0] take;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int unsigned dst_iom(int unsigned d);
    return (N - 1 - d) / M;
  endfunction

  // monitor: outlets and crossings
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2 * K; g++) begin
      if (iom_in_valid[g] && iom_in_ready[g]) begin
        t_acc[iom_in_pkt[g].data] = cyc;
        n_acc++;
      end
      if (iom_out_valid[g]) begin
        int unsigned id;
        id = iom_out_pkt[g].data;
        checks++;
        if (!exp_iom.exists(id) || exp_iom[id] != g || got.exists(id) ||
            !iom_out_ready[g][(N - 1 - iom_out_pkt[g].dst) % M]) begin
          failures++;
          $display("FAIL: outlet %0d packet %0d (expected outlet %0d)", g, id,
                   exp_iom.exists(id) ? exp_iom[id] : -1);
        end else begin
          got[id] = 1'b1;
          n_got++;
          last_lat = cyc - t_acc[id];
        end
      end
    end
    for (int i = 0; i < K; i++) begin
      if (s_out_valid[i] && s_out_ready[i][((N - 1 - s_out_pkt[i].dst) / M >= K) ? 0 : 1]) begin
        checks++;
        n_cross_s++;
        if (!s_out_pkt[i].diverted ||
            i != (((N - 1 - s_out_pkt[i].dst) / M >= K) ? K / 2 - 1 : K / 2)) begin
          failures++;
          $display("FAIL: south crossing at column %0d packet %0d", i, s_out_pkt[i].data);
        end
      end
      if (n_out_valid[i] && n_out_ready[i][((N - 1 - n_out_pkt[i].dst) / M >= K) ? 0 : 1]) begin
        checks++;
        n_cross_n++;
        if (!n_out_pkt[i].diverted ||
            i != (((N - 1 - n_out_pkt[i].dst) / M >= K) ? K / 2 - 1 : K / 2)) begin
          failures++;
          $display("FAIL: north crossing at column %0d packet %0d", i, n_out_pkt[i].data);
        end
      end
    end
  end

  task automatic send_one(input int unsigned g, input int unsigned d);
    pkt_t p;
    int unsigned id, t0;
    p = '0; id = seq++;
    p.data = id; p.dst = port_t'(d);
    exp_iom[id] = dst_iom(d);
    @(negedge clk);
    iom_in_pkt[g] = p; iom_in_valid[g] = 1'b1;
    @(posedge clk); #1;
    iom_in_valid[g] = 1'b0;
    t0 = cyc;
    while (!got.exists(id) && cyc - t0 < 100) @(posedge clk);
    #1;
    begin
      int unsigned gs, gd, ar, ac, er, ec, hops;
      gs = g; gd = dst_iom(d);
      ar = (gs < K) ? gs : 2 * K - 1 - gs; ac = (gs < K) ? 0 : K - 1;
      er = (gd < K) ? gd : 2 * K - 1 - gd; ec = (gd < K) ? 0 : K - 1;
      hops = ((ar > er) ? ar - er : er - ar) + ((ac > ec) ? ac - ec : ec - ac);
      checks++;
      if (!got.exists(id) || last_lat != hops + 1) begin
        failures++;
        $display("FAIL: single %0d -> %0d latency %0d expected %0d", g, d, last_lat, hops + 1);
      end
    end
  endtask

  initial begin
    iom_in_valid = '0;
    for (int g = 0; g < 2 * K; g++) begin iom_in_pkt[g] = '0; iom_out_ready[g] = '1; end
    occ_up = 16'hffff; occ_down = 16'hffff;   // neighbours full: no diversion
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. single packets
    for (int g = 0; g < 2 * K; g++)
      for (int gd = 0; gd < 2 * K; gd++)
        send_one(g, N - 1 - gd * M - ((g + gd) % M));

    // 2. random traffic, this module loaded, neighbours idle
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      if (c == 0)    begin occ_down = 0;       occ_up = 16'hffff; end
      if (c == 2000) begin occ_down = 16'hffff; occ_up = 0;       end
      for (int g = 0; g < 2 * K; g++) begin
        iom_out_ready[g] = (c < 3500) ? (RDY_W'($urandom) | RDY_W'($urandom)) : '1;
        if (!iom_in_valid[g] && c < 3400 && ($urandom % 100) < 70) begin
          pkt_t p;
          p = '0; p.data = seq; p.dst = port_t'($urandom % N);
          exp_iom[seq] = dst_iom(p.dst);
          seq++;
          iom_in_pkt[g] = p; iom_in_valid[g] = 1'b1;
        end
      end
      #1 take = iom_in_valid & iom_in_ready;   // handshake of the coming edge
      @(posedge clk); #1;
      iom_in_valid &= ~take;
    end
    checks++;
    if (n_got != n_acc || n_cross_s == 0 || n_cross_n == 0) begin
      failures++;
      $display("FAIL: accepted %0d delivered %0d crossings south %0d north %0d",
               n_acc, n_got, n_cross_s, n_cross_n);
    end
    $display("accepted %0d delivered %0d crossings south %0d north %0d",
             n_acc, n_got, n_cross_s, n_cross_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
