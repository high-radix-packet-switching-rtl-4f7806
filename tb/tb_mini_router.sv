// Self-checking test of mini_router in a 4 x 4 mesh with 4 ports per IOM, at two
// positions: the west-edge router (row 1, column 0), whose west input is an IOM
// link with both VCs, and an interior router (row 2, column 2). Random packets
// with random routes enter every existing input buffer while the receivers
// behind the outputs refuse at random. Checks, against a route model written
// here: every packet leaves by the output its route asks for, only when the
// receiver's ready bit for it is high, in FIFO order per input buffer, never
// twice; at the end every packet has left.
module tb_mini_router;
  import clos_mdn_pkg::*;
  localparam int unsigned K = 4, M = 4, N = 2 * K * M;
  localparam int unsigned RDY_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  bit done [2];

  for (genvar t = 0; t < 2; t++) begin : g_t
    localparam int unsigned ROW = (t == 0) ? 1 : 2;
    localparam int unsigned COL = (t == 0) ? 0 : 2;

    logic [3:0]       in_valid, out_valid;
    pkt_t             in_pkt [4], out_pkt [4];
    logic [1:0]       in_ready [4];
    logic [RDY_W-1:0] out_ready [4];
    logic [OCC_W-1:0] occ;

    mini_router #(.K(K), .M(M), .ROW(ROW), .COL(COL), .BUFF(4), .ASYM(1'b1)) u_dut (.*);

    // reference route: which output a packet at (ROW, COL) takes
    function automatic int unsigned ref_dir(pkt_t p);
      int unsigned r, c;
      r = ROW; c = COL;
      if (p.tgt_row == r && p.tgt_col == c) return p.exit_dir;
      if (p.tgt_row != r && p.turn_col != c) return (c < p.turn_col) ? 1 : 3;
      if (p.tgt_row != r) return (r < p.tgt_row) ? 2 : 0;
      return (c < p.tgt_col) ? 1 : 3;
    endfunction

    function automatic int unsigned ref_sub(int unsigned o, pkt_t p);
      if ((o == 3 && COL == 0) || (o == 1 && COL == K - 1)) return (N - 1 - p.dst) % M;
      if ((o == 0 && ROW == 0) || (o == 2 && ROW == K - 1))
        return ((N - 1 - p.dst) / M >= K) ? 0 : 1;
      return p.vc;
    endfunction

    function automatic bit exists(int unsigned p, int unsigned v);
      if (p == 3) return v == 0 || COL == 0;
      if (p == 1) return v == 1 || COL == K - 1;
      return 1;
    endfunction

    pkt_t        q [8][$];
    int unsigned t_in [int unsigned];
    int unsigned n_in = 0, n_out = 0, n_lat = 0, cyc = 0;

    initial begin
      in_valid = '0;
      for (int i = 0; i < 4; i++) begin in_pkt[i] = '0; out_ready[i] = '0; end
      @(posedge rst_n);
      for (cyc = 0; cyc < 4000; cyc++) begin
        @(negedge clk);
        for (int o = 0; o < 4; o++) out_ready[o] = (cyc < 3000) ? RDY_W'($urandom) : '1;
        for (int p = 0; p < 4; p++) begin
          pkt_t x;
          int unsigned v;
          v = $urandom % 2;
          if (!exists(p, v)) v = 1 - v;
          x = '0;
          x.dst      = port_t'($urandom % N);
          x.tgt_row  = coord_t'($urandom % K);
          x.tgt_col  = coord_t'($urandom % K);
          x.turn_col = coord_t'($urandom % K);
          x.exit_dir = dir_e'($urandom % 4);
          x.vc       = v[0];
          x.data     = {8'(t), 8'(p), 16'(cyc)};
          in_pkt[p]   = x;
          in_valid[p] = (cyc < 2800) && in_ready[p][v] && (($urandom % 100) < 50);
        end
        @(posedge clk);
        #1;
        for (int p = 0; p < 4; p++)
          if (in_valid[p]) begin
            q[2 * p + in_pkt[p].vc].push_back(in_pkt[p]);
            t_in[in_pkt[p].data] = cyc;
            n_in++;
          end
      end
      checks++;
      if (n_in != n_out || n_in < 1000) begin
        failures++;
        $display("FAIL[%0d]: in %0d out %0d", t, n_in, n_out);
      end
      done[t] = 1'b1;
    end

    // check outputs at each edge (values before the edge)
    always @(posedge clk) if (rst_n) begin
      for (int o = 0; o < 4; o++) if (out_valid[o]) begin
        int unsigned p, v;
        bit found;
        p = out_pkt[o].data[23:16];
        v = out_pkt[o].vc;
        found = q[2 * p + v].size() > 0 && q[2 * p + v][0] == out_pkt[o];
        checks++;
        if (!found || ref_dir(out_pkt[o]) != o || !out_ready[o][ref_sub(o, out_pkt[o])]) begin
          failures++;
          $display("FAIL[%0d]: output %0d packet %h found %0b dir %0d", t, o, out_pkt[o].data,
                   found, ref_dir(out_pkt[o]));
        end
        if (found) void'(q[2 * p + v].pop_front());
        n_out++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done[0] && done[1]);
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
