// Self-checking test of the IOM (K = 2, M = 4, a slot every 3 cycles).
// Input side: random line packets; each accepted packet must leave on CM link i
// (static dispatch of FIFO i), in order, intact, at most once per time slot per
// link, with the CM side refusing packets at random. Output side: random packets
// from the 4 CM links for random output ports; each must leave on the line of
// its queue ((N-1-dst) mod M) in arrival order (lower CM first within a cycle),
// at most one per slot per line.
module tb_iom;
  import clos_mdn_pkg::*;
  localparam int unsigned K = 2, M = 4, SP = 3, N = 2 * K * M;
  localparam int unsigned RDY_W = (M > 2) ? M : 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                slot;
  logic [31:0]         slot_count;
  logic [M-1:0]        in_valid, in_ready, cm_valid, cm_ready, fab_valid, out_valid;
  logic [DATA_W-1:0]   in_data [M], out_data [M];
  port_t               in_dst  [M];
  pkt_t                cm_pkt  [M], fab_pkt [M];
  logic [RDY_W-1:0]    fab_ready;

  slot_timer #(.SP(SP)) u_slot (.*);
  iom #(.K(K), .M(M), .IN_DEPTH(4), .OQ_DEPTH(8)) u_dut (.*);

  int unsigned checks = 0, failures = 0, n_up = 0, n_dn = 0, seq = 1;
  pkt_t        up_model [M][$];
  logic [DATA_W-1:0] dn_model [M][$];
  int unsigned up_in_slot [M];
  int unsigned last_out [M];
  int unsigned cyc = 0;

  initial begin
    in_valid = '0; cm_ready = '0; fab_valid = '0;
    for (int i = 0; i < M; i++) begin
      in_data[i] = '0; in_dst[i] = '0; fab_pkt[i] = '0; up_in_slot[i] = 0; last_out[i] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cyc = 1; cyc < 6000; cyc++) begin
      @(negedge clk);
      // line and CM-side stimulus
      for (int i = 0; i < M; i++) begin
        cm_ready[i] = ($urandom % 100) < 60;
        if (!in_valid[i]) begin
          in_valid[i] = ($urandom % 100) < 40;
          in_data[i]  = seq++;
          in_dst[i]   = port_t'($urandom % N);
        end
      end
      for (int r = 0; r < M; r++) begin
        pkt_t p;
        p = '0;
        p.dst  = port_t'($urandom % N);
        p.data = seq++;
        fab_pkt[r]   = p;
        fab_valid[r] = fab_ready[out_qidx(p.dst, N, M)] && (($urandom % 100) < 20);
      end
      #1;
      for (int i = 0; i < M; i++) if (slot) up_in_slot[i] = 0;
      @(posedge clk);
      // what the edge took
      for (int i = 0; i < M; i++) begin
        if (cm_valid[i] && cm_ready[i]) begin
          pkt_t e;
          checks++;
          if (up_model[i].size() == 0) begin
            failures++; $display("FAIL: link %0d sent with empty model", i);
          end else begin
            e = up_model[i].pop_front();
            if (cm_pkt[i].data != e.data || cm_pkt[i].dst != e.dst) begin
              failures++;
              $display("FAIL: link %0d sent %0d expected %0d", i, cm_pkt[i].data, e.data);
            end
          end
          up_in_slot[i]++;
          n_up++;
          checks++;
          if (up_in_slot[i] > 1) begin
            failures++; $display("FAIL: link %0d sent twice in a slot", i);
          end
        end
        if (in_valid[i] && in_ready[i]) begin
          pkt_t p;
          p = '0; p.data = in_data[i]; p.dst = in_dst[i];
          up_model[i].push_back(p);
          in_valid[i] <= 1'b0;
        end
      end
      for (int r = 0; r < M; r++)
        if (fab_valid[r]) dn_model[out_qidx(fab_pkt[r].dst, N, M)].push_back(fab_pkt[r].data);
      #1;
      for (int j = 0; j < M; j++) begin
        if (out_valid[j]) begin
          checks++;
          if (dn_model[j].size() == 0 || out_data[j] != dn_model[j][0]) begin
            failures++;
            $display("FAIL: line %0d sent %0d", j, out_data[j]);
          end else void'(dn_model[j].pop_front());
          checks++;
          if (last_out[j] != 0 && cyc - last_out[j] < SP) begin
            failures++; $display("FAIL: line %0d twice in a slot", j);
          end
          last_out[j] = cyc;
          n_dn++;
        end
      end
    end
    checks++;
    if (n_up < 500 || n_dn < 500) begin
      failures++; $display("FAIL: too little traffic up %0d down %0d", n_up, n_dn);
    end
    $display("up %0d down %0d", n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
