// End-to-end test of the Clos-MDN switch at the 32-port size of the example
// layout (K = 4, M = 4: 8 IOMs, 4 central 4 x 4 meshes).
//
// Every packet carries a unique id in its payload; a scoreboard records the
// destination of each id and checks that it leaves on exactly that output port,
// once. Phases:
//   1. single packets, one at a time, covering every IOM pair, with the latency
//      of an idle switch checked against its hop count;
//   2. uniform random traffic at 60 % load;
//   3. traffic from only the first FIFO of every IOM, at full load, so that it
//      all enters CM 0 and piles up there: this makes the congestion-aware
//      dispatch divert packets to the neighbouring CMs through the interleaved
//      links and makes the input FIFOs push back on the lines;
//   4. all inputs sending to one output port (hot spot), which fills the
//      output queue and backs traffic up into the meshes;
// then a drain, after which every packet sent must have been delivered. Each
// output must also never deliver more than one packet per time slot. Counters
// show that each mechanism (each route class, both diversion directions,
// backpressure at the lines, a full output queue) happened at least once.
module tb_clos_mdn_switch;
  import clos_mdn_pkg::*;

  localparam int unsigned K  = 4;
  localparam int unsigned M  = 4;
  localparam int unsigned SP = 3;
  localparam int unsigned N  = 2 * K * M;
  localparam int unsigned MAXP = 1 << 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                slot;
  logic [31:0]         slot_count;
  logic [N-1:0]        in_valid, in_ready, out_valid;
  logic [DATA_W-1:0]   in_data  [N];
  port_t               in_dst   [N];
  logic [DATA_W-1:0]   out_data [N];
  logic [2*K-1:0]      div_up_evt [M], div_down_evt [M];
  logic [OCC_W-1:0]    cm_occ [M];

  clos_mdn_switch #(.K(K), .M(M), .SP(SP)) u_dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // scoreboard
  int unsigned exp_dst  [MAXP];
  bit          sent_id  [MAXP];
  bit          got_id   [MAXP];
  int unsigned t_sent   [MAXP];
  int unsigned next_id = 1;
  int unsigned n_sent = 0, n_got = 0;
  int unsigned last_out [N];

  // mechanism counters
  int unsigned c_ww = 0, c_we = 0, c_ew = 0, c_ee = 0;
  int unsigned c_div_up = 0, c_div_dn = 0, c_line_bp = 0, c_oq_full = 0;
  int unsigned lat_fail_seen = 0;

  // stimulus control
  int unsigned mode = 0;      // 0 idle, 1 uniform, 2 CM-0 only, 3 hot spot, 4 directed
  int unsigned load = 0;      // percent
  int unsigned dir_src = 0, dir_dst = 0;
  bit          dir_go = 1'b0;

  // output queues that refuse new packets (full), seen inside the IOMs
  logic [2*K-1:0] oq_busy;
  for (genvar g = 0; g < 2 * K; g++) begin : g_mon
    assign oq_busy[g] = (u_dut.g_iom[g].u_iom.q_ready != '1);
  end

  function automatic int unsigned iom_of_out(int unsigned q);
    return (N - 1 - q) / M;
  endfunction

  // Line side: one pending packet per input, offered until taken.
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= '0;
      for (int p = 0; p < N; p++) begin
        in_data[p] <= '0;
        in_dst[p]  <= '0;
      end
    end else begin
      for (int unsigned p = 0; p < N; p++) begin
        bit busy;
        busy = in_valid[p] && !in_ready[p];
        if (in_valid[p] && !in_ready[p] && slot) c_line_bp++;
        if (in_valid[p] && in_ready[p]) begin
          sent_id[in_data[p]] = 1'b1;
          t_sent[in_data[p]]  = cyc;
          n_sent++;
        end
        if (!busy) begin
          bit          gen;
          int unsigned d;
          gen = 1'b0;
          d   = 0;
          if (slot && next_id < MAXP - 1) begin
            case (mode)
              1: begin gen = ($urandom % 100) < load; d = $urandom % N; end
              2: begin gen = (p % M) == 0;            d = $urandom % N; end
              3: begin gen = ($urandom % 100) < load; d = 5; end
              4: begin gen = dir_go && p == dir_src;  d = dir_dst; end
              default: gen = 1'b0;
            endcase
          end
          if (gen) begin
            in_valid[p]     <= 1'b1;
            in_data[p]      <= next_id;
            in_dst[p]       <= port_t'(d);
            exp_dst[next_id] = d;
            next_id++;
          end else begin
            in_valid[p] <= 1'b0;
          end
        end
      end
      if (mode == 4 && dir_go && slot) dir_go = 1'b0;
    end
  end

  // Output side: scoreboard, rate check, route class counters.
  always @(posedge clk) begin
    if (rst_n) begin
      for (int unsigned q = 0; q < N; q++) begin
        if (out_valid[q]) begin
          int unsigned id;
          id = out_data[q];
          checks++;
          if (id == 0 || id >= MAXP || !sent_id[id] || got_id[id] || exp_dst[id] != q) begin
            failures++;
            $display("FAIL: out %0d got id %0d (expected dst %0d, sent %0d, dup %0d)",
                     q, id, (id < MAXP) ? exp_dst[id] : 0, (id < MAXP) ? sent_id[id] : 0,
                     (id < MAXP) ? got_id[id] : 0);
          end else begin
            got_id[id] = 1'b1;
            n_got++;
          end
          checks++;
          if (last_out[q] != 0 && cyc - last_out[q] < SP) begin
            failures++;
            $display("FAIL: out %0d delivered twice within one slot", q);
          end
          last_out[q] = cyc;
        end
      end
      for (int unsigned r = 0; r < M; r++) begin
        c_div_up += $countones(div_up_evt[r]);
        c_div_dn += $countones(div_down_evt[r]);
      end
      if (oq_busy != '0) c_oq_full++;
    end
  end

  task automatic wait_slots(input int unsigned n);
    repeat (n * SP) @(posedge clk);
  endtask

  // Send one packet through an idle switch and check its delivery time.
  task automatic directed(input int unsigned s, input int unsigned d);
    int unsigned id, t0;
    id = next_id;
    @(negedge clk);
    dir_src = s; dir_dst = d; dir_go = 1'b1; mode = 4;
    t0 = cyc;
    while (!got_id[id] && cyc - t0 < 400) @(posedge clk);
    checks++;
    if (!got_id[id]) begin
      failures++;
      $display("FAIL: directed %0d -> %0d not delivered", s, d);
    end else begin
      int unsigned gs, gd, a_row, a_col, e_row, e_col, hops, lat, bound;
      int unsigned xc, ring_up, ring_dn, fast;
      gs = s / M; gd = iom_of_out(d);
      if (gs < K && gd < K) c_ww++;
      else if (gs < K) c_we++;
      else if (gd < K) c_ew++;
      else c_ee++;
      // Idle switch: the packet visits hops+1 routers, one cycle each; it waits
      // at most one slot to enter the IOM and one slot to leave it, plus a cycle
      // for the FIFO and for the output register. Staying in its CM is the
      // slowest path; between far corners of a large mesh the dispatch may take
      // the shorter way over a ring link (to the crossing column, over the
      // edge, then straight to the exit row on the neighbour's exit column).
      a_row = (gs < K) ? gs : 2 * K - 1 - gs;  a_col = (gs < K) ? 0 : K - 1;
      e_row = (gd < K) ? gd : 2 * K - 1 - gd;  e_col = (gd < K) ? 0 : K - 1;
      hops  = ((a_row > e_row) ? a_row - e_row : e_row - a_row)
            + ((a_col > e_col) ? a_col - e_col : e_col - a_col);
      xc      = (gd < K) ? K / 2 : K / 2 - 1;
      ring_up = ((a_col > xc) ? a_col - xc : xc - a_col) + a_row + 1 + (K - 1 - e_row);
      ring_dn = ((a_col > xc) ? a_col - xc : xc - a_col) + (K - 1 - a_row) + 1 + e_row;
      fast    = (ring_up < hops) ? ring_up : hops;
      fast    = (ring_dn < fast) ? ring_dn : fast;
      lat   = cyc - t_sent[id];
      bound = hops + 1 + 2 * SP + 2;
      checks++;
      if (lat < fast + 1 || lat > bound) begin
        failures++;
        $display("FAIL: directed %0d -> %0d latency %0d outside [%0d,%0d]",
                 s, d, lat, fast + 1, bound);
      end
    end
    mode = 0;
    wait_slots(2);
  endtask

  initial begin
    for (int i = 0; i < N; i++) last_out[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait_slots(2);

    // 1. directed packets between every pair of IOMs, various FIFO indices
    for (int unsigned gs = 0; gs < 2 * K; gs++)
      for (int unsigned gd = 0; gd < 2 * K; gd++)
        directed(gs * M + ((gs + gd) % M), N - 1 - gd * M - ((gs * 3 + gd) % M));

    // 2. uniform random traffic
    @(negedge clk); mode = 1; load = 60;
    wait_slots(300);
    @(negedge clk); mode = 0;
    wait_slots(100);

    // 3. everything through CM 0
    @(negedge clk); mode = 2;
    wait_slots(150);
    @(negedge clk); mode = 0;
    wait_slots(200);

    // 4. hot spot on output 5
    @(negedge clk); mode = 3; load = 50;
    wait_slots(60);
    @(negedge clk); mode = 0;
    wait_slots(10);
    for (int i = 0; i < 4000 && n_got != n_sent; i++) wait_slots(1);

    // everything must be out
    checks++;
    if (n_got != n_sent) begin
      failures++;
      $display("FAIL: sent %0d packets, delivered %0d", n_sent, n_got);
    end
    $display("packets sent %0d delivered %0d", n_sent, n_got);
    $display("routes W->W %0d W->E %0d E->W %0d E->E %0d", c_ww, c_we, c_ew, c_ee);
    $display("diversions up %0d down %0d, line backpressure %0d, output queue full %0d",
             c_div_up, c_div_dn, c_line_bp, c_oq_full);
    checks += 8;
    if (c_ww == 0) begin failures++; $display("FAIL: no W->W route"); end
    if (c_we == 0) begin failures++; $display("FAIL: no W->E route"); end
    if (c_ew == 0) begin failures++; $display("FAIL: no E->W route"); end
    if (c_ee == 0) begin failures++; $display("FAIL: no E->E route"); end
    if (c_div_up == 0) begin failures++; $display("FAIL: no diversion up"); end
    if (c_div_dn == 0) begin failures++; $display("FAIL: no diversion down"); end
    if (c_line_bp == 0) begin failures++; $display("FAIL: no line backpressure"); end
    if (c_oq_full == 0) begin failures++; $display("FAIL: output queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
