// Traffic-pattern runs on the Clos-MDN switch at the 32-port layout (K = 4,
// M = 4, speedup 3, 4-packet router buffers). Patterns, per input port i of N:
//   uniform   Bernoulli arrivals, destination uniform over all outputs;
//   bursty    on/off bursts of mean length 10 packets, one destination per burst;
//   hotspot   Bernoulli, destination i with probability omega = 0.5, else uniform;
//   diagonal  Bernoulli, destination i with probability 2/3, else (i+1) mod N.
// Each run offers traffic for WARM + MEAS slots, then drains. Throughput is the
// number of packets delivered in the MEAS window per output per slot; delay is
// in time slots from the line offering a packet to its delivery. Checks: every
// packet is delivered once to its own port; below saturation (uniform at 50 %
// load) throughput matches the offered load within 5 %; with speedup 3 uniform
// traffic at 90 % load is still carried at over 85 %.
module tb_clos_mdn_workloads;
  import clos_mdn_pkg::*;

  localparam int unsigned K  = 4;
  localparam int unsigned M  = 4;
  localparam int unsigned SP = 3;
  localparam int unsigned N  = 2 * K * M;
  localparam int unsigned MAXP = 1 << 18;
  localparam int unsigned WARM = 100, MEAS = 400;

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

  int unsigned exp_dst [MAXP];
  int unsigned t_gen   [MAXP];
  bit          got     [MAXP];
  int unsigned next_id = 1, n_gen = 0, n_got = 0;

  // run control
  int unsigned pattern = 0;   // 0 off, 1 uniform, 2 bursty, 3 hotspot, 4 diagonal
  int unsigned load = 0;      // percent
  bit          measuring = 0;
  int unsigned meas_got = 0;
  longint unsigned delay_sum = 0;
  int unsigned delay_cnt = 0;

  // per-input burst state
  bit          on    [N];
  int unsigned bdst  [N];

  function automatic int unsigned pick_dst(int unsigned i);
    case (pattern)
      3: return (($urandom % 1000) < 500) ? i : $urandom % N;
      4: return (($urandom % 3) < 2) ? i : (i + 1) % N;
      default: return $urandom % N;
    endcase
  endfunction

  // line side: a packet is generated at a slot and offered until taken
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= '0;
      for (int p = 0; p < N; p++) begin in_data[p] <= '0; in_dst[p] <= '0; on[p] = 0; end
    end else if (slot) begin
      for (int unsigned p = 0; p < N; p++) begin
        if (!in_valid[p] || in_ready[p]) begin
          bit gen;
          int unsigned d;
          gen = 0; d = 0;
          if (pattern == 2) begin
            // on/off source, mean on 10 slots, mean off 10*(1-load)/load
            if (on[p]) begin
              gen = 1; d = bdst[p];
              if (($urandom % 10) == 0) on[p] = 0;
            end else if (($urandom % (1000 * (100 - load) / load)) < 100) begin
              on[p] = 1; bdst[p] = $urandom % N;
              gen = 1; d = bdst[p];
            end
          end else if (pattern != 0) begin
            gen = ($urandom % 100) < load;
            d   = pick_dst(p);
          end
          if (gen && next_id < MAXP) begin
            in_valid[p] <= 1'b1;
            in_data[p]  <= next_id;
            in_dst[p]   <= port_t'(d);
            exp_dst[next_id] = d;
            t_gen[next_id]   = slot_count;
            next_id++;
            n_gen++;
          end else begin
            in_valid[p] <= 1'b0;
          end
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int unsigned q = 0; q < N; q++) if (out_valid[q]) begin
      int unsigned id;
      id = out_data[q];
      checks++;
      if (id == 0 || id >= next_id || got[id] || exp_dst[id] != q) begin
        failures++;
        $display("FAIL: output %0d got packet %0d", q, id);
      end else begin
        got[id] = 1;
        n_got++;
        if (measuring) begin
          meas_got++;
          delay_sum += slot_count - t_gen[id];
          delay_cnt++;
        end
      end
    end
  end

  task automatic run(input int unsigned pat, input int unsigned ld, input string name,
                     output real thr);
    @(negedge clk);
    pattern = pat; load = ld;
    repeat (WARM * SP) @(posedge clk);
    @(negedge clk);
    meas_got = 0; delay_sum = 0; delay_cnt = 0; measuring = 1;
    repeat (MEAS * SP) @(posedge clk);
    @(negedge clk);
    measuring = 0; pattern = 0;
    thr = real'(meas_got) / real'(MEAS * N);
    $display("%-9s load %3d %%: throughput %5.1f %%, mean delay %6.1f slots",
             name, ld, 100.0 * thr, (delay_cnt > 0) ? real'(delay_sum) / delay_cnt : 0.0);
    for (int i = 0; i < 20000 && n_got != n_gen; i++) @(posedge clk);
    checks++;
    if (n_got != n_gen) begin
      failures++;
      $display("FAIL: %s: generated %0d delivered %0d", name, n_gen, n_got);
    end
  endtask

  initial begin
    real thr;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run(1, 50, "uniform", thr);
    checks++;
    if (thr < 0.45 || thr > 0.55) begin failures++; $display("FAIL: uniform 50 %% carried %f", thr); end
    run(1, 90, "uniform", thr);
    checks++;
    if (thr < 0.85) begin failures++; $display("FAIL: uniform 90 %% carried %f", thr); end
    run(2, 50, "bursty", thr);
    run(2, 90, "bursty", thr);
    run(3, 50, "hotspot", thr);
    run(3, 90, "hotspot", thr);
    run(4, 50, "diagonal", thr);
    run(4, 90, "diagonal", thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
