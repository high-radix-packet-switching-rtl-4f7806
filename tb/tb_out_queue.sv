// Self-checking test of out_queue (4 write ports, depth 8, a slot every 3
// cycles): random simultaneous writes whenever ready is high. Checks that the
// packets leave in arrival order, lower CM index first within a cycle, one per
// slot and only in the cycle after a slot cycle, and that ready is high exactly
// while at least 4 entries are free.
module tb_out_queue;
  import clos_mdn_pkg::*;
  localparam int unsigned W = 4, D = 8, SP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]        wr_valid;
  logic [DATA_W-1:0]   wr_data [W];
  logic                ready, slot, out_valid;
  logic [DATA_W-1:0]   out_data;
  logic [$clog2(D+1)-1:0] count;

  out_queue #(.W(W), .DEPTH(D)) u_dut (.*);

  int unsigned checks = 0, failures = 0, n_out = 0, n_full = 0;
  logic [DATA_W-1:0] model [$];
  bit exp_out = 0;
  logic [DATA_W-1:0] exp_data;
  int unsigned cyc = 0, seq = 1;

  initial begin
    wr_valid = '0; slot = 0;
    for (int i = 0; i < W; i++) wr_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // outputs of the previous edge
      checks++;
      if (out_valid != exp_out || (exp_out && out_data != exp_data)) begin
        failures++;
        $display("FAIL: cycle %0d out_valid %0b data %0d expected %0b %0d",
                 cyc, out_valid, out_data, exp_out, exp_data);
      end
      if (out_valid) n_out++;
      checks++;
      if (ready != ((D - model.size()) >= W) || count != $bits(count)'(model.size())) begin
        failures++;
        $display("FAIL: cycle %0d ready %0b count %0d model %0d", cyc, ready, count, model.size());
      end
      if (!ready) n_full++;
      slot = (cyc % SP) == 0;
      // heavier writing in the first half to reach a full queue
      for (int i = 0; i < W; i++) begin
        wr_valid[i] = ready && (($urandom % 100) < ((cyc < 1500) ? 30 : 8));
        wr_data[i]  = seq + i;
      end
      seq += W;
      @(posedge clk);
      exp_out = slot && model.size() > 0;
      if (exp_out) exp_data = model.pop_front();
      for (int i = 0; i < W; i++) if (wr_valid[i]) model.push_back(wr_data[i]);
    end
    checks++;
    if (n_full == 0 || n_out < 100) begin
      failures++;
      $display("FAIL: queue never full (%0d) or too few outputs (%0d)", n_full, n_out);
    end
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
