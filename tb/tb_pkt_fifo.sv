// Self-checking test of pkt_fifo: random pushes and pops against a queue model,
// checking head, full, empty and count every cycle, at depth 4 and at depth 1.
module tb_pkt_fifo;
  import clos_mdn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  for (genvar t = 0; t < 2; t++) begin : g_t
    localparam int unsigned D = (t == 0) ? 4 : 1;
    logic push, pop, full, empty;
    pkt_t din, head;
    logic [$clog2(D+1)-1:0] count;
    pkt_t model [$];

    pkt_fifo #(.DEPTH(D)) u_dut (.*);

    initial begin
      push = 0; pop = 0; din = '0;
      @(posedge rst_n);
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        // compare state
        checks++;
        if (count != $bits(count)'(model.size()) || empty != (model.size() == 0) ||
            full != (model.size() == D) || (model.size() > 0 && head != model[0])) begin
          failures++;
          $display("FAIL[D=%0d]: count %0d model %0d empty %0b full %0b", D, count,
                   model.size(), empty, full);
        end
        push = ($urandom % 100) < 55 && model.size() < D;
        pop  = ($urandom % 100) < 45 && model.size() > 0;
        din  = pkt_t'({$urandom, $urandom});
        @(posedge clk);
        if (pop)  void'(model.pop_front());
        if (push) model.push_back(din);
      end
      done[t] = 1'b1;
    end
  end

  bit done [2];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
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
