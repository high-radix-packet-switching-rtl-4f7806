// Self-checking test of slot_timer: slot must be high on the first cycle after
// reset and then exactly every SP cycles, and slot_count must count the slots,
// for SP = 3 (the speedup of the main configuration) and SP = 2.
module tb_slot_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  bit done [2];

  for (genvar t = 0; t < 2; t++) begin : g_t
    localparam int unsigned SP = (t == 0) ? 3 : 2;
    logic        slot;
    logic [31:0] slot_count;
    slot_timer #(.SP(SP)) u_dut (.*);
    initial begin
      @(posedge rst_n);
      for (int c = 0; c < 300; c++) begin
        @(negedge clk);
        checks++;
        // c + 1 rising edges since reset: slot when that is a multiple of SP
        if (slot != (((c + 1) % SP) == 0) || slot_count != 32'((c + SP) / SP)) begin
          failures++;
          $display("FAIL[SP=%0d]: cycle %0d slot %0b count %0d", SP, c, slot, slot_count);
        end
      end
      done[t] = 1'b1;
    end
  end

  initial begin
    @(negedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
