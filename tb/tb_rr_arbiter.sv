// Self-checking test of rr_arbiter: random request patterns; the grant must be
// the first requester at or after the position following the previous winner
// (a reference pointer kept here), and a requester that keeps asking must be
// served within N grants.
module tb_rr_arbiter;
  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req, grant;
  logic         advance, any;

  rr_arbiter #(.N(N)) u_dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned ptr = 0;
  int unsigned wait_cnt [N];

  initial begin
    req = '0; advance = 1'b1;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      logic [N-1:0] exp;
      int unsigned  w;
      @(negedge clk);
      req     = (c < 2000) ? N'($urandom) : N'($urandom | 32'h1);  // keep bit 0 busy later
      advance = ($urandom % 8) != 0;
      #1;
      exp = '0; w = ptr;
      for (int i = 0; i < N; i++)
        if (exp == '0 && req[(ptr + i) % N]) begin exp[(ptr + i) % N] = 1'b1; w = (ptr + i) % N; end
      checks++;
      if (grant != exp || any != (req != '0)) begin
        failures++;
        $display("FAIL: req %b ptr %0d grant %b expected %b", req, ptr, grant, exp);
      end
      @(posedge clk);
      if (advance && req != '0) begin
        ptr = (w + 1) % N;
        for (int i = 0; i < N; i++)
          if (req[i] && !exp[i]) wait_cnt[i]++; else wait_cnt[i] = 0;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (wait_cnt[i] >= N) begin
            failures++;
            $display("FAIL: requester %0d starved", i);
          end
        end
      end
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
