// Round-robin arbiter: the contention resolver of one mini-router output.
//
// Grants one of N requesters per cycle, combinationally from `req`. Priority
// starts at the requester after the one granted last, so every requester that
// keeps asking is served within N grants. The priority pointer moves only when
// `advance` is high (the grant was used). The switch description names a
// round-robin arbitration unit per router; the pointer scheme is this design's
// choice.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         any
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;       // highest-priority requester this cycle
  logic [IW-1:0] win;

  always_comb begin
    logic [31:0] idx;
    grant = '0;
    win   = ptr;
    any   = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = (32'(ptr) + i) % N;
      if (!any && req[idx]) begin
        any        = 1'b1;
        grant[idx] = 1'b1;
        win        = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ptr <= '0;
    else if (advance && any) ptr <= (32'(win) == N - 1) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
