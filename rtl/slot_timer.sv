// Time-slot generator: marks the first fabric cycle of every time slot.
//
// The mesh routers run SP times faster than the external lines (speedup SP): a
// time slot, in which a line delivers or takes at most one packet, lasts SP
// fabric clock cycles. `slot` is high on the first cycle of each slot, starting
// with the first cycle after reset. `slot_count` counts slots started (for
// rate checks). Expressing the speedup as SP cycles per slot is this design's
// reading of the speedup definition.
module slot_timer #(
  parameter int unsigned SP = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        slot,
  output logic [31:0] slot_count
);
  localparam int unsigned CW = (SP > 1) ? $clog2(SP) : 1;
  logic [CW-1:0] phase;

  assign slot = (phase == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      slot_count <= '0;
    end else begin
      phase      <= (32'(phase) == SP - 1) ? '0 : phase + 1'b1;
      if (slot) slot_count <= slot_count + 1;
    end
  end
endmodule
