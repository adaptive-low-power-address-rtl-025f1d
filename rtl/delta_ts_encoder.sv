// delta_ts_encoder: Delta coder with transition signaling for the least
// significant bits of a multiplexed address bus.
//
// A W-bit subtractor forms delta = addr - (previous address + STRIDE); the
// bus then carries bus XOR delta (transition signaling). A sequential address
// gives delta = 0 and no line toggles; a short jump toggles only the few lines
// set in its small delta. Only the W low bits are coded and arithmetic wraps
// inside them.
//
// Interface: addr/in_valid in; bus/bus_valid out, registered, one cycle
// latency; idle cycles hold bus and stored address. Reset clears both.
// The subtract-then-transition-signal structure follows the published Delta-TS
// scheme; the sign of the difference (current minus predicted), the unit
// stride, reset values and handshake are choices of this design.
module delta_ts_encoder #(
  parameter int unsigned W      = 4,
  parameter int unsigned STRIDE = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] addr,
  output logic [W-1:0] bus,
  output logic         bus_valid
);
  logic [W-1:0] prev_q;
  logic [W-1:0] delta;

  assign delta = addr - (prev_q + W'(STRIDE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q    <= '0;
      bus       <= '0;
      bus_valid <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        prev_q <= addr;
        bus    <= bus ^ delta;
      end
    end
  end

endmodule
