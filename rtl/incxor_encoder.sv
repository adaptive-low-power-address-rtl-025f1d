// incxor_encoder: INC-XOR coder for the least significant bits of an address bus.
//
// The value sent is addr XOR (previous address + STRIDE). For a sequential
// instruction stream the prediction is exact and the sent word is all zero, so
// the lines stay quiet. Only the W low bits are coded; the increment wraps
// inside those bits (no carry into the upper bus slices).
//
// Interface: addr/in_valid in; bus/bus_valid out, registered, one cycle
// latency; idle cycles (in_valid low) hold the bus and the stored address.
// Reset clears the stored previous address and the bus. The function follows
// the INC-XOR scheme of Ramprasad et al. applied to the low bits only; the
// stride of one word per address (addresses counted in bus words) is derived
// from the statement that four low bits carry 93.75% of the transitions of a
// sequential stream, which holds for a unit increment.
module incxor_encoder #(
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
  logic [W-1:0] pred;

  assign pred = prev_q + W'(STRIDE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q    <= '0;
      bus       <= '0;
      bus_valid <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        prev_q <= addr;
        bus    <= addr ^ pred;
      end
    end
  end

endmodule
