// delta_ts_decoder: inverse of delta_ts_encoder.
//
// Undoes transition signaling (delta = bus XOR previous bus value) and adds
// the prediction back: addr = delta + previous decoded address + STRIDE, all
// modulo 2^W.
//
// Interface: bus/bus_valid in; addr/addr_valid out, registered, one cycle
// latency. Reset clears the previous bus value and previous address, matching
// the encoder. Reset values and handshake are choices of this design.
module delta_ts_decoder #(
  parameter int unsigned W      = 4,
  parameter int unsigned STRIDE = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_valid,
  input  logic [W-1:0] bus,
  output logic [W-1:0] addr,
  output logic         addr_valid
);
  logic [W-1:0] prev_q;
  logic [W-1:0] bus_prev_q;
  logic [W-1:0] addr_d;

  assign addr_d = (bus ^ bus_prev_q) + prev_q + W'(STRIDE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q     <= '0;
      bus_prev_q <= '0;
      addr       <= '0;
      addr_valid <= 1'b0;
    end else begin
      addr_valid <= bus_valid;
      if (bus_valid) begin
        prev_q     <= addr_d;
        bus_prev_q <= bus;
        addr       <= addr_d;
      end
    end
  end

endmodule
