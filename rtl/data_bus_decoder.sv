// data_bus_decoder: decoder matching data_bus_encoder.
//
// One sol_decoder per W-bit slice, each keeping its own symbol list in step
// with the encoder slice across the bus. The slices are independent, so the
// decode delay is one slice's select multiplexer.
//
// Interface: bus/bus_valid in; addr/addr_valid out, registered, one cycle
// latency. Parameters must equal the encoder's. The slicing matches the
// encoder (a choice of this design where the scheme leaves it open).
module data_bus_decoder
  import sol_pkg::*;
#(
  parameter int unsigned  ADDR_W = 32,
  parameter int unsigned  W      = 4,
  parameter list_policy_e POLICY = POLICY_MTF,
  parameter bit           USE_TS = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_valid,
  input  logic [ADDR_W-1:0] bus,
  output logic [ADDR_W-1:0] addr,
  output logic              addr_valid
);
  localparam int unsigned NSLICE = (ADDR_W + W - 1) / W;

  logic [NSLICE-1:0] slice_valid;

  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    localparam int unsigned LO = s * W;
    localparam int unsigned SW = (ADDR_W - LO < W) ? (ADDR_W - LO) : W;
    sol_decoder #(.W(SW), .POLICY(POLICY), .USE_TS(USE_TS)) u_dec (
      .clk      (clk),
      .rst_n    (rst_n),
      .bus_valid(bus_valid),
      .bus      (bus[LO +: SW]),
      .sym      (addr[LO +: SW]),
      .sym_valid(slice_valid[s])
    );
  end

  assign addr_valid = &slice_valid;  // slices run in lock step

endmodule
