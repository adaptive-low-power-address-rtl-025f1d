// data_bus_encoder: self-organizing-list encoder for a whole data address bus.
//
// Keeping a list of every possible 32-bit address is impractical, so the bus
// is cut into independent slices of W bits (bits [W-1:0], [2W-1:W], ...). Each
// slice has its own sol_encoder with 2^W code registers. When ADDR_W is not a
// multiple of W the top slice is narrower. With the defaults (32 bits, W = 4,
// move-to-front, transition signaling on) there are eight slices of 16 four-bit
// registers each; no extra bus lines are added.
//
// Interface: addr/in_valid in; bus/bus_valid out, registered, one cycle latency
// (all slices run in lock step). Slice width, policy and transition signaling
// are parameters so the W = 2, 3, 4 and MTF/TR variants can be built.
// Slicing the bus into independent list coders and the default sizes follow
// the published scheme; contiguous slices from bit 0 and a narrower top slice
// are choices of this design.
module data_bus_encoder
  import sol_pkg::*;
#(
  parameter int unsigned  ADDR_W = 32,
  parameter int unsigned  W      = 4,
  parameter list_policy_e POLICY = POLICY_MTF,
  parameter bit           USE_TS = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] bus,
  output logic              bus_valid
);
  localparam int unsigned NSLICE = (ADDR_W + W - 1) / W;

  logic [NSLICE-1:0] slice_valid;

  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    localparam int unsigned LO = s * W;
    localparam int unsigned SW = (ADDR_W - LO < W) ? (ADDR_W - LO) : W;
    sol_encoder #(.W(SW), .POLICY(POLICY), .USE_TS(USE_TS)) u_enc (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .sym      (addr[LO +: SW]),
      .bus      (bus[LO +: SW]),
      .bus_valid(slice_valid[s])
    );
  end

  assign bus_valid = &slice_valid;  // slices run in lock step

endmodule
