// mux_bus_encoder: encoder for a multiplexed (instruction + data) address bus.
//
// Instruction addresses are mostly sequential and then nearly all toggling is
// in the few low bits, while the upper bits show the locality of both streams.
// The LSB_W low bits therefore go through a sequential-stream coder (Delta-TS
// by default, INC-XOR selectable with LSB_SCHEME) and the remaining upper bits
// through a data_bus_encoder, i.e. W-bit self-organizing-list slices
// (move-to-front by default; transition signaling on them off by default).
// Defaults: 32-bit bus, 4 low bits, seven 4-bit MTF slices above them.
//
// Interface: addr/in_valid in; bus/bus_valid out, registered, one cycle
// latency, no extra lines. The low-bit/high-bit split, its 4-bit width and
// the Delta + MTF default follow the published scheme; leaving transition
// signaling off on the upper slices and the unit stride are choices of this
// design.
module mux_bus_encoder
  import sol_pkg::*;
#(
  parameter int unsigned  ADDR_W     = 32,
  parameter int unsigned  LSB_W      = 4,
  parameter int unsigned  W          = 4,
  parameter list_policy_e POLICY     = POLICY_MTF,
  parameter lsb_scheme_e  LSB_SCHEME = LSB_DELTA_TS,
  parameter bit           USE_TS     = 1'b0,
  parameter int unsigned  STRIDE     = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] bus,
  output logic              bus_valid
);
  logic lsb_valid;
  logic msb_valid;

  if (LSB_SCHEME == LSB_DELTA_TS) begin : g_delta
    delta_ts_encoder #(.W(LSB_W), .STRIDE(STRIDE)) u_lsb (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .addr(addr[LSB_W-1:0]), .bus(bus[LSB_W-1:0]), .bus_valid(lsb_valid)
    );
  end else begin : g_incxor
    incxor_encoder #(.W(LSB_W), .STRIDE(STRIDE)) u_lsb (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .addr(addr[LSB_W-1:0]), .bus(bus[LSB_W-1:0]), .bus_valid(lsb_valid)
    );
  end

  data_bus_encoder #(
    .ADDR_W(ADDR_W - LSB_W), .W(W), .POLICY(POLICY), .USE_TS(USE_TS)
  ) u_msb (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .addr(addr[ADDR_W-1:LSB_W]), .bus(bus[ADDR_W-1:LSB_W]), .bus_valid(msb_valid)
  );

  assign bus_valid = lsb_valid;

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) lsb_valid == msb_valid);

endmodule
