// mux_bus_decoder: decoder matching mux_bus_encoder.
//
// The LSB_W low bits go through the inverse sequential-stream coder
// (Delta-TS or INC-XOR), the upper bits through a data_bus_decoder of W-bit
// self-organizing-list slices. All parameters must equal the encoder's.
//
// Interface: bus/bus_valid in; addr/addr_valid out, registered, one cycle
// latency. Structure and defaults mirror the encoder.
module mux_bus_decoder
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
  input  logic              bus_valid,
  input  logic [ADDR_W-1:0] bus,
  output logic [ADDR_W-1:0] addr,
  output logic              addr_valid
);
  logic lsb_valid;
  logic msb_valid;

  if (LSB_SCHEME == LSB_DELTA_TS) begin : g_delta
    delta_ts_decoder #(.W(LSB_W), .STRIDE(STRIDE)) u_lsb (
      .clk(clk), .rst_n(rst_n), .bus_valid(bus_valid),
      .bus(bus[LSB_W-1:0]), .addr(addr[LSB_W-1:0]), .addr_valid(lsb_valid)
    );
  end else begin : g_incxor
    incxor_decoder #(.W(LSB_W), .STRIDE(STRIDE)) u_lsb (
      .clk(clk), .rst_n(rst_n), .bus_valid(bus_valid),
      .bus(bus[LSB_W-1:0]), .addr(addr[LSB_W-1:0]), .addr_valid(lsb_valid)
    );
  end

  data_bus_decoder #(
    .ADDR_W(ADDR_W - LSB_W), .W(W), .POLICY(POLICY), .USE_TS(USE_TS)
  ) u_msb (
    .clk(clk), .rst_n(rst_n), .bus_valid(bus_valid),
    .bus(bus[ADDR_W-1:LSB_W]), .addr(addr[ADDR_W-1:LSB_W]), .addr_valid(msb_valid)
  );

  assign addr_valid = lsb_valid;

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) lsb_valid == msb_valid);

endmodule
