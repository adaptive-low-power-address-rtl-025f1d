// addr_bus_codec_top: two complete low-power address bus links.
//
// Link 1 is a data address bus: data_bus_encoder drives the off-chip lines
// (W-bit self-organizing-list slices with transition signaling) and
// data_bus_decoder on the far side restores the address. Link 2 is a
// multiplexed instruction + data address bus: mux_bus_encoder (Delta-TS on
// the 4 low bits, move-to-front slices above) and mux_bus_decoder. The coded
// bus values, which are what would toggle the pads, are brought out so their
// activity can be observed. The two links share only clock and reset.
//
// Timing per link: encoder register, then decoder register, so a decoded
// address appears two cycles after it was presented. Neither link adds bus
// lines or transfer cycles. Placing the two links side by side in one top is
// a packaging choice of this design; each link is the published scheme for
// its kind of bus.
module addr_bus_codec_top
  import sol_pkg::*;
#(
  parameter int unsigned  ADDR_W         = 32,
  parameter int unsigned  DATA_W         = 4,
  parameter list_policy_e DATA_POLICY    = POLICY_MTF,
  parameter bit           DATA_TS        = 1'b1,
  parameter int unsigned  MUX_LSB_W      = 4,
  parameter int unsigned  MUX_W          = 4,
  parameter list_policy_e MUX_POLICY     = POLICY_MTF,
  parameter lsb_scheme_e  MUX_LSB_SCHEME = LSB_DELTA_TS,
  parameter bit           MUX_TS         = 1'b0,
  parameter int unsigned  STRIDE         = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // data address bus link
  input  logic              data_in_valid,
  input  logic [ADDR_W-1:0] data_in_addr,
  output logic [ADDR_W-1:0] data_bus,
  output logic              data_bus_valid,
  output logic [ADDR_W-1:0] data_out_addr,
  output logic              data_out_valid,
  // multiplexed address bus link
  input  logic              mux_in_valid,
  input  logic [ADDR_W-1:0] mux_in_addr,
  output logic [ADDR_W-1:0] mux_bus,
  output logic              mux_bus_valid,
  output logic [ADDR_W-1:0] mux_out_addr,
  output logic              mux_out_valid
);

  data_bus_encoder #(.ADDR_W(ADDR_W), .W(DATA_W), .POLICY(DATA_POLICY), .USE_TS(DATA_TS)) u_data_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(data_in_valid), .addr(data_in_addr),
    .bus(data_bus), .bus_valid(data_bus_valid)
  );

  data_bus_decoder #(.ADDR_W(ADDR_W), .W(DATA_W), .POLICY(DATA_POLICY), .USE_TS(DATA_TS)) u_data_dec (
    .clk(clk), .rst_n(rst_n), .bus_valid(data_bus_valid), .bus(data_bus),
    .addr(data_out_addr), .addr_valid(data_out_valid)
  );

  mux_bus_encoder #(
    .ADDR_W(ADDR_W), .LSB_W(MUX_LSB_W), .W(MUX_W), .POLICY(MUX_POLICY),
    .LSB_SCHEME(MUX_LSB_SCHEME), .USE_TS(MUX_TS), .STRIDE(STRIDE)
  ) u_mux_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(mux_in_valid), .addr(mux_in_addr),
    .bus(mux_bus), .bus_valid(mux_bus_valid)
  );

  mux_bus_decoder #(
    .ADDR_W(ADDR_W), .LSB_W(MUX_LSB_W), .W(MUX_W), .POLICY(MUX_POLICY),
    .LSB_SCHEME(MUX_LSB_SCHEME), .USE_TS(MUX_TS), .STRIDE(STRIDE)
  ) u_mux_dec (
    .clk(clk), .rst_n(rst_n), .bus_valid(mux_bus_valid), .bus(mux_bus),
    .addr(mux_out_addr), .addr_valid(mux_out_valid)
  );

endmodule
