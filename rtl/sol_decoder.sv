// sol_decoder: self-organizing-list decoder for one W-bit slice of an address bus.
//
// The decoder keeps the list itself: list_q[k] holds the symbol now at index k.
// The received code (after undoing transition signaling when USE_TS is set:
// code = bus XOR previous bus value) selects list_q[code] through the select
// multiplexer; that is the decoded symbol. The code then reorganises the list
// exactly as the encoder did:
//   move-to-front: index 0 takes the selected symbol (a 2^W-input mux) and
//                  every index 1..code takes its predecessor (2-input muxes)
//   transpose:     indices code-1 and code swap (nothing moves for code 0)
//
// Interface: bus/bus_valid in; sym/sym_valid out, registered, one cycle
// latency. Only cycles with bus_valid set update the list. Reset state (symbol
// k at index k, previous bus value 0) must equal the encoder's.
// The list organisation follows the published decoder; the registered output,
// the valid handshake and the reset values are choices of this design.
module sol_decoder
  import sol_pkg::*;
#(
  parameter int unsigned  W      = 4,
  parameter list_policy_e POLICY = POLICY_MTF,
  parameter bit           USE_TS = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_valid,
  input  logic [W-1:0] bus,
  output logic [W-1:0] sym,
  output logic         sym_valid
);
  localparam int unsigned N = 1 << W;

  logic [W-1:0] list_q [N];
  logic [W-1:0] list_d [N];
  logic [W-1:0] bus_prev_q;
  logic [W-1:0] code;
  logic [W-1:0] sym_d;

  assign code  = USE_TS ? (bus ^ bus_prev_q) : bus;
  assign sym_d = list_q[code];  // SEL MUX

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      list_d[k] = list_q[k];
      if (POLICY == POLICY_MTF) begin
        if (k == 0)                list_d[k] = sym_d;
        else if (W'(k) <= code)    list_d[k] = list_q[(k + N - 1) % N];
      end else begin
        if (code != '0) begin
          if (W'(k) == code)               list_d[k] = list_q[(k + N - 1) % N];
          else if (k + 1 < N && W'(k + 1) == code) list_d[k] = list_q[(k + 1) % N];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N; k++) list_q[k] <= W'(k);
      bus_prev_q <= '0;
      sym        <= '0;
      sym_valid  <= 1'b0;
    end else begin
      sym_valid <= bus_valid;
      if (bus_valid) begin
        list_q     <= list_d;
        bus_prev_q <= bus;
        sym        <= sym_d;
      end
    end
  end

endmodule
