// sol_encoder: self-organizing-list encoder for one W-bit slice of an address bus.
//
// Instead of searching a list for the incoming symbol, the list position of
// every possible symbol is kept in its own W-bit register (code_q[x] is the
// current index of symbol x in an imaginary list). A select multiplexer picks
// the register of the incoming symbol; that code E is the value sent. E is
// fed back to every register, which computes its next position:
//   move-to-front: N = 0 if C == E, C + 1 if C < E, else C
//   transpose:     N = C - 1 if C == E and C != 0, C + 1 if C + 1 == E, else C
// Frequently used symbols therefore collect at small indices, which are close
// in Hamming distance. With USE_TS set, transition signaling is applied on top:
// the bus becomes bus XOR E, so a code of zero causes no transition at all.
//
// Interface: sym/in_valid in; bus/bus_valid out. One cycle latency: the bus
// value is registered (the output flip-flop). When in_valid is low the list is
// left alone and the bus holds its value. Reset puts symbol x at index x and
// clears the bus; the matching decoder must use the same reset state.
// The register-per-symbol structure and both update rules follow the
// published scheme; the valid handshake, identity reset ordering and the
// reset value of the bus are choices of this design.
module sol_encoder
  import sol_pkg::*;
#(
  parameter int unsigned  W      = 4,
  parameter list_policy_e POLICY = POLICY_MTF,
  parameter bit           USE_TS = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] sym,
  output logic [W-1:0] bus,
  output logic         bus_valid
);
  localparam int unsigned N = 1 << W;

  logic [W-1:0] code_q [N];
  logic [W-1:0] code_d [N];
  logic [W-1:0] enc;

  // SEL MUX: code of the incoming symbol
  assign enc = code_q[sym];

  // per-symbol reorganisation logic
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      code_d[i] = code_q[i];
      if (POLICY == POLICY_MTF) begin
        if (code_q[i] == enc)     code_d[i] = '0;
        else if (code_q[i] < enc) code_d[i] = code_q[i] + 1'b1;
      end else begin
        if (code_q[i] == enc && code_q[i] != '0)  code_d[i] = code_q[i] - 1'b1;
        else if (enc != '0 && code_q[i] == enc - 1'b1) code_d[i] = enc;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) code_q[i] <= W'(i);
      bus       <= '0;
      bus_valid <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        code_q <= code_d;
        bus    <= USE_TS ? (bus ^ enc) : enc;
      end
    end
  end

  // the codes must always be a permutation of 0..N-1
  logic [N-1:0] seen;
  always_comb begin
    seen = '0;
    for (int unsigned i = 0; i < N; i++) seen[code_q[i]] = 1'b1;
  end
  a_permutation : assert property (@(posedge clk) disable iff (!rst_n) &seen);

endmodule
