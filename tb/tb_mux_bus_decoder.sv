// tb_mux_bus_decoder: self-checking testbench for mux_bus_decoder.
//
// Instances: the default (Delta-TS on 4 low bits, 4-bit move-to-front slices above) and INC-XOR with transpose slices and transition signaling.
// Stimulus is a random address stream with locality (a few hot regions,
// sequential runs, occasional random addresses) and random idle cycles.
// Expected values come from sol_ref_pkg, which models the coding with
// explicit searched lists rather than the per-symbol registers of the RTL.
// Each output is checked one clock after its input (the one-cycle latency),
// including the valid flag. A watchdog ends the run if it hangs.
module tb_mux_bus_decoder;
  import sol_pkg::*;
  import sol_ref_pkg::*;
  localparam int NCYC = 3000;
  localparam int K = 2;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  logic in_valid = 1'b0;
  logic [63:0] stim = '0;
  logic [31:0] dut_in [K];
  logic [31:0] dut_out [K];
  logic dut_ov [K];
  longint unsigned expv [K];
  bus_model m [K];
  logic [32-1:0] o0;
  assign dut_out[0] = 32'(o0);
  mux_bus_decoder #() u_dut0 (.clk(clk), .rst_n(rst_n), .bus_valid(in_valid), .bus(dut_in[0][32-1:0]), .addr(o0), .addr_valid(dut_ov[0]));
  logic [32-1:0] o1;
  assign dut_out[1] = 32'(o1);
  mux_bus_decoder #(.LSB_SCHEME(LSB_INC_XOR), .POLICY(POLICY_TR), .USE_TS(1'b1)) u_dut1 (.clk(clk), .rst_n(rst_n), .bus_valid(in_valid), .bus(dut_in[1][32-1:0]), .addr(o1), .addr_valid(dut_ov[1]));

  // address stream with locality
  logic [31:0] hot [4] = '{32'h1000_0000, 32'h7fff_f000, 32'h2004_8000, 32'h0001_2340};
  logic [31:0] cur = 32'h1000_0000;
  function automatic logic [31:0] next_addr();
    int unsigned r = $urandom % 16;
    if (r < 6)       cur = cur + 1;
    else if (r < 13) cur = hot[$urandom % 4] + ($urandom % 64);
    else if (r < 14) cur = cur;
    else             cur = $urandom;
    return cur;
  endfunction

  initial begin
    repeat (NCYC * 2 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m[0] = new(32, 4, 1'b0, 1'b0, 1, 4, 1);
    expv[0] = 0;
    m[1] = new(32, 4, 1'b1, 1'b1, 2, 4, 1);
    expv[1] = 0;
    for (int k = 0; k < K; k++) dut_in[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      stim = 64'(next_addr());
      for (int k = 0; k < K; k++) begin
        if (k == 0) begin
          if (in_valid) begin
            dut_in[0] = 32'(m[0].encode(stim & ((64'd1 << 32) - 1)));
            expv[0] = stim & ((64'd1 << 32) - 1);
          end else begin
            dut_in[0] = $urandom;  // garbage while idle must be ignored
          end
        end
        if (k == 1) begin
          if (in_valid) begin
            dut_in[1] = 32'(m[1].encode(stim & ((64'd1 << 32) - 1)));
            expv[1] = stim & ((64'd1 << 32) - 1);
          end else begin
            dut_in[1] = $urandom;  // garbage while idle must be ignored
          end
        end
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (dut_ov[k] !== in_valid) begin
          failures++;
          $display("FAIL dut%0d cycle %0d: valid %0b expected %0b", k, c, dut_ov[k], in_valid);
        end
        checks++;
        if (64'(dut_out[k]) != expv[k]) begin
          failures++;
          if (failures < 20) $display("FAIL dut%0d cycle %0d: got %h expected %h", k, c, dut_out[k], expv[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
