// tb_transition_reduction: transition-activity experiment over the coding
// variants, on synthetic address streams.
//
// The coders are evaluated by the number of bus-line toggles they produce
// compared with sending the plain address. This testbench feeds one data
// address stream (two arrays read alternately, stack accesses, a few random
// addresses) to eight data-bus configurations (slice width 2, 3, 4; MTF or
// TR; with and without transition signaling) and one multiplexed stream
// (about 80% sequential instruction fetches with branches, plus data) to six
// multiplexed-bus configurations (MTF or TR on the upper bits, with INC-XOR,
// Delta-TS or nothing on the low four bits). Every encoder is paired with its
// decoder and each decoded address is checked against the original two
// cycles later. It prints the reduction of each configuration and checks the
// trends the scheme is built on: every configuration reduces toggles, wider
// slices reduce more than 2-bit slices, and a low-bit coder helps on the
// multiplexed stream compared with list coding alone.
// The streams are synthetic; real program traces give different numbers.
module tb_transition_reduction;
  import sol_pkg::*;

  localparam int NCYC = 10000;
  localparam int ND = 8;
  localparam int NM = 6;
  localparam int           DW  [ND] = '{2, 2, 3, 3, 4, 4, 4, 4};
  localparam list_policy_e DP  [ND] = '{POLICY_MTF, POLICY_MTF, POLICY_MTF, POLICY_TR,
                                        POLICY_MTF, POLICY_TR, POLICY_MTF, POLICY_TR};
  localparam bit           DTS [ND] = '{1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0};
  localparam list_policy_e MP  [NM] = '{POLICY_MTF, POLICY_TR, POLICY_MTF, POLICY_TR,
                                        POLICY_MTF, POLICY_TR};
  localparam lsb_scheme_e  ML  [NM] = '{LSB_INC_XOR, LSB_INC_XOR, LSB_DELTA_TS, LSB_DELTA_TS,
                                        LSB_DELTA_TS, LSB_DELTA_TS};
  localparam bit           MLSB[NM] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0};

  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        run;
  logic [31:0] d_addr, m_addr, d_a2, m_a2, d_a1, m_a1;
  logic        v1, v2;
  longint unsigned d_tog [ND];
  longint unsigned m_tog [NM];
  longint unsigned d_raw, m_raw;

  for (genvar g = 0; g < ND; g++) begin : g_data
    logic [31:0] bus, out, prev;
    logic        bv, ov;
    data_bus_encoder #(.ADDR_W(32), .W(DW[g]), .POLICY(DP[g]), .USE_TS(DTS[g])) u_enc (
      .clk(clk), .rst_n(rst_n), .in_valid(run), .addr(d_addr), .bus(bus), .bus_valid(bv));
    data_bus_decoder #(.ADDR_W(32), .W(DW[g]), .POLICY(DP[g]), .USE_TS(DTS[g])) u_dec (
      .clk(clk), .rst_n(rst_n), .bus_valid(bv), .bus(bus), .addr(out), .addr_valid(ov));
    always @(posedge clk) begin
      #1;
      if (rst_n && bv) begin
        d_tog[g] += 64'($countones(bus ^ prev));
        prev = bus;
      end
      if (rst_n && v2) begin
        checks++;
        if (!ov || out != d_a2) begin
          failures++;
          if (failures < 20) $display("FAIL data cfg %0d: got %h expected %h", g, out, d_a2);
        end
      end
    end
    initial prev = '0;
  end

  for (genvar g = 0; g < NM; g++) begin : g_mux
    logic [31:0] bus, out, prev;
    logic        bv, ov;
    if (MLSB[g]) begin : g_lsb
      mux_bus_encoder #(.ADDR_W(32), .LSB_W(4), .W(4), .POLICY(MP[g]), .LSB_SCHEME(ML[g])) u_enc (
        .clk(clk), .rst_n(rst_n), .in_valid(run), .addr(m_addr), .bus(bus), .bus_valid(bv));
      mux_bus_decoder #(.ADDR_W(32), .LSB_W(4), .W(4), .POLICY(MP[g]), .LSB_SCHEME(ML[g])) u_dec (
        .clk(clk), .rst_n(rst_n), .bus_valid(bv), .bus(bus), .addr(out), .addr_valid(ov));
    end else begin : g_plain
      data_bus_encoder #(.ADDR_W(32), .W(4), .POLICY(MP[g]), .USE_TS(1'b0)) u_enc (
        .clk(clk), .rst_n(rst_n), .in_valid(run), .addr(m_addr), .bus(bus), .bus_valid(bv));
      data_bus_decoder #(.ADDR_W(32), .W(4), .POLICY(MP[g]), .USE_TS(1'b0)) u_dec (
        .clk(clk), .rst_n(rst_n), .bus_valid(bv), .bus(bus), .addr(out), .addr_valid(ov));
    end
    always @(posedge clk) begin
      #1;
      if (rst_n && bv) begin
        m_tog[g] += 64'($countones(bus ^ prev));
        prev = bus;
      end
      if (rst_n && v2) begin
        checks++;
        if (!ov || out != m_a2) begin
          failures++;
          if (failures < 20) $display("FAIL mux cfg %0d: got %h expected %h", g, out, m_a2);
        end
      end
    end
    initial prev = '0;
  end

  initial begin
    repeat (NCYC + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- address streams (same shape as the end-to-end testbench) ----------
  logic [31:0] arr_a, arr_b, sp, pc, dptr;
  int unsigned idx;

  function automatic logic [31:0] data_stream();
    int unsigned r = $urandom % 20;
    if (r < 7)       return arr_a + (idx * 4);
    else if (r < 14) begin idx++; return arr_b + (idx * 4); end
    else if (r < 18) return sp - (($urandom % 16) * 4);
    else             return $urandom;
  endfunction

  function automatic logic [31:0] mux_stream();
    int unsigned r = $urandom % 100;
    if (r < 80) begin
      if (($urandom % 12) == 0) pc = pc + 32'($urandom % 64) - 32;
      else                      pc = pc + 1;
      return pc;
    end else if (r < 95) begin
      dptr = dptr + 1;
      return 32'h0040_0000 + (dptr % 256);
    end else begin
      return 32'h03ff_ff00 + ($urandom % 32);
    end
  endfunction

  function automatic string pname(int unsigned g, bit mux);
    list_policy_e p = mux ? MP[g] : DP[g];
    if (p == POLICY_MTF) return "MTF";
    return "TR";
  endfunction

  function automatic string lname(int unsigned g);
    if (!MLSB[g]) return "nothing";
    if (ML[g] == LSB_DELTA_TS) return "Delta-TS";
    return "INC-XOR";
  endfunction

  function automatic int pct(longint unsigned coded, longint unsigned raw);
    return int'(100 - (100 * coded) / raw);
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    arr_a = 32'h1000_0000; arr_b = 32'h7fff_8000; sp = 32'hefff_fff0;
    pc = 32'h0001_0000; dptr = 0; idx = 0;
    foreach (d_tog[i]) d_tog[i] = 0;
    foreach (m_tog[i]) m_tog[i] = 0;
    d_raw = 0; m_raw = 0;
    run = 1'b0; d_addr = '0; m_addr = '0;
    d_a1 = '0; d_a2 = '0; m_a1 = '0; m_a2 = '0; v1 = 1'b0; v2 = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      run = 1'b1;
      begin
        logic [31:0] nd, nm;
        nd = data_stream();
        nm = mux_stream();
        d_raw += 64'($countones(nd ^ d_addr));
        m_raw += 64'($countones(nm ^ m_addr));
        d_addr = nd;
        m_addr = nm;
      end
      @(posedge clk);
      v2 = v1; d_a2 = d_a1; m_a2 = m_a1;
      v1 = run; d_a1 = d_addr; m_a1 = m_addr;
    end
    @(negedge clk);
    run = 1'b0;
    repeat (3) begin
      @(posedge clk);
      v2 = v1; d_a2 = d_a1; m_a2 = m_a1;
      v1 = run;
    end
    #2;
    $display("data stream: plain %0d toggles", d_raw);
    for (int g = 0; g < ND; g++)
      $display("  W=%0d %s%s: %0d toggles, %0d%% fewer", DW[g], pname(g, 1'b0),
               DTS[g] ? "+TS" : "   ", d_tog[g], pct(d_tog[g], d_raw));
    $display("multiplexed stream: plain %0d toggles", m_raw);
    for (int g = 0; g < NM; g++)
      $display("  %s + %s: %0d toggles, %0d%% fewer", pname(g, 1'b1), lname(g),
               m_tog[g], pct(m_tog[g], m_raw));
    for (int g = 0; g < ND; g++) expect_true($sformatf("data cfg %0d reduces toggles", g), d_tog[g] < d_raw);
    for (int g = 0; g < NM; g++) expect_true($sformatf("mux cfg %0d reduces toggles", g), m_tog[g] < m_raw);
    expect_true("W=4 MTF+TS beats W=2 MTF+TS", d_tog[4] < d_tog[1]);
    expect_true("W=3 MTF+TS beats W=2 MTF+TS", d_tog[2] < d_tog[1]);
    expect_true("MTF+Delta-TS beats MTF alone on the multiplexed stream", m_tog[2] < m_tog[4]);
    expect_true("MTF+INC-XOR beats MTF alone on the multiplexed stream", m_tog[0] < m_tog[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
