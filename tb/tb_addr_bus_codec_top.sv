// tb_addr_bus_codec_top: end-to-end testbench of both address bus links at
// their default sizes (32-bit buses, 4-bit list slices, 4-bit Delta-TS).
//
// Data link: a data address stream that alternates between two arrays, a
// stack region and occasional random addresses. Multiplexed link: about 80%
// instruction fetches (sequential, with taken branches) interleaved with data
// addresses. Both links get random idle cycles.
// Checked every cycle: the coded bus against sol_ref_pkg's list model one
// cycle after the input, and the decoded address against the original two
// cycles after the input, valid flags included.
// Counted, and each required to happen at least once: idle cycles, a slice
// symbol already at the front of its list (code 0), a slice symbol moved to
// the front, a sequential low-bit address (Delta gives zero), a non-sequential
// one, and a wrap of the low four bits. Finally the coded buses must toggle
// fewer lines than the plain addresses would: the point of the coding.
module tb_addr_bus_codec_top;
  import sol_pkg::*;
  import sol_ref_pkg::*;

  localparam int NCYC = 20000;

  logic clk;
  logic rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        d_in_valid, m_in_valid;
  logic [31:0] d_in_addr,  m_in_addr;
  logic [31:0] d_bus, m_bus, d_out, m_out;
  logic        d_bus_valid, m_bus_valid, d_out_valid, m_out_valid;

  addr_bus_codec_top u_top (
    .clk(clk), .rst_n(rst_n),
    .data_in_valid(d_in_valid), .data_in_addr(d_in_addr),
    .data_bus(d_bus), .data_bus_valid(d_bus_valid),
    .data_out_addr(d_out), .data_out_valid(d_out_valid),
    .mux_in_valid(m_in_valid), .mux_in_addr(m_in_addr),
    .mux_bus(m_bus), .mux_bus_valid(m_bus_valid),
    .mux_out_addr(m_out), .mux_out_valid(m_out_valid)
  );

  initial begin
    repeat (NCYC + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- address generators -------------------------------------------------
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
      if (($urandom % 12) == 0) pc = pc + 32'($urandom % 64) - 32;  // branch
      else                      pc = pc + 1;
      return pc;
    end else if (r < 95) begin
      dptr = dptr + 1;
      return 32'h0040_0000 + (dptr % 256);
    end else begin
      return 32'h03ff_ff00 + ($urandom % 32);
    end
  endfunction

  // ---- checking -----------------------------------------------------------
  bus_model dm, mm;
  logic        dv1, dv2, mv1, mv2;
  logic [31:0] da1, da2, ma1, ma2;
  longint unsigned d_exp_bus, m_exp_bus;
  logic [31:0] d_exp_out, m_exp_out, d_prev_addr, m_prev_addr, d_prev_bus, m_prev_bus;
  int unsigned d_raw_tog, d_bus_tog, m_raw_tog, m_bus_tog;
  int unsigned n_idle, n_wrap;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int unsigned n);
    checks++;
    $display("COUNT %s = %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    dm = new(32, 4, 1'b0, 1'b1);              // data link defaults
    mm = new(32, 4, 1'b0, 1'b0, 1, 4, 1);     // multiplexed link defaults
    arr_a = 32'h1000_0000; arr_b = 32'h7fff_8000; sp = 32'hefff_fff0;
    pc = 32'h0001_0000; dptr = 0; idx = 0;
    {dv1, dv2, mv1, mv2} = '0;
    {da1, da2, ma1, ma2} = '0;
    d_exp_bus = 0; m_exp_bus = 0; d_exp_out = 0; m_exp_out = 0;
    d_prev_addr = 0; m_prev_addr = 0; d_prev_bus = 0; m_prev_bus = 0;
    {d_raw_tog, d_bus_tog, m_raw_tog, m_bus_tog, n_idle, n_wrap} = '0;
    rst_n = 1'b0;
    d_in_valid = 1'b0; m_in_valid = 1'b0; d_in_addr = '0; m_in_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      d_in_valid = ($urandom % 8) != 0;
      m_in_valid = ($urandom % 8) != 0;
      if (!d_in_valid) n_idle++;
      d_in_addr = d_in_valid ? data_stream() : 32'($urandom);
      m_in_addr = m_in_valid ? mux_stream()  : 32'($urandom);
      if (d_in_valid) begin
        d_exp_bus = dm.encode(64'(d_in_addr));
        d_raw_tog += popcount64(64'(d_in_addr ^ d_prev_addr));
        d_prev_addr = d_in_addr;
      end
      if (m_in_valid) begin
        if (m_in_addr[3:0] == 4'h0 && m_prev_addr[3:0] == 4'hf) n_wrap++;
        m_exp_bus = mm.encode(64'(m_in_addr));
        m_raw_tog += popcount64(64'(m_in_addr ^ m_prev_addr));
        m_prev_addr = m_in_addr;
      end
      @(posedge clk);
      // stage 2 (decoder output) expectations come from the previous cycle
      dv2 = dv1; da2 = da1; mv2 = mv1; ma2 = ma1;
      dv1 = d_in_valid; da1 = d_in_addr; mv1 = m_in_valid; ma1 = m_in_addr;
      if (dv2) d_exp_out = da2;
      if (mv2) m_exp_out = ma2;
      #1;
      check("data bus valid", 32'(d_bus_valid), 32'(dv1));
      check("data bus", d_bus, 32'(d_exp_bus));
      check("data out valid", 32'(d_out_valid), 32'(dv2));
      check("data out addr", d_out, d_exp_out);
      check("mux bus valid", 32'(m_bus_valid), 32'(mv1));
      check("mux bus", m_bus, 32'(m_exp_bus));
      check("mux out valid", 32'(m_out_valid), 32'(mv2));
      check("mux out addr", m_out, m_exp_out);
      d_bus_tog += popcount64(64'(d_bus ^ d_prev_bus));
      m_bus_tog += popcount64(64'(m_bus ^ m_prev_bus));
      d_prev_bus = d_bus;
      m_prev_bus = m_bus;
    end

    need("idle cycles", n_idle);
    need("data slice symbol already at front", dm.n_front);
    need("data slice symbol moved to front", dm.n_moved);
    need("mux slice symbol already at front", mm.n_front);
    need("mux slice symbol moved to front", mm.n_moved);
    need("mux low bits sequential", mm.n_seq);
    need("mux low bits non-sequential", mm.n_nonseq);
    need("mux low bits wrap", n_wrap);
    $display("COUNT data toggles plain=%0d coded=%0d (%0d%% fewer)", d_raw_tog, d_bus_tog,
             100 - (100 * d_bus_tog) / d_raw_tog);
    $display("COUNT mux  toggles plain=%0d coded=%0d (%0d%% fewer)", m_raw_tog, m_bus_tog,
             100 - (100 * m_bus_tog) / m_raw_tog);
    checks++;
    if (d_bus_tog >= d_raw_tog) begin failures++; $display("FAIL data coding did not reduce toggles"); end
    checks++;
    if (m_bus_tog >= m_raw_tog) begin failures++; $display("FAIL mux coding did not reduce toggles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
