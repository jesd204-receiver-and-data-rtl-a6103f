// tb_jesd_top: end-to-end testbench of the receiver core (link + transport
// layer) against the transmitter model, at the default link parameters.
//
// The transmitter sends a two-channel 14-bit sine (channel 1 a quarter
// period ahead) with a little noise, after synchronisation and ILA. Samples
// whose octets would equal a control character are nudged by one LSB,
// because without an 8b/10b decoder such octets are indistinguishable from
// control characters. Checks: every frame sent after ILA comes out as the
// same two samples, in order; samples come exactly once every F clocks;
// character replacement happened and was undone; the link stays in DATA.
module tb_jesd_top;
  import jesd_pkg::*;
  localparam int F = 4, K = 8, M = 2, N = 14, NP = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic syncn, take, tx_k, orig_valid;
  logic [7:0] tx_d, orig;
  logic [M-1:0][N-1:0] smp;
  int phase, n_repl;
  jesd_tx_model #(.F(F), .K(K), .M(M), .N(N), .NP(NP)) u_tx (
    .clk, .rst_n, .syncn, .inject_misplace(1'b0), .bad_ila(1'b0),
    .next_samples(smp), .take, .dout(tx_d), .dout_k(tx_k),
    .orig, .orig_valid, .phase, .n_replaced(n_repl));

  ll_state_e link_state;
  logic [ILA_CFG_OCTETS-1:0][7:0] cfg; logic cfg_valid;
  logic [M-1:0][N-1:0] samples; logic [M-1:0][0:0] ctrl; logic sv;
  logic ev_rep, ev_mis, ev_res, ev_ila;
  jesd_top dut (.clk, .rst_n, .din(tx_d), .din_k(tx_k), .din_valid(1'b1), .resync_req(1'b0),
    .syncn, .link_state, .ila_cfg(cfg), .ila_cfg_valid(cfg_valid),
    .samples, .ctrl, .sample_valid(sv),
    .ev_replace(ev_rep), .ev_misplaced(ev_mis), .ev_resync(ev_res), .ev_ila_fail(ev_ila));

  function automatic bit is_ctrl(input logic [7:0] o);
    return o == 8'hBC || o == 8'h1C || o == 8'h9C || o == 8'h7C || o == 8'hFC;
  endfunction
  function automatic logic [N-1:0] safe(input int v);
    logic [N-1:0] s; logic [15:0] w;
    s = N'(v);
    w = {s, 2'b00};
    while (is_ctrl(w[15:8]) || is_ctrl(w[7:0])) begin s = s + 1'b1; w = {s, 2'b00}; end
    return s;
  endfunction

  int n = 0;
  logic [M-1:0][N-1:0] exp_q[$];
  always @(posedge clk) if (rst_n && take) begin
    logic [M-1:0][N-1:0] x;
    exp_q.push_back(smp);
    n++;
    x[0] = safe(int'(8191.0 + 8000.0 * $sin(2.0 * 3.14159265 * n / 256.0)) + $urandom_range(0, 3));
    x[1] = safe(int'(8191.0 + 8000.0 * $cos(2.0 * 3.14159265 * n / 256.0)));
    smp <= x;
  end

  int n_out = 0, n_rep = 0, last_t = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && sv) begin
      logic [M-1:0][N-1:0] e;
      check(exp_q.size() > 0, "sample without frame");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(samples == e, $sformatf("frame %0d: %h expected %h", n_out, samples, e));
      end
      if (last_t >= 0) check(cyc - last_t == F, $sformatf("sample spacing %0d", cyc - last_t));
      last_t = cyc;
      n_out++;
    end
    if (rst_n && ev_rep) n_rep++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    smp = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20000) @(posedge clk);
    #1;
    check(link_state == LL_DATA, "link in DATA");
    check(cfg_valid && cfg[4] == 8'(F - 1), "configuration captured");
    check(n_out > 4900, $sformatf("frames out %0d", n_out));
    check(n_rep > 0 && n_rep == n_repl, $sformatf("replacements %0d of %0d", n_rep, n_repl));
    check(exp_q.size() <= 3, $sformatf("in flight %0d", exp_q.size()));
    $display("frames=%0d replacements=%0d", n_out, n_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
