// tb_link_layer: self-checking testbench of the link-layer controller,
// driven by the transmitter model.
//
// Checks: SYNC~ is low from reset and rises after exactly four /K/ plus the
// octet that sees the count (six octets after reset); DATA is entered
// exactly after the four ILA multiframes (4*F*K octets after the first
// non-/K/ octet); the 14 configuration octets are captured; every data octet
// is delivered in order with the right frame position, /A/ and /F/
// substitutions undone; four misplaced /A/ force a resynchronisation
// and the link comes back; a corrupted ILA multiframe is rejected; four /K/
// in DATA force a resynchronisation. Samples are drawn at random but never
// produce an octet equal to a control character.
module tb_link_layer;
  import jesd_pkg::*;

  localparam int F = 4, K = 8, M = 2, N = 14, NP = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic syncn, inject, bad_ila, take, tx_k, orig_valid, resync_req;
  logic [7:0] tx_d, orig, tx_d_mux;
  logic tx_k_mux;
  logic [M-1:0][N-1:0] smp;
  int phase, n_repl;
  logic force_k;
  bit   no_repeat = 0;

  jesd_tx_model #(.F(F), .K(K), .M(M), .N(N), .NP(NP)) u_tx (
    .clk, .rst_n, .syncn, .inject_misplace(inject), .bad_ila,
    .next_samples(smp), .take, .dout(tx_d), .dout_k(tx_k),
    .orig, .orig_valid, .phase, .n_replaced(n_repl));

  assign tx_d_mux = force_k ? 8'hBC : tx_d;
  assign tx_k_mux = force_k ? 1'b1 : tx_k;

  ll_state_e state;
  logic [7:0] dout; logic dout_valid; logic [1:0] dout_idx;
  logic [ILA_CFG_OCTETS-1:0][7:0] cfg; logic cfg_valid;
  logic ev_rep, ev_mis, ev_res, ev_ila;

  link_layer #(.F(F), .K(K)) dut (
    .clk, .rst_n, .din(tx_d_mux), .din_k(tx_k_mux), .din_valid(1'b1),
    .resync_req, .syncn, .state, .dout, .dout_valid, .dout_idx,
    .ila_cfg(cfg), .ila_cfg_valid(cfg_valid),
    .ev_replace(ev_rep), .ev_misplaced(ev_mis), .ev_resync(ev_res),
    .ev_ila_fail(ev_ila));

  // random sample that never produces a control-character octet
  function automatic logic [N-1:0] safe_sample();
    logic [N-1:0] s; logic [15:0] w;
    do begin
      s = N'($urandom);
      w = {s, 2'b00};
    end while (is_ctrl(w[15:8]) || is_ctrl(w[7:0]));
    return s;
  endfunction
  function automatic bit is_ctrl(input logic [7:0] o);
    return o == 8'hBC || o == 8'h1C || o == 8'h9C || o == 8'h7C || o == 8'hFC;
  endfunction

  always @(posedge clk) if (take) begin
    // new samples for the next frame; repeat often to provoke replacement
    logic [M-1:0][N-1:0] n;
    n = smp;
    n[0] = safe_sample();
    if (!no_repeat && $urandom_range(0, 2) != 0) begin
      // keep the low bits of converter 1 so that octet 3 repeats
      logic [N-1:0] s;
      do s = {N'($urandom) & ~N'(6'h3f)} | (smp[1] & N'(6'h3f));
      while (is_ctrl(8'({s, 2'b00} >> 8)) || is_ctrl(8'({s, 2'b00})));
      n[1] = s;
    end else n[1] = safe_sample();
    smp <= n;
  end

  // expected octets
  logic [7:0] exp_q[$];
  int exp_idx;
  int n_out = 0, n_rep = 0, n_mis = 0, n_res = 0, n_ilaf = 0;
  always @(posedge clk) begin
    if (rst_n && orig_valid && dut.state == LL_DATA) exp_q.push_back(force_k ? 8'hBC : orig);
    if (rst_n && dout_valid) begin
      if (exp_q.size() == 0) check(0, "output without expected octet");
      else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        check(dout == e, $sformatf("octet %0d: got %02h expected %02h", n_out, dout, e));
      end
      check(int'(dout_idx) == exp_idx, "frame position");
      exp_idx = (exp_idx + 1) % F;
      n_out++;
    end
    // the link restarts: nothing in flight is expected any more
    if (dut.state == LL_IDLE) begin exp_q.delete(); exp_idx = 0; end
    if (!rst_n) begin n_rep = 0; n_mis = 0; n_res = 0; n_ilaf = 0; n_out = 0; end
    if (ev_rep) n_rep++;
    if (ev_mis) n_mis++;
    if (ev_res) n_res++;
    if (ev_ila) n_ilaf++;
  end

  // advance one clock and look at the state after it
  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic wait_state(input ll_state_e s, input int maxc, input string what);
    int c = 0;
    while (state != s && c < maxc) begin tick(); c++; end
    check(state == s, what);
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, first_nonk;
    inject = 0; bad_ila = 0; force_k = 0; resync_req = 0; exp_idx = 0;
    for (int m = 0; m < M; m++) smp[m] = safe_sample();
    repeat (3) tick();
    rst_n <= 1'b1;
    // SYNC~ timing
    c = 0;
    while (!syncn) begin tick(); c++; check(c < 50, "sync"); if (c >= 50) break; end
    check(c == 6, $sformatf("SYNC~ released after %0d octets, expected 6", c));
    check(state == LL_ILA, "in ILA after CGS");
    // ILA length: count octets from the first non-/K/ the receiver sees
    while (dut.din == 8'hBC) tick();
    c = 0;
    while (state == LL_ILA) begin tick(); c++; if (c > 1000) break; end
    check(c == 4 * F * K, $sformatf("ILA took %0d octets, expected %0d", c, 4 * F * K));
    check(state == LL_DATA, "DATA after ILA");
    check(cfg_valid, "configuration captured");
    check(cfg[4] == 8'(F - 1) && cfg[5] == 8'(K - 1) && cfg[6] == 8'(M - 1) && cfg[7] == 8'(N - 1),
          "configuration octets");
    repeat (2000) tick();
    check(state == LL_DATA, "still in DATA");
    check(n_rep > 20, $sformatf("character replacement happened (%0d)", n_rep));
    check(n_rep == n_repl, "every substitution undone");
    // three misplaced /A/ are tolerated; no correct replacement in between
    no_repeat = 1;
    repeat (4 * F) tick();
    for (int i = 0; i < 3; i++) begin
      tick(); inject <= 1; tick(); inject <= 0;
      repeat (2 * F) tick();
    end
    check(state == LL_DATA && n_res == 0, "three misplaced tolerated");
    // the fourth one resynchronises
    tick(); inject <= 1; tick(); inject <= 0;
    wait_state(LL_IDLE, 20, "fourth misplaced /A/ leaves DATA");
    tick();
    check(!syncn, "SYNC~ asserted again");
    check(n_res == 1, "resync pulse");
    check(n_mis == 4, $sformatf("misplaced count %0d", n_mis));
    no_repeat = 0;
    wait_state(LL_DATA, 2000, "link recovers after resync");
    // a bad ILA is rejected
    tick(); resync_req <= 1; bad_ila <= 1; tick(); resync_req <= 0; bad_ila <= 0;
    wait_state(LL_IDLE, 20, "resync request honoured");
    c = 0;
    while (n_ilaf == 0 && c < 2000) begin tick(); c++; end
    check(n_ilaf == 1, "bad ILA multiframe rejected");
    wait_state(LL_DATA, 3000, "link recovers after bad ILA");
    repeat (200) tick();
    // four /K/ in DATA
    tick(); force_k <= 1; repeat (4) tick(); force_k <= 0;
    wait_state(LL_IDLE, 20, "four /K/ in DATA resynchronise");
    wait_state(LL_DATA, 2000, "link recovers after /K/");
    repeat (100) tick();
    check(n_out > 2000, "octets delivered");
    $display("octets=%0d replaced=%0d misplaced=%0d resyncs=%0d ila_fail=%0d",
             n_out, n_rep, n_mis, n_res, n_ilaf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
