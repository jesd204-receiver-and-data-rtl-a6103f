// tb_jesd_spikes: the effect of recognising control characters by octet
// value alone, and its cure.
//
// Two transmitter/receiver pairs run the same kind of stimulus: random
// 14-bit samples, so that data octets equal to a control character value
// (0x7C, 0xFC, 0xBC, ...) occur often. Receiver A has CHECK_K_FLAG = 1 and
// uses the control flag that an 8b/10b decoder provides; receiver B has the
// default CHECK_K_FLAG = 0 and compares octet values only.
// Checks for A: every frame is recovered exactly, nothing is ever counted
// as misplaced, the link never resynchronises. Checks for B: frames whose
// octets hold no control character value are recovered exactly; corrupted
// samples ("spikes") do occur, and only in frames that hold such a value.
module tb_jesd_spikes;
  import jesd_pkg::*;
  localparam int F = 4, K = 8, M = 2, N = 14, NP = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic bit is_ctrl(input logic [7:0] o);
    return o == CHAR_K || o == CHAR_R || o == CHAR_Q || o == CHAR_A || o == CHAR_F;
  endfunction
  function automatic bit frame_has_ctrl(input logic [M-1:0][N-1:0] s);
    logic [15:0] w;
    for (int m = 0; m < M; m++) begin
      w = {s[m], 2'b00};
      if (is_ctrl(w[15:8]) || is_ctrl(w[7:0])) return 1;
    end
    return 0;
  endfunction

  typedef struct { logic [M-1:0][N-1:0] s; bit hazard; } frame_t;

  // ------------------------------------------------------------ pair A and B
  logic [1:0] syncn, take, tx_k, ov;
  logic [7:0] tx_d [2], orig [2];
  logic [M-1:0][N-1:0] smp [2];
  int phase [2], nrep [2];
  ll_state_e st [2];
  logic [ILA_CFG_OCTETS-1:0][7:0] cfg [2];
  logic [1:0] cfgv, sv, ev_rep, ev_mis, ev_res, ev_ila;
  logic [M-1:0][N-1:0] samples [2];
  logic [M-1:0][0:0] ctrl [2];

  for (genvar p = 0; p < 2; p++) begin : g_pair
    jesd_tx_model #(.F(F), .K(K), .M(M), .N(N), .NP(NP)) u_tx (
      .clk, .rst_n, .syncn(syncn[p]), .inject_misplace(1'b0), .bad_ila(1'b0),
      .next_samples(smp[p]), .take(take[p]), .dout(tx_d[p]), .dout_k(tx_k[p]),
      .orig(orig[p]), .orig_valid(ov[p]), .phase(phase[p]), .n_replaced(nrep[p]));
    jesd_top #(.F(F), .K(K), .M(M), .N(N), .NP(NP), .CHECK_K_FLAG(p == 0)) u_rx (
      .clk, .rst_n, .din(tx_d[p]), .din_k(tx_k[p]), .din_valid(1'b1), .resync_req(1'b0),
      .syncn(syncn[p]), .link_state(st[p]), .ila_cfg(cfg[p]), .ila_cfg_valid(cfgv[p]),
      .samples(samples[p]), .ctrl(ctrl[p]), .sample_valid(sv[p]),
      .ev_replace(ev_rep[p]), .ev_misplaced(ev_mis[p]), .ev_resync(ev_res[p]),
      .ev_ila_fail(ev_ila[p]));
  end

  frame_t exp_q [2][$];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) if (take[p]) begin
      frame_t fr;
      logic [M-1:0][N-1:0] x;
      fr.s = smp[p];
      fr.hazard = frame_has_ctrl(smp[p]);
      exp_q[p].push_back(fr);
      for (int m = 0; m < M; m++) x[m] = N'($urandom());
      smp[p] <= x;
    end
  end

  int n_ok [2], n_bad [2], n_hazard [2], n_mis [2], n_res [2], n_rep [2];
  initial for (int p = 0; p < 2; p++) begin
    n_ok[p] = 0; n_bad[p] = 0; n_hazard[p] = 0; n_mis[p] = 0; n_res[p] = 0; n_rep[p] = 0;
  end
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) begin
      if (ev_mis[p]) n_mis[p]++;
      if (ev_res[p]) n_res[p]++;
      if (ev_rep[p]) n_rep[p]++;
      if (st[p] != LL_DATA) exp_q[p].delete();
      if (sv[p] && exp_q[p].size() > 0) begin
        frame_t e;
        e = exp_q[p].pop_front();
        if (e.hazard) n_hazard[p]++;
        if (samples[p] == e.s) n_ok[p]++;
        else n_bad[p]++;
        check(samples[p] == e.s || (p == 1 && e.hazard),
              $sformatf("receiver %s: frame %h came out as %h", p == 0 ? "A" : "B", e.s, samples[p]));
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    smp[0] = '0; smp[1] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (80000) @(posedge clk);
    @(negedge clk);
    check(n_ok[0] > 19000 && n_bad[0] == 0, $sformatf("A: %0d frames exact, %0d wrong", n_ok[0], n_bad[0]));
    check(n_mis[0] == 0 && n_res[0] == 0, "A: no misplacement, no resync");
    check(n_rep[0] == nrep[0] && n_rep[0] > 0, $sformatf("A: %0d of %0d replacements undone", n_rep[0], nrep[0]));
    check(n_hazard[0] > 1000, $sformatf("A: %0d frames held control character values", n_hazard[0]));
    check(n_bad[1] > 0, $sformatf("B: %0d corrupted frames (spikes)", n_bad[1]));
    check(n_ok[1] > 10000, $sformatf("B: %0d frames exact", n_ok[1]));
    $display("A (decoder flag): %0d exact, %0d wrong, %0d with control values; misplaced %0d, resync %0d",
             n_ok[0], n_bad[0], n_hazard[0], n_mis[0], n_res[0]);
    $display("B (value only):   %0d exact, %0d wrong, %0d with control values; misplaced %0d, resync %0d",
             n_ok[1], n_bad[1], n_hazard[1], n_mis[1], n_res[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
