// tb_jesd_rx_subsystem: end-to-end testbench of the complete receive path at
// its default parameters (F=4, K=8, M=2, N=14, FIFO 512, windows of 100).
//
// A behavioural transmitter sends a two-channel stream: channel 0 a coarse
// staircase sine (long runs for the run-length encoder), channel 1 a fine
// sine with noise (mostly single symbols). Sample values whose octets would
// equal a control character are nudged by one LSB. The sequence is:
//   1. reset, read the capture FIFO capability register;
//   2. synchronisation (CGS, ILA with configuration capture), data;
//   3. FIFO overflow seen, FIFO cleared, captured octets read back and
//      matched against the lane;
//   4. misplaced alignment characters until the link resynchronises;
//   5. decoder errors until the lane monitor requests synchronisation;
//   6. four forced /K/ characters until the link resynchronises;
//   7. a resync request followed by a corrupted ILA (ILA failure);
//   8. more data.
// Reference models check every output stream: samples against the frames
// sent (outside the deliberately corrupted frames), run-length tokens
// expanded back against the received samples, the sliding and block
// averages against exact integer averages of the received samples.
// Each mechanism is counted and the test fails if any never happened.
module tb_jesd_rx_subsystem;
  import jesd_pkg::*;
  localparam int F = 4, K = 8, M = 2, N = 14, NP = 16;
  localparam int SMA_WINDOW = 100, BMA_BLOCK = 100, FIFO_DEPTH = 512, RLE_CW = 8;

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

  // ------------------------------------------------------------ stimulus
  logic syncn, take, tx_k, orig_valid, inject_misplace = 0, bad_ila = 0;
  logic [7:0] tx_d, orig;
  logic [M-1:0][N-1:0] smp;
  int phase, n_repl_sent;
  jesd_tx_model #(.F(F), .K(K), .M(M), .N(N), .NP(NP)) u_tx (
    .clk, .rst_n, .syncn, .inject_misplace, .bad_ila, .next_samples(smp),
    .take, .dout(tx_d), .dout_k(tx_k), .orig, .orig_valid, .phase,
    .n_replaced(n_repl_sent));

  logic force_k = 0, din_err = 0, resync_req = 0;
  logic [7:0] din;
  logic din_k;
  assign din   = force_k ? CHAR_K : tx_d;
  assign din_k = force_k ? 1'b1 : tx_k;

  // --------------------------------------------------------------- DUT
  ll_state_e link_state;
  cs_state_e mon_cs_state;
  fs_state_e mon_fs_state;
  logic [ILA_CFG_OCTETS-1:0][7:0] ila_cfg;
  logic ila_cfg_valid, ev_replace, ev_misplaced, ev_resync, ev_ila_fail;
  logic mon_sync_request, mon_align_err, mon_aligned, mon_frame_start;
  logic [1:0] mon_octet_idx;
  logic [M-1:0][N-1:0] samples;
  logic [M-1:0][0:0] ctrl;
  logic sample_valid;
  logic [M-1:0] rle_valid, rle_is_run, sma_valid, bma_valid;
  logic [M-1:0][RLE_CW-1:0] rle_count;
  logic [M-1:0][N-1:0] rle_value, sma_data, bma_data;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr, fifo_empty, fifo_full, fifo_overflow;

  jesd_rx_subsystem dut (
    .clk, .rst_n, .din, .din_k, .din_err, .din_valid(1'b1), .resync_req, .syncn,
    .link_state, .ila_cfg, .ila_cfg_valid, .ev_replace, .ev_misplaced,
    .ev_resync, .ev_ila_fail, .mon_cs_state, .mon_fs_state, .mon_sync_request,
    .mon_align_err, .mon_aligned, .mon_octet_idx, .mon_frame_start,
    .samples, .ctrl, .sample_valid, .rle_valid, .rle_is_run, .rle_count,
    .rle_value, .sma_valid, .sma_data, .bma_valid, .bma_data,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .fifo_empty, .fifo_full, .fifo_overflow);

  // ------------------------------------------------------ sample source
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

  typedef struct { logic [M-1:0][N-1:0] s; bit dc; } frame_t;
  frame_t exp_q[$];
  int n_take = 0;
  bit disturb = 0;
  always @(posedge clk) if (rst_n && take) begin
    logic [M-1:0][N-1:0] x;
    frame_t fr;
    fr.s = smp;
    fr.dc = disturb;
    exp_q.push_back(fr);
    n_take++;
    x[0] = safe((int'(8191.0 + 8000.0 * $sin(2.0 * 3.14159265 * n_take / 512.0)) / 512) * 512);
    x[1] = safe(int'(8191.0 + 7000.0 * $cos(2.0 * 3.14159265 * n_take / 300.0)) + $urandom_range(0, 7));
    smp <= x;
  end

  // mark the frames already on the lane when a disturbance starts
  task automatic mark_in_flight();
    foreach (exp_q[i]) exp_q[i].dc = 1;
  endtask

  // ------------------------------------------- output checks (negedge)
  int n_samples = 0, n_checked = 0, since_resync = 1000;
  int n_cgs = 0, n_cfg = 0, n_rep = 0, n_mis = 0, n_res = 0, n_ila_fail = 0;
  int n_mon_sreq = 0, n_mon_data = 0, n_align_err = 0;
  int n_run = 0, n_lit = 0, n_sma = 0, n_bma = 0;
  logic syncn_d = 0, cfgv_d = 0, sreq_d = 1;
  cs_state_e cs_d = CS_INIT;
  logic [N-1:0] rle_q[M][$];
  int sma_w[M][$];
  longint sma_sum[M];
  longint bma_sum[M];
  int bma_cnt[M];
  int sma_exp[M][$], bma_exp[M][$];
  logic [7:0] lane_log[$];

  always @(negedge clk) begin
    if (!rst_n) begin
      syncn_d = 0; cfgv_d = 0; sreq_d = 1; cs_d = CS_INIT;
      for (int m = 0; m < M; m++) begin
        rle_q[m].delete(); sma_w[m].delete(); sma_exp[m].delete(); bma_exp[m].delete();
        sma_sum[m] = 0; bma_sum[m] = 0; bma_cnt[m] = 0;
      end
    end else begin
      lane_log.push_back(din);
      since_resync++;
      // mechanism counters
      if (syncn && !syncn_d) n_cgs++;
      if (ila_cfg_valid && !cfgv_d) begin
        n_cfg++;
        check(ila_cfg[4] == 8'(F - 1) && ila_cfg[5] == 8'(K - 1) && ila_cfg[6] == 8'(M - 1) &&
              ila_cfg[7] == 8'(N - 1) && ila_cfg[8][4:0] == 5'(NP - 1),
              $sformatf("ILA configuration %h", ila_cfg));
      end
      if (ev_replace) n_rep++;
      if (ev_misplaced) n_mis++;
      if (ev_resync) begin n_res++; since_resync = 0; end
      if (ev_ila_fail) n_ila_fail++;
      if (mon_sync_request && !sreq_d) n_mon_sreq++;
      if (mon_cs_state == CS_DATA && cs_d != CS_DATA) n_mon_data++;
      if (mon_align_err) n_align_err++;
      syncn_d = syncn; cfgv_d = ila_cfg_valid; sreq_d = mon_sync_request; cs_d = mon_cs_state;
      check(pready && !pslverr, "APB ready, no error");
      // samples against the frames sent
      if (link_state != LL_DATA) exp_q.delete();
      if (sample_valid) begin
        n_samples++;
        if (exp_q.size() == 0) begin
          check(since_resync < 4, "sample without a frame sent");
        end else begin
          frame_t e;
          e = exp_q.pop_front();
          if (!e.dc) begin
            n_checked++;
            check(samples == e.s, $sformatf("samples %h expected %h", samples, e.s));
          end
        end
      end
      for (int m = 0; m < M; m++) begin
        // run-length tokens expand to the received samples
        if (rle_valid[m]) begin
          if (rle_is_run[m]) begin
            n_run++;
            check(rle_count[m] >= 2, "run of at least two");
          end else begin
            n_lit++;
            check(rle_count[m] == 1, "literal count one");
          end
          for (int i = 0; i < int'(rle_count[m]); i++) begin
            logic [N-1:0] v;
            check(rle_q[m].size() > 0, "RLE token beyond the samples");
            v = (rle_q[m].size() > 0) ? rle_q[m].pop_front() : '0;
            check(v == rle_value[m], $sformatf("RLE ch%0d value %h expected %h", m, rle_value[m], v));
          end
        end
        // averages, produced one clock after their last sample
        if (sma_valid[m]) begin
          n_sma++;
          check(sma_exp[m].size() > 0, "unexpected SMA output");
          if (sma_exp[m].size() > 0)
            check(int'(sma_data[m]) == sma_exp[m].pop_front(), "SMA value");
        end else check(sma_exp[m].size() == 0, "missing SMA output");
        if (bma_valid[m]) begin
          n_bma++;
          check(bma_exp[m].size() > 0, "unexpected BMA output");
          if (bma_exp[m].size() > 0)
            check(int'(bma_data[m]) == bma_exp[m].pop_front(), "BMA value");
        end else check(bma_exp[m].size() == 0, "missing BMA output");
        // the next clock edge: samples enter, a resync clears the averages
        if (sample_valid) rle_q[m].push_back(samples[m]);
        if (ev_resync) begin
          sma_w[m].delete(); sma_sum[m] = 0; bma_sum[m] = 0; bma_cnt[m] = 0;
        end else if (sample_valid) begin
          sma_w[m].push_back(int'(samples[m]));
          sma_sum[m] += longint'(samples[m]);
          if (sma_w[m].size() > SMA_WINDOW) sma_sum[m] -= longint'(sma_w[m].pop_front());
          if (sma_w[m].size() == SMA_WINDOW) sma_exp[m].push_back(int'(sma_sum[m] / longint'(SMA_WINDOW)));
          bma_sum[m] += longint'(samples[m]);
          bma_cnt[m]++;
          if (bma_cnt[m] == BMA_BLOCK) begin
            bma_exp[m].push_back(int'(bma_sum[m] / longint'(BMA_BLOCK)));
            bma_sum[m] = 0; bma_cnt[m] = 0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------- APB
  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(posedge clk); #1 psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(posedge clk); #1 penable = 1;
    @(negedge clk) d = prdata;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk); #1 psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(posedge clk); #1 penable = 1;
    @(posedge clk); #1 psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic wait_data(input string what);
    int t = 0;
    while (!(link_state == LL_DATA && phase == 2) && t < 5000) begin @(posedge clk); t++; end
    check(link_state == LL_DATA, {"link back in DATA after ", what});
  endtask
  task automatic run_frames(input int n);
    repeat (n * F) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cap = 0, n_ovf = 0, n_clr = 0, n_fifo_words = 0;
  int n_misplace_resync = 0, n_k_resync = 0, n_ila_phase = 0;
  initial begin : seq
    logic [31:0] d;
    int r0, base, t;
    logic [7:0] got[$];
    smp = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // 1. capability register
    apb_read(8'h00, d);
    check(d == 32'hDEADBEEF, $sformatf("capability %h", d));
    if (d == 32'hDEADBEEF) n_cap++;
    // 2. synchronisation: SYNC~ released 6 octets after reset (IDLE, 4 /K/, check)
    t = 0;
    while (!syncn && t < 100) begin @(posedge clk); t++; end
    check(syncn, "SYNC~ released");
    wait_data("initial synchronisation");
    run_frames(1000);
    // 3. capture FIFO: overflowed long ago; clear it and read the lane back
    check(fifo_full && fifo_overflow, "FIFO full and overflow flag");
    apb_read(8'h04, d);
    check(d[31] && d[30], $sformatf("FIFO pop with overflow bit %h", d));
    if (d[30]) n_ovf++;
    apb_write(8'h04, 32'h1);
    r0 = lane_log.size();
    #1 check(fifo_empty && !fifo_overflow, "FIFO cleared");
    if (fifo_empty) n_clr++;
    for (int i = 0; i < 64; i++) begin
      apb_read(8'h04, d);
      check(d[31] && !d[30], "FIFO word valid, no overflow");
      got.push_back(d[7:0]);
    end
    base = -1;
    for (int s = r0 - 2; s <= r0 + 2; s++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 64; i++) if (lane_log[s + i] != got[i]) ok = 0;
      if (ok && base < 0) base = s;
    end
    check(base >= 0, "FIFO holds the lane octets after the clear, in order");
    if (base >= 0) n_fifo_words += 64;
    run_frames(500);
    // 4. misplaced alignment characters
    r0 = n_res;
    t = 0;
    disturb = 1; mark_in_flight();
    inject_misplace = 1;
    while (n_res == r0 && t < 400) begin @(posedge clk); t++; end
    inject_misplace = 0;
    check(n_res > r0, "resync on misplaced characters");
    if (n_res > r0) n_misplace_resync++;
    wait_data("misplaced characters");
    run_frames(8);
    disturb = 0;
    run_frames(800);
    // 5. decoder errors: the lane monitor asks for synchronisation
    r0 = n_mon_sreq;
    @(posedge clk); #1 din_err = 1;
    repeat (8) @(posedge clk);
    #1 din_err = 0;
    @(negedge clk);
    check(n_mon_sreq > r0, "monitor requests synchronisation on code errors");
    check(link_state == LL_DATA, "link unaffected by decoder error flags");
    run_frames(300);
    // 6. four /K/ in the data phase
    r0 = n_res;
    @(posedge clk); #1 disturb = 1; mark_in_flight(); force_k = 1;
    repeat (4) @(posedge clk);
    #1 force_k = 0;
    repeat (3) @(posedge clk);
    check(n_res > r0, "resync on four /K/");
    if (n_res > r0) n_k_resync++;
    wait_data("/K/ resync");
    run_frames(8);
    disturb = 0;
    run_frames(800);
    // 7. requested resync with a corrupted ILA
    r0 = n_ila_fail;
    @(posedge clk); #1 resync_req = 1; bad_ila = 1; disturb = 1; mark_in_flight();
    @(posedge clk); #1 resync_req = 0;
    t = 0;
    while (n_ila_fail == r0 && t < 2000) begin @(posedge clk); t++; end
    #1 bad_ila = 0;
    check(n_ila_fail > r0, "ILA failure detected");
    if (n_ila_fail > r0) n_ila_phase++;
    wait_data("ILA failure");
    run_frames(8);
    disturb = 0;
    // 8. more data
    run_frames(2000);
    @(negedge clk);
    // every mechanism must have happened
    check(n_cap > 0, "capability read");
    check(n_cgs >= 5, $sformatf("code group synchronisations %0d", n_cgs));
    check(n_cfg >= 4, $sformatf("configuration captures %0d", n_cfg));
    check(n_rep > 0, "character replacement");
    check(n_mis >= 4, "misplaced characters");
    check(n_misplace_resync > 0, "resync on misplaced characters");
    check(n_k_resync > 0, "resync on /K/");
    check(n_ila_phase > 0, "ILA failure");
    check(n_ovf > 0, "FIFO overflow");
    check(n_clr > 0, "FIFO clear");
    check(n_fifo_words > 0, "FIFO read back");
    check(n_mon_sreq >= 1, $sformatf("monitor sync requests %0d", n_mon_sreq));
    check(n_mon_data >= 2, $sformatf("monitor reached DATA %0d times", n_mon_data));
    check(n_align_err > 0, "monitor alignment errors");
    check(n_run > 0 && n_lit > 0, $sformatf("RLE runs %0d literals %0d", n_run, n_lit));
    check(n_sma > 1000 && n_bma > 40, $sformatf("SMA %0d BMA %0d", n_sma, n_bma));
    check(n_checked > 4000, $sformatf("samples checked %0d", n_checked));
    $display("samples=%0d checked=%0d cgs=%0d cfg=%0d replace=%0d misplaced=%0d resync=%0d ila_fail=%0d",
             n_samples, n_checked, n_cgs, n_cfg, n_rep, n_mis, n_res, n_ila_fail);
    $display("fifo: cap=%0d overflow=%0d clear=%0d words=%0d  monitor: sreq=%0d data=%0d align_err=%0d",
             n_cap, n_ovf, n_clr, n_fifo_words, n_mon_sreq, n_mon_data, n_align_err);
    $display("rle: runs=%0d literals=%0d  sma=%0d bma=%0d", n_run, n_lit, n_sma, n_bma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
