// tb_rle_workloads: the run-length encoder on inputs of the sizes and kinds
// that the reduction study used: binary images of 88x88, 250x250 and
// 488x467 pixels, a 14-bit sine of 3072 samples, a 16-bit triangle wave of
// 100,000 samples and a 16-bit audio-like signal of 191,000 samples.
//
// The images are generated here as stand-ins of the same size and character
// (horizontal stripes, diagonal stripes, filled round shapes); the signals
// are generated from their formulas (the sine is one period over its 3072
// samples). Each image is encoded row by row
// (in_last on the last pixel of a row), each signal in rows of 88 samples.
// Checks: every token equals the token of a reference encoder in the
// testbench; an image whose rows are constant gives one token per row
// when the row fits the count, and two when a row of 488 pixels exceeds the
// 8-bit count. The symbols-per-token ratio of each input is printed.
module tb_rle_workloads;
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

  typedef struct { bit run; int cnt; int val; } tok_t;

  // one encoder per symbol width: 1 (images), 14 (sine), 16 (triangle, audio)
  logic        v1 = 0, l1 = 0, r1, t1, run1; logic [0:0]  d1 = 0, val1; logic [7:0] c1;
  logic        v14 = 0, l14 = 0, r14, t14, run14; logic [13:0] d14 = 0, val14; logic [7:0] c14;
  logic        v16 = 0, l16 = 0, r16, t16, run16; logic [15:0] d16 = 0, val16; logic [7:0] c16;
  rle_encoder #(.W(1), .CW(8)) u_img (.clk, .rst_n, .in_valid(v1), .in_data(d1), .in_last(l1),
    .in_ready(r1), .tok_valid(t1), .tok_is_run(run1), .tok_count(c1), .tok_value(val1));
  rle_encoder #(.W(14), .CW(8)) u_s14 (.clk, .rst_n, .in_valid(v14), .in_data(d14), .in_last(l14),
    .in_ready(r14), .tok_valid(t14), .tok_is_run(run14), .tok_count(c14), .tok_value(val14));
  rle_encoder #(.W(16), .CW(8)) u_s16 (.clk, .rst_n, .in_valid(v16), .in_data(d16), .in_last(l16),
    .in_ready(r16), .tok_valid(t16), .tok_is_run(run16), .tok_count(c16), .tok_value(val16));

  tok_t exp1[$], exp14[$], exp16[$];
  int n1 = 0, n14 = 0, n16 = 0;

  task automatic cmp(input string who, ref tok_t q[$], input bit run, input int cnt, input int val);
    tok_t e;
    if (q.size() == 0) begin check(0, {who, ": unexpected token"}); return; end
    e = q.pop_front();
    check(run == e.run && cnt == e.cnt && val == e.val,
          $sformatf("%s: token run=%0d cnt=%0d val=%0d, expected %0d %0d %0d",
                    who, run, cnt, val, e.run, e.cnt, e.val));
  endtask

  always @(posedge clk) if (rst_n) begin
    if (t1)  begin cmp("image", exp1, run1, int'(c1), int'(val1)); n1++; end
    if (t14) begin cmp("14-bit", exp14, run14, int'(c14), int'(val14)); n14++; end
    if (t16) begin cmp("16-bit", exp16, run16, int'(c16), int'(val16)); n16++; end
  end

  function automatic void ref_row(input int row[$], ref tok_t q[$]);
    int cur, cnt;
    cur = row[0]; cnt = 1;
    for (int i = 1; i < row.size(); i++) begin
      if (row[i] == cur && cnt < 255) cnt++;
      else begin q.push_back('{cnt > 1, cnt, cur}); cur = row[i]; cnt = 1; end
    end
    q.push_back('{cnt > 1, cnt, cur});
  endfunction

  // ---------------------------------------------------------------- images
  // kind 0: horizontal stripes, 1: diagonal stripes, 2: filled disk,
  // 3: disk with a band through it
  function automatic int pixel(input int kind, input int x, input int y, input int w, input int h);
    int dx, dy, r;
    dx = x - w / 2; dy = y - h / 2; r = (w < h ? w : h) * 2 / 5;
    case (kind)
      0: return (y / 4) % 2;
      1: return ((x + y) / 6) % 2;
      2: return (dx * dx + dy * dy < r * r) ? 1 : 0;
      default: return ((dx * dx + dy * dy < r * r) || (y > h / 3 && y < h / 3 + 20)) ? 1 : 0;
    endcase
  endfunction

  task automatic send_image(input string name, input int kind, input int w, input int h,
                            input int exp_tokens);
    int t0, tok;
    t0 = n1 + exp1.size();
    for (int y = 0; y < h; y++) begin
      int row[$];
      for (int x = 0; x < w; x++) row.push_back(pixel(kind, x, y, w, h));
      ref_row(row, exp1);
      foreach (row[i]) begin
        v1 <= 1; d1 <= 1'(row[i]); l1 <= (i == row.size() - 1);
        @(posedge clk); #1;
        while (!r1) begin @(posedge clk); #1; end
      end
    end
    v1 <= 0; l1 <= 0;
    repeat (3) @(posedge clk); #1;
    check(exp1.size() == 0, {name, ": all tokens out"});
    tok = n1 - t0;
    if (exp_tokens > 0) check(tok == exp_tokens, $sformatf("%s: %0d tokens, expected %0d", name, tok, exp_tokens));
    $display("%-28s %0dx%0d pixels -> %0d tokens, %.2f pixels per token", name, w, h, tok,
             real'(w * h) / real'(tok));
  endtask

  // --------------------------------------------------------------- signals
  task automatic send14(input string name, input int n);
    int sig[$], t0;
    t0 = n14 + exp14.size();
    for (int i = 0; i < n; i++) sig.push_back(int'(8191.0 + 8000.0 * $sin(2.0 * 3.14159265 * i / 3072.0)));
    for (int b = 0; b < n; b += 88) begin
      int row[$];
      row = sig[b:((b + 87 < n) ? b + 87 : n - 1)];
      ref_row(row, exp14);
      foreach (row[i]) begin
        v14 <= 1; d14 <= 14'(row[i]); l14 <= (i == row.size() - 1);
        @(posedge clk); #1;
        while (!r14) begin @(posedge clk); #1; end
      end
    end
    v14 <= 0; l14 <= 0;
    repeat (3) @(posedge clk); #1;
    check(exp14.size() == 0, {name, ": all tokens out"});
    $display("%-28s %0d samples -> %0d tokens, %.2f samples per token", name, n, n14 - t0,
             real'(n) / real'(n14 - t0));
  endtask

  task automatic send16(input string name, input int kind, input int n);
    int sig[$], t0, a;
    t0 = n16 + exp16.size();
    a = 32768;
    for (int i = 0; i < n; i++) begin
      if (kind == 0) begin
        // triangle, 4096 steps up and down over 10,000 samples
        int p;
        p = i % 10000;
        sig.push_back((p < 5000) ? p * 4096 / 5000 : (10000 - p) * 4096 / 5000);
      end else begin
        // audio-like: a random walk with silent stretches
        if ((i / 4000) % 5 != 4) begin
          a = a + int'($urandom_range(0, 16)) - 8;
          if (a < 0) a = 0;
          if (a > 65535) a = 65535;
        end
        sig.push_back(a);
      end
    end
    for (int b = 0; b < n; b += 88) begin
      int row[$];
      row = sig[b:((b + 87 < n) ? b + 87 : n - 1)];
      ref_row(row, exp16);
      foreach (row[i]) begin
        v16 <= 1; d16 <= 16'(row[i]); l16 <= (i == row.size() - 1);
        @(posedge clk); #1;
        while (!r16) begin @(posedge clk); #1; end
      end
    end
    v16 <= 0; l16 <= 0;
    repeat (3) @(posedge clk); #1;
    check(exp16.size() == 0, {name, ": all tokens out"});
    $display("%-28s %0d samples -> %0d tokens, %.2f samples per token", name, n, n16 - t0,
             real'(n) / real'(n16 - t0));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // constant rows: one token each (88 <= 255); 488 > 255 gives two per row
    send_image("horizontal pattern", 0, 88, 88, 88);
    send_image("angled pattern", 1, 88, 88, 0);
    send_image("round shape (small)", 2, 88, 88, 0);
    send_image("round shape (Earth size)", 2, 250, 250, 0);
    send_image("horizontal pattern, 488 wide", 0, 488, 467, 2 * 467);
    send_image("shape and band, 488x467", 3, 488, 467, 0);
    send14("sine 14x3072", 3072);
    send16("triangle 16x100,000", 0, 100000);
    send16("audio-like 16x191,000", 1, 191000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
