// tb_avg_workloads: the sliding and block averages on the signals of the
// reduction study, window and block 100: a noisy 14-bit sine of 3072
// samples and a 16-bit triangle wave of 100,000 samples (both averages),
// and a 16-bit audio-like signal of 191,000 samples (both averages, the
// sliding one counted).
//
// Signals are generated from their formulas, samples fed one per clock.
// Checks: every output equals floor(sum/100) of the right 100 samples,
// computed here without a running sum; the number of outputs is
// n - 99 for the sliding average and floor(n/100) for the block average;
// the sliding average of the noisy sine is smoother than its input (mean
// step between neighbouring outputs at most a quarter of the input's).
module tb_avg_workloads;
  localparam int WIN = 100;
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

  logic v14 = 0, v16 = 0;
  logic [13:0] d14 = 0;
  logic [15:0] d16 = 0;
  logic sv14, bv14, sv16, bv16;
  logic [13:0] so14, bo14;
  logic [15:0] so16, bo16;
  sma #(.W(14), .WINDOW(WIN)) u_sma14 (.clk, .rst_n, .clear(1'b0), .in_valid(v14), .in_data(d14),
    .out_valid(sv14), .out_data(so14));
  bma #(.W(14), .BLOCK(WIN)) u_bma14 (.clk, .rst_n, .clear(1'b0), .in_valid(v14), .in_data(d14),
    .out_valid(bv14), .out_data(bo14));
  sma #(.W(16), .WINDOW(WIN)) u_sma16 (.clk, .rst_n, .clear(1'b0), .in_valid(v16), .in_data(d16),
    .out_valid(sv16), .out_data(so16));
  bma #(.W(16), .BLOCK(WIN)) u_bma16 (.clk, .rst_n, .clear(1'b0), .in_valid(v16), .in_data(d16),
    .out_valid(bv16), .out_data(bo16));

  int sig[$];
  int es14[$], eb14[$], es16[$], eb16[$];
  int ns14 = 0, nb14 = 0, ns16 = 0, nb16 = 0;
  longint step_out = 0;
  int last_out = -1;

  always @(posedge clk) if (rst_n) begin
    if (sv14) begin
      check(es14.size() > 0 && int'(so14) == es14.pop_front(), "14-bit sliding average");
      if (last_out >= 0) step_out += (int'(so14) > last_out) ? int'(so14) - last_out : last_out - int'(so14);
      last_out = int'(so14);
      ns14++;
    end
    if (bv14) begin check(eb14.size() > 0 && int'(bo14) == eb14.pop_front(), "14-bit block average"); nb14++; end
    if (sv16) begin check(es16.size() > 0 && int'(so16) == es16.pop_front(), "16-bit sliding average"); ns16++; end
    if (bv16) begin check(eb16.size() > 0 && int'(bo16) == eb16.pop_front(), "16-bit block average"); nb16++; end
  end

  // expected outputs of sig, computed directly
  task automatic expect_all(ref int s_q[$], ref int b_q[$]);
    for (int i = WIN - 1; i < sig.size(); i++) begin
      longint sum;
      sum = 0;
      for (int j = i - WIN + 1; j <= i; j++) sum += longint'(sig[j]);
      s_q.push_back(int'(sum / longint'(WIN)));
      if ((i + 1) % WIN == 0) b_q.push_back(int'(sum / longint'(WIN)));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint step_in;
    int a;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // noisy sine, 14 bits, 3072 samples
    step_in = 0;
    for (int i = 0; i < 3072; i++) begin
      int s;
      s = int'(8191.0 + 6000.0 * $sin(2.0 * 3.14159265 * i / 1024.0)) + int'($urandom_range(0, 800)) - 400;
      sig.push_back(s);
      if (i > 0) step_in += (s > sig[i-1]) ? s - sig[i-1] : sig[i-1] - s;
    end
    expect_all(es14, eb14);
    foreach (sig[i]) begin v14 = 1; d14 = 14'(sig[i]); @(posedge clk); #1; end
    v14 = 0;
    repeat (3) @(posedge clk); #1;
    check(ns14 == 3072 - WIN + 1 && nb14 == 3072 / WIN, $sformatf("sine: %0d sliding, %0d block outputs", ns14, nb14));
    check(step_out * 4 <= step_in, $sformatf("sine smoothed: mean step %0d in, %0d out",
          step_in / 3071, step_out / (ns14 - 1)));
    $display("noisy sine 14x3072: %0d sliding averages, %0d block averages; mean step %0d -> %0d",
             ns14, nb14, step_in / 3071, step_out / (ns14 - 1));
    // triangle, 16 bits, 100,000 samples: block average
    sig.delete();
    for (int i = 0; i < 100000; i++) begin
      int p;
      p = i % 10000;
      sig.push_back((p < 5000) ? p * 60000 / 5000 : (10000 - p) * 60000 / 5000);
    end
    expect_all(es16, eb16);
    foreach (sig[i]) begin v16 = 1; d16 = 16'(sig[i]); @(posedge clk); #1; end
    v16 = 0;
    repeat (3) @(posedge clk); #1;
    check(nb16 == 1000, $sformatf("triangle: %0d block outputs", nb16));
    $display("triangle 16x100,000: %0d block averages", nb16);
    check(es16.size() == 0 && eb16.size() == 0, "triangle: all outputs seen");
    // audio-like signal, 16 bits, 191,000 samples: sliding average, after a
    // reset that empties the windows
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    ns16 = 0; nb16 = 0;
    sig.delete();
    a = 32768;
    for (int i = 0; i < 191000; i++) begin
      a = a + int'($urandom_range(0, 200)) - 100;
      if (a < 0) a = 0;
      if (a > 65535) a = 65535;
      sig.push_back(a);
    end
    expect_all(es16, eb16);
    foreach (sig[i]) begin v16 = 1; d16 = 16'(sig[i]); @(posedge clk); #1; end
    v16 = 0;
    repeat (3) @(posedge clk); #1;
    check(ns16 == 191000 - WIN + 1, $sformatf("audio: %0d sliding outputs", ns16));
    $display("audio-like 16x191,000: %0d sliding averages", ns16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
