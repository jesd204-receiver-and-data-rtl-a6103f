// tb_sma: self-checking testbench of the sliding moving average.
//
// A reference keeps the last WINDOW samples and computes
// floor(sum / WINDOW) directly (no running sum). Checks, at the default
// window of 100 samples: no output before the window is full; then one
// output per sample, one clock after it, equal to the reference; a constant
// input gives that constant; clear restarts the window. Inputs are a noisy
// ramp-and-hold signal of 14-bit samples with random gaps in in_valid.
module tb_sma;
  localparam int W = 14, WINDOW = 100;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic clear, in_valid, out_valid; logic [W-1:0] in_data, out_data;
  sma #(.W(W), .WINDOW(WINDOW)) dut (.clk, .rst_n, .clear, .in_valid, .in_data, .out_valid, .out_data);

  int win[$];
  int n_out = 0;

  task automatic push(input int x);
    int s;
    in_valid = 1; in_data = W'(x);
    @(posedge clk); #1;
    in_valid = 0;
    win.push_back(x);
    if (win.size() > WINDOW) void'(win.pop_front());
    if (win.size() == WINDOW) begin
      s = 0; foreach (win[i]) s += win[i];
      check(out_valid && int'(out_data) == s / WINDOW,
            $sformatf("avg %0d expected %0d", out_data, s / WINDOW));
      n_out++;
    end else check(!out_valid, "no output before the window is full");
    if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; check(!out_valid, "one output per sample"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 1500; i++) begin
      int base;
      base = (i % 500 < 250) ? i * 30 % 16000 : 9000;
      push(base + $urandom_range(0, 300));
    end
    // clear restarts the window
    clear = 1; @(posedge clk); #1; clear = 0;
    win.delete();
    for (int i = 0; i < 2 * WINDOW; i++) push(16383);
    check(out_data == 14'd16383, "constant full-scale input");
    check(n_out > 1400 + WINDOW, $sformatf("outputs %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
