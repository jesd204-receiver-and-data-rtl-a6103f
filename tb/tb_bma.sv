// tb_bma: self-checking testbench of the block moving average.
//
// Checks, at the default block of 100 samples: exactly one output per 100
// input samples, one clock after the last sample of the block, equal to
// floor(block sum / 100); nothing in between; clear restarts a block.
// Inputs are 14-bit sine-like samples with random gaps in in_valid.
module tb_bma;
  localparam int W = 14, BLOCK = 100;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic clear, in_valid, out_valid; logic [W-1:0] in_data, out_data;
  bma #(.W(W), .BLOCK(BLOCK)) dut (.clk, .rst_n, .clear, .in_valid, .in_data, .out_valid, .out_data);

  int sum = 0, cnt = 0, n_out = 0;

  task automatic push(input int x);
    in_valid = 1; in_data = W'(x);
    @(posedge clk); #1;
    in_valid = 0;
    sum += x; cnt++;
    if (cnt == BLOCK) begin
      check(out_valid && int'(out_data) == sum / BLOCK,
            $sformatf("block avg %0d expected %0d", out_data, sum / BLOCK));
      n_out++; sum = 0; cnt = 0;
    end else check(!out_valid, "no output inside a block");
    if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; check(!out_valid, "single pulse"); end
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
    for (int i = 0; i < 3072; i++)
      push(int'(8191.0 + 8000.0 * $sin(2.0 * 3.14159265 * i / 1024.0)) + $urandom_range(0, 100));
    // 3072 samples = 30 blocks and 72 samples; clear drops the partial block
    check(n_out == 30, $sformatf("blocks %0d", n_out));
    clear = 1; @(posedge clk); #1; clear = 0;
    sum = 0; cnt = 0;
    for (int i = 0; i < 2 * BLOCK; i++) push(i * 80);
    check(n_out == 32, "two blocks after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
