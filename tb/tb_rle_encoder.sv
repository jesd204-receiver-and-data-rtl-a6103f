// tb_rle_encoder: self-checking testbench of the run-length encoder.
//
// A reference encoder in the testbench turns each row into the expected
// token list (runs of equal symbols, split when the count would overflow,
// never across rows). Checks: the example row 0 1 1 1 1 1 0 gives the tokens
// 0, (5,1), 0; random binary rows (W = 1, 8-bit count) and random 2-bit
// symbol rows with a 3-bit count (forcing saturation) give exactly the
// reference tokens; the source is held while in_ready is low.
module tb_rle_encoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  typedef struct { bit run; int cnt; int val; } tok_t;

  // DUT A: binary rows
  logic va = 0, la = 0; logic [0:0] da = 0; logic ra, tva, trun_a; logic [7:0] tcnt_a; logic [0:0] tval_a;
  rle_encoder #(.W(1), .CW(8)) dut_a (.clk, .rst_n, .in_valid(va), .in_data(da), .in_last(la),
    .in_ready(ra), .tok_valid(tva), .tok_is_run(trun_a), .tok_count(tcnt_a), .tok_value(tval_a));
  // DUT B: 2-bit symbols, 3-bit count
  logic vb = 0, lb = 0; logic [1:0] db = 0; logic rb, tvb, trun_b; logic [2:0] tcnt_b; logic [1:0] tval_b;
  rle_encoder #(.W(2), .CW(3)) dut_b (.clk, .rst_n, .in_valid(vb), .in_data(db), .in_last(lb),
    .in_ready(rb), .tok_valid(tvb), .tok_is_run(trun_b), .tok_count(tcnt_b), .tok_value(tval_b));

  tok_t exp_a[$], exp_b[$];
  int got_a = 0, got_b = 0, sat_b = 0;

  always @(posedge clk) if (rst_n) begin
    if (tva) begin
      tok_t e;
      if (exp_a.size() == 0) check(0, "A: unexpected token");
      else begin
        e = exp_a.pop_front();
        check(trun_a == e.run && int'(tcnt_a) == e.cnt && int'(tval_a) == e.val,
              $sformatf("A: token run=%0d cnt=%0d val=%0d, expected %0d %0d %0d",
                        trun_a, tcnt_a, tval_a, e.run, e.cnt, e.val));
      end
      got_a++;
    end
    if (tvb) begin
      tok_t e;
      if (exp_b.size() == 0) check(0, "B: unexpected token");
      else begin
        e = exp_b.pop_front();
        check(trun_b == e.run && int'(tcnt_b) == e.cnt && int'(tval_b) == e.val,
              $sformatf("B: token run=%0d cnt=%0d val=%0d, expected %0d %0d %0d",
                        trun_b, tcnt_b, tval_b, e.run, e.cnt, e.val));
        if (e.cnt == 7) sat_b++;
      end
      got_b++;
    end
  end

  // reference: tokens of one row
  function automatic void ref_row(input int row[$], input int cmax, ref tok_t q[$]);
    int cur, cnt;
    cur = row[0]; cnt = 1;
    for (int i = 1; i < row.size(); i++) begin
      if (row[i] == cur && cnt < cmax) cnt++;
      else begin
        q.push_back('{cnt > 1, cnt, cur});
        cur = row[i]; cnt = 1;
      end
    end
    q.push_back('{cnt > 1, cnt, cur});
  endfunction

  task automatic send_a(input int row[$]);
    ref_row(row, 255, exp_a);
    foreach (row[i]) begin
      va <= 1; da <= 1'(row[i]); la <= (i == row.size() - 1);
      @(posedge clk); #1;
      while (!ra) begin @(posedge clk); #1; end
    end
  endtask
  task automatic send_b(input int row[$]);
    ref_row(row, 7, exp_b);
    foreach (row[i]) begin
      vb <= 1; db <= 2'(row[i]); lb <= (i == row.size() - 1);
      @(posedge clk); #1;
      while (!rb) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int row[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // the row of the example
    row = '{0, 1, 1, 1, 1, 1, 0};
    send_a(row);
    va <= 0;
    repeat (4) @(posedge clk);
    #1;
    check(got_a == 3, $sformatf("example row gave %0d tokens", got_a));
    // random binary rows with long runs
    for (int r = 0; r < 200; r++) begin
      int len, v;
      row.delete();
      len = $urandom_range(1, 88);
      v = $urandom_range(0, 1);
      for (int i = 0; i < len; i++) begin
        if ($urandom_range(0, 5) == 0) v = 1 - v;
        row.push_back(v);
      end
      send_a(row);
      if ($urandom_range(0, 3) == 0) begin va <= 0; @(posedge clk); #1; end
    end
    // 2-bit symbols, saturating count
    for (int r = 0; r < 200; r++) begin
      int len, v;
      row.delete();
      len = $urandom_range(1, 40);
      v = $urandom_range(0, 3);
      for (int i = 0; i < len; i++) begin
        if ($urandom_range(0, 9) == 0) v = $urandom_range(0, 3);
        row.push_back(v);
      end
      send_b(row);
    end
    vb <= 0; va <= 0;
    repeat (5) @(posedge clk);
    check(exp_a.size() == 0 && exp_b.size() == 0, "all tokens seen");
    check(sat_b > 0, "count saturation exercised");
    $display("tokens A=%0d B=%0d saturated=%0d", got_a, got_b, sat_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
