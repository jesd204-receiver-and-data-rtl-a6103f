// tb_transport_layer: self-checking testbench of the transport layer.
//
// Random frames are packed the way a transmitter packs them (converter 0
// first, MSB first, N sample bits then control bits then tail bits) and fed
// with their frame positions. Checks: each complete frame gives exactly
// the original samples and control bits, one clock after its last octet;
// a frame that is cut (positions out of order) gives no output; gaps in
// in_valid are tolerated. Run for the default link and, through a second
// instance, for a link with control bits (M = 4, N = 12, CS = 1, F = 8).
module tb_transport_layer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // default link: F=4 M=2 N=14 NP=16 CS=0
  logic [7:0] oa; logic va; logic [1:0] ia;
  logic [1:0][13:0] sa; logic [1:0][0:0] ca; logic sva;
  transport_layer dut_a (.clk, .rst_n, .in_octet(oa), .in_valid(va), .in_idx(ia),
                         .samples(sa), .ctrl(ca), .sample_valid(sva));

  // link with a control bit: F=8 M=4 N=12 NP=16 CS=1 (three tail bits)
  logic [7:0] ob; logic vb; logic [2:0] ib;
  logic [3:0][11:0] sb; logic [3:0][0:0] cb; logic svb;
  transport_layer #(.F(8), .M(4), .N(12), .NP(16), .CS(1)) dut_b (
    .clk, .rst_n, .in_octet(ob), .in_valid(vb), .in_idx(ib),
    .samples(sb), .ctrl(cb), .sample_valid(svb));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frames_a = 0, frames_b = 0;
  initial begin
    va = 0; vb = 0; oa = 0; ob = 0; ia = 0; ib = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      logic [1:0][13:0] s; logic [7:0] fr [4];
      logic [3:0][11:0] s2; logic [3:0] c2; logic [7:0] fr2 [8];
      bit cut;
      for (int m = 0; m < 2; m++) begin
        s[m] = 14'($urandom);
        fr[2*m]   = s[m][13:6];
        fr[2*m+1] = {s[m][5:0], 2'($urandom)};   // tail bits are random junk
      end
      for (int m = 0; m < 4; m++) begin
        s2[m] = 12'($urandom); c2[m] = 1'($urandom);
        fr2[2*m]   = s2[m][11:4];
        fr2[2*m+1] = {s2[m][3:0], c2[m], 3'b000};
      end
      cut = ($urandom_range(0, 9) == 0);
      // default link
      for (int o = 0; o < 4; o++) begin
        if (cut && o == 1) continue;           // a lost octet
        while ($urandom_range(0, 3) == 0) begin va <= 0; @(posedge clk); end
        oa <= fr[o]; ia <= 2'(o); va <= 1;
        @(posedge clk);
        va <= 0;
        #1;
        if (o != 3) check(!sva, "no output inside a frame");
        else if (!cut) begin
          check(sva && sa == s, $sformatf("default frame %0d: %h expected %h", t, sa, s));
          frames_a++;
        end else check(!sva, "cut frame suppressed");
      end
      // the output pulse lasts one clock (checked just after the frame)
      // control-bit link
      for (int o = 0; o < 8; o++) begin
        ob <= fr2[o]; ib <= 3'(o); vb <= 1;
        @(posedge clk);
      end
      vb <= 0;
      #1;
      check(svb && sb == s2, "cs link samples");
      check(svb && {cb[3], cb[2], cb[1], cb[0]} == c2, "cs link control bits");
      frames_b++;
      @(posedge clk); #1;
      check(!svb && !sva, "valid is a single pulse");
    end
    check(frames_a > 400 && frames_b == 500, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
