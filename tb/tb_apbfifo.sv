// tb_apbfifo: self-checking testbench of the APB capture FIFO.
//
// Checks: the capability register reads 0xDEADBEEF; an empty FIFO's data
// register reads zero; words come out in the order written, with the
// valid flag; filling beyond DEPTH drops words and sets the overflow flag;
// the clear command empties the FIFO and clears the flag; random
// interleaving of pushes and APB reads against a reference queue. A small
// DEPTH keeps the run short.
module tb_apbfifo;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic wr_en = 0; logic [7:0] wdata = 0;
  logic psel = 0, penable = 0, pwrite = 0; logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata; logic pready, pslverr, empty, full, overflow;

  apbfifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wdata, .psel, .penable,
    .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr, .empty, .full, .overflow);

  logic [7:0] ref_q[$];
  always @(posedge clk) if (rst_n && wr_en && ref_q.size() < DEPTH) ref_q.push_back(wdata);

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(posedge clk); psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk); penable <= 1;
    #1; d = prdata;
    check(pready && !pslverr, "pready/pslverr");
    @(posedge clk); psel <= 0; penable <= 0;
  endtask
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk); psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d;
    @(posedge clk); penable <= 1;
    @(posedge clk); psel <= 0; penable <= 0; pwrite <= 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n_read = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    apb_read(8'h00, d); check(d == 32'hDEADBEEF, $sformatf("capability %h", d));
    apb_read(8'h04, d); check(d == 32'h0, "empty data register reads zero");
    // push five words, read them back
    for (int i = 0; i < 5; i++) begin
      @(posedge clk); wr_en <= 1; wdata <= 8'(8'hA0 + i);
    end
    @(posedge clk); wr_en <= 0;
    for (int i = 0; i < 5; i++) begin
      apb_read(8'h04, d);
      check(d == {1'b1, 23'b0, 8'(8'hA0 + i)}, $sformatf("word %0d: %h", i, d));
      void'(ref_q.pop_front());
    end
    @(posedge clk); #1 check(empty, "empty after reading all");
    // overflow
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(posedge clk); wr_en <= 1; wdata <= 8'(i);
    end
    @(posedge clk); wr_en <= 0;
    #1 check(full && overflow, "full and overflow");
    apb_read(8'h04, d);
    check(d == {1'b1, 1'b1, 22'b0, 8'h00}, $sformatf("first word kept, overflow flag %h", d));
    void'(ref_q.pop_front());
    apb_write(8'h04, 32'h1);
    @(posedge clk); #1 check(empty && !overflow, "clear command");
    ref_q.delete();
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      if ($urandom_range(0, 1) == 0) begin
        @(posedge clk); wr_en <= 1; wdata <= 8'($urandom);
        @(posedge clk); wr_en <= 0;
      end else begin
        apb_read(8'h04, d);
        if (ref_q.size() == 0) check(d[31] == 1'b0, "random: empty");
        else begin
          logic [7:0] e;
          e = ref_q.pop_front();
          check(d[31] && d[7:0] == e, $sformatf("random: %h expected %h", d, e));
          n_read++;
        end
      end
    end
    check(n_read > 300, "random reads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
