// tb_fs_fsm: self-checking testbench of the initial frame synchronisation FSM.
//
// A reference model of FS_INIT, FS_DATA and FS_CHECK with the octet and /K/
// counters, written from the state descriptions, runs beside the FSM on a
// random stream of /K/ runs, data octets and /A/ /F/ characters at right
// and wrong positions, with random sync requests. Checks every clock:
// state, octet position, frame start and the alignment error flag. Directed
// part: the first non-/K/ after the request is octet 0, four /K/ in a row
// return to FS_INIT, fewer do not.
module tb_fs_fsm;
  import jesd_pkg::*;
  localparam int F = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic in_valid, sreq, char_k, aligned, fstart, aerr;
  logic [7:0] din; logic [1:0] oidx;
  fs_state_e state;
  fs_fsm #(.F(F)) dut (.clk, .rst_n, .in_valid, .sync_request(sreq), .din, .char_k,
                       .state, .aligned, .octet_idx(oidx), .frame_start(fstart), .align_err(aerr));

  int r_state, r_o, r_k;   // 0 INIT 1 CHECK 2 DATA
  int n_err = 0, n_init = 0;

  task automatic send(input logic [7:0] d, input bit req);
    int idx; bit al, err;
    din = d; char_k = (d == 8'hBC); sreq = req; in_valid = 1;
    #1;
    // combinational outputs for this octet
    al  = (r_state != 0) || (!req && !char_k);
    idx = (r_state == 0) ? 0 : r_o;
    err = (r_state != 0) && !req && (d == 8'h7C || d == 8'hFC) && r_o != F - 1;
    check(aligned == al && (!al || int'(oidx) == idx) && fstart == (al && idx == 0) && aerr == err,
          $sformatf("outputs: aligned %0d/%0d idx %0d/%0d err %0d/%0d", aligned, al, oidx, idx, aerr, err));
    if (err) n_err++;
    @(posedge clk); #1;
    // reference update
    if (req) begin r_state = 0; r_o = 0; r_k = 0; end
    else case (r_state)
      0: begin r_o = 0; if (!char_k) begin r_state = 2; r_o = (0 + 1) % F; end end
      2: begin r_k = 0; r_o = (r_o + 1) % F; if (char_k) begin r_state = 1; r_k = 1; end end
      default: begin
        r_o = (r_o + 1) % F;
        if (!char_k) begin r_state = 2; r_k = 0; end
        else if (r_k == 3) begin r_state = 0; r_o = 0; r_k = 0; n_init++; end
        else r_k++;
      end
    endcase
    check(int'(state) == (r_state == 0 ? 0 : (r_state == 1 ? 1 : 2)), $sformatf("state %0d/%0d", state, r_state));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; sreq = 1; din = 8'hBC; char_k = 1;
    r_state = 0; r_o = 0; r_k = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    repeat (3) send(8'hBC, 1);
    repeat (3) send(8'hBC, 0);
    check(state == FS_INIT, "waits while /K/");
    send(8'h11, 0);
    check(state == FS_DATA && oidx == 2'd1, "first non-/K/ is octet 0");
    repeat (3) send(8'hBC, 0);
    check(state == FS_CHECK, "three /K/ stay in FS_CHECK");
    send(8'h22, 0);
    check(state == FS_DATA, "data returns to FS_DATA");
    repeat (4) send(8'hBC, 0);
    check(state == FS_INIT, "four /K/ return to FS_INIT");
    for (int i = 0; i < 6000; i++) begin
      logic [7:0] d; int c;
      c = $urandom_range(0, 19);
      if (c < 3) d = 8'hBC;
      else if (c == 3) d = 8'h7C;
      else if (c == 4) d = 8'hFC;
      else d = 8'($urandom_range(0, 100));
      send(d, $urandom_range(0, 199) == 0);
    end
    check(n_err > 50 && n_init > 0, $sformatf("errors %0d, returns to init %0d", n_err, n_init));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
