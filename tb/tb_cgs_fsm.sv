// tb_cgs_fsm: self-checking testbench of the code group synchronisation FSM.
//
// A reference model of the three states and their K, V and I counters,
// written from the state descriptions (not from the RTL), runs beside the
// FSM on the same random character stream (mostly /K/ at first, then mostly
// valid data with bursts of invalid characters). Checks: state and
// sync_request match the reference every clock; the directed sequences
// reach CS_CHECK after four /K/, CS_DATA after four more valid characters,
// CS_CHECK on an invalid one and CS_INIT after three invalid ones.
module tb_cgs_fsm;
  import jesd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic in_valid, char_k, char_valid, sreq;
  cs_state_e state;
  cgs_fsm dut (.clk, .rst_n, .in_valid, .char_k, .char_valid, .sync_request(sreq), .state);

  // reference
  int r_state, r_k, r_v, r_i; bit r_sreq;
  task automatic ref_step(input bit k, input bit ok);
    case (r_state)
      0: if (r_k == 4) begin r_state = 1; r_sreq = 0; r_k = 0; end
         else begin r_i = 0; r_v = 0; r_sreq = 1; r_k = (k && ok) ? r_k + 1 : 0; end
      1: if (r_i == 3) begin r_state = 0; r_sreq = 1; r_i = 0; r_v = 0; end
         else if (r_v == 4) begin r_state = 2; r_i = 0; r_v = 0; end
         else begin r_sreq = 0; r_k = 0; if (!ok) begin r_i++; r_v = 0; end else r_v++; end
      default: begin r_i = 0; r_v = 0; if (!ok) r_state = 1; end
    endcase
  endtask

  int visits[3];
  task automatic send(input bit k, input bit ok);
    char_k = k; char_valid = ok; in_valid = 1;
    @(posedge clk); #1;
    ref_step(k, ok);
    check(int'(state) == r_state && sreq == r_sreq,
          $sformatf("state %0d/%0d sync_request %0d/%0d", state, r_state, sreq, r_sreq));
    visits[r_state]++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; char_k = 0; char_valid = 1;
    r_state = 0; r_k = 0; r_v = 0; r_i = 0; r_sreq = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(sreq && state == CS_INIT, "reset state");
    // directed
    repeat (5) send(1, 1);
    check(state == CS_CHECK && !sreq, "four /K/ -> CS_CHECK");
    repeat (5) send(0, 1);
    check(state == CS_DATA, "four valid -> CS_DATA");
    send(0, 0);
    check(state == CS_CHECK, "invalid -> CS_CHECK");
    repeat (4) send(0, 0);
    check(state == CS_INIT && sreq, "three invalid -> CS_INIT");
    // random
    for (int i = 0; i < 5000; i++) begin
      bit k, ok;
      k  = (r_state == 0) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 9) == 0);
      ok = ($urandom_range(0, 7) != 0);
      send(k, ok);
    end
    check(visits[0] > 0 && visits[1] > 0 && visits[2] > 0, "all states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
