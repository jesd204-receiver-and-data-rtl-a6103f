// cgs_fsm: code group synchronisation state machine of a JESD204B receiver
// lane, in the three-state form of the standard.
//
//   CS_INIT   sync_request = 1. Counts consecutive valid /K/ characters
//             (Kcounter); after four it moves to CS_CHECK.
//   CS_CHECK  sync_request = 0. Each valid character increments Vcounter,
//             each invalid one increments Icounter and clears Vcounter.
//             Four valid characters move to CS_DATA; three invalid ones
//             move back to CS_INIT.
//   CS_DATA   normal operation; an invalid character moves to CS_CHECK.
//
// A character is "valid" when char_valid is high (no disparity or
// not-in-table error from the 8b/10b decoder) and "invalid" otherwise;
// char_k marks a /K/ character. The machine advances on clocks with
// in_valid high. Transitions are taken when a counter register holds its
// threshold, i.e. on the character after the one that reached it, and
// sync_request is a registered output. Reset is synchronous.
//
// States, counters and thresholds follow the source design's description
// of the standard; the register timing is this implementation's.
module cgs_fsm
  import jesd_pkg::cs_state_e, jesd_pkg::CS_INIT, jesd_pkg::CS_CHECK, jesd_pkg::CS_DATA;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      char_k,
  input  logic      char_valid,
  output logic      sync_request,
  output cs_state_e state
);

  cs_state_e  state_q;
  logic [2:0] kcnt_q, vcnt_q;
  logic [1:0] icnt_q;
  logic       sreq_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= CS_INIT;
      kcnt_q  <= '0;
      vcnt_q  <= '0;
      icnt_q  <= '0;
      sreq_q  <= 1'b1;
    end else if (in_valid) begin
      unique case (state_q)
        CS_INIT: begin
          if (kcnt_q == 3'd4) begin
            state_q <= CS_CHECK;
            sreq_q  <= 1'b0;
            kcnt_q  <= '0;
          end else begin
            icnt_q <= '0;
            vcnt_q <= '0;
            sreq_q <= 1'b1;
            kcnt_q <= (char_k && char_valid) ? kcnt_q + 3'd1 : 3'd0;
          end
        end
        CS_CHECK: begin
          if (icnt_q == 2'd3) begin
            state_q <= CS_INIT;
            sreq_q  <= 1'b1;
            icnt_q  <= '0;
            vcnt_q  <= '0;
          end else if (vcnt_q == 3'd4) begin
            state_q <= CS_DATA;
            icnt_q  <= '0;
            vcnt_q  <= '0;
          end else begin
            sreq_q <= 1'b0;
            kcnt_q <= '0;
            if (!char_valid) begin
              icnt_q <= icnt_q + 2'd1;
              vcnt_q <= '0;
            end else begin
              vcnt_q <= vcnt_q + 3'd1;
            end
          end
        end
        CS_DATA: begin
          icnt_q <= '0;
          vcnt_q <= '0;
          if (!char_valid) state_q <= CS_CHECK;
        end
        default: state_q <= CS_INIT;
      endcase
    end
  end

  assign sync_request = sreq_q;
  assign state        = state_q;

endmodule
