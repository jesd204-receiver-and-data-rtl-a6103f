// fs_fsm: initial frame synchronisation state machine of a JESD204B
// receiver lane, in the three-state form of the standard.
//
//   FS_INIT   while sync_request is high or /K/ arrives, the octet counter
//             stays 0. The first other character is octet 0 of a frame
//             and moves the machine to FS_DATA.
//   FS_DATA   the octet counter runs modulo F; a /K/ moves to FS_CHECK.
//   FS_CHECK  /K/ characters are counted; a non-/K/ character returns to
//             FS_DATA, and four /K/ in a row return to FS_INIT.
// A sync_request in any state returns to FS_INIT.
//
// In FS_DATA and FS_CHECK the alignment is checked: an /A/ or /F/ outside
// the last octet of a frame raises align_err for one clock. octet_idx is
// the position of the current input octet in its frame (valid with
// aligned), frame_start marks octet 0. The machine advances on clocks with
// in_valid high; outputs for the current octet are combinational, state and
// counters are registered. Reset is synchronous.
//
// States and transitions follow the source design's description of the
// standard; the alignment check output and its timing are this
// implementation's.
module fs_fsm
  import jesd_pkg::fs_state_e, jesd_pkg::FS_INIT, jesd_pkg::FS_CHECK, jesd_pkg::FS_DATA,
         jesd_pkg::CHAR_A, jesd_pkg::CHAR_F;
#(
  parameter int unsigned F = 4   // octets per frame
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 sync_request,
  input  logic [7:0]           din,
  input  logic                 char_k,
  output fs_state_e            state,
  output logic                 aligned,
  output logic [$clog2(F)-1:0] octet_idx,
  output logic                 frame_start,
  output logic                 align_err
);

  localparam int unsigned OW = $clog2(F);

  fs_state_e   state_q;
  logic [OW-1:0] ocnt_q;
  logic [2:0]  kcnt_q;

  logic is_align;
  always_comb begin
    is_align    = (din == CHAR_A) || (din == CHAR_F);
    aligned     = (state_q != FS_INIT) || (!sync_request && !char_k);
    octet_idx   = (state_q == FS_INIT) ? '0 : ocnt_q;
    frame_start = in_valid && aligned && (octet_idx == '0);
    align_err   = in_valid && (state_q != FS_INIT) && !sync_request &&
                  is_align && (ocnt_q != OW'(F - 1));
  end

  logic [OW-1:0] onext;
  always_comb onext = (octet_idx == OW'(F - 1)) ? '0 : octet_idx + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= FS_INIT;
      ocnt_q  <= '0;
      kcnt_q  <= '0;
    end else if (in_valid) begin
      if (sync_request) begin
        state_q <= FS_INIT;
        ocnt_q  <= '0;
        kcnt_q  <= '0;
      end else begin
        unique case (state_q)
          FS_INIT: begin
            ocnt_q <= '0;
            if (!char_k) begin
              state_q <= FS_DATA;
              ocnt_q  <= onext;
            end
          end
          FS_DATA: begin
            kcnt_q <= '0;
            ocnt_q <= onext;
            if (char_k) begin
              state_q <= FS_CHECK;
              kcnt_q  <= 3'd1;
            end
          end
          FS_CHECK: begin
            ocnt_q <= onext;
            if (!char_k) begin
              state_q <= FS_DATA;
              kcnt_q  <= '0;
            end else if (kcnt_q == 3'd3) begin
              state_q <= FS_INIT;
              ocnt_q  <= '0;
              kcnt_q  <= '0;
            end else begin
              kcnt_q <= kcnt_q + 3'd1;
            end
          end
          default: state_q <= FS_INIT;
        endcase
      end
    end
  end

  assign state = state_q;

endmodule
