// link_layer: JESD204B receiver data link layer controller (one lane).
//
// The controller keeps the receiver synchronised to the transmitter and
// forwards data octets to the transport layer. It is a four-state machine:
//
//   IDLE  SYNC~ is asserted (low); the next octet moves to CGS.
//   CGS   code group synchronisation. SYNC~ stays low while /K/ characters
//         are counted; any other octet clears the count. When four /K/
//         have been seen, SYNC~ is released and the FSM goes to ILA.
//   ILA   initial lane alignment. /K/ octets still in flight are skipped;
//         the first other octet is octet 0 of frame 0 of multiframe 1. Each
//         of the four multiframes must start with /R/ and end with /A/;
//         if /Q/ is the second octet of multiframe 2 the 14 link
//         configuration octets after it are captured. A bad multiframe
//         sends the FSM back to IDLE (new synchronisation request); after
//         the fourth good one it enters DATA.
//   DATA  octets are passed on with their position in the frame. An /A/ or
//         /F/ in the last octet of a frame is replaced by the last octet of
//         the previous frame and clears the misplacement count. An /A/ or
//         /F/ anywhere else is passed on unchanged and increments the
//         misplacement count; at four the link is considered out of phase
//         and the FSM returns to IDLE. Four consecutive /K/, or a request on
//         resync_req, also return it to IDLE.
//
// Reset is synchronous and active low. Everything advances on octets with
// din_valid high; din_valid low freezes the controller. Outputs are
// registered: dout/dout_valid/dout_idx follow the octet on din by one clock.
//
// Following the source design, characters are recognised by their decoded
// octet value alone, so a data octet that equals a control character is
// treated as one (this produces occasional corrupted samples on random
// data). With CHECK_K_FLAG = 1 the controller also requires the control
// flag din_k from an 8b/10b decoder, which removes that effect. The
// four-state flow, the counters and the replacement rule are the source
// design's; the return to IDLE on four /K/ in DATA, the resync_req input,
// the status pulses and the register timing are this implementation's.
module link_layer
  import jesd_pkg::*;
#(
  parameter int unsigned F            = 4,   // octets per frame
  parameter int unsigned K            = 8,   // frames per multiframe
  parameter bit          CHECK_K_FLAG = 1'b0 // also require din_k for control characters
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // octet stream from the deserializer / 8b10b decoder
  input  logic [7:0]           din,
  input  logic                 din_k,       // decoder says: control character
  input  logic                 din_valid,
  input  logic                 resync_req,  // request a new synchronisation
  // SYNC~ to the transmitter, active low
  output logic                 syncn,
  output ll_state_e            state,
  // data to the transport layer
  output logic [7:0]           dout,
  output logic                 dout_valid,
  output logic [$clog2(F)-1:0] dout_idx,    // position of dout in its frame
  // link configuration captured during ILA
  output logic [ILA_CFG_OCTETS-1:0][7:0] ila_cfg,
  output logic                 ila_cfg_valid,
  // one-cycle status pulses
  output logic                 ev_replace,   // /A/ or /F/ replaced
  output logic                 ev_misplaced, // /A/ or /F/ at a wrong position
  output logic                 ev_resync,    // left DATA for a new synchronisation
  output logic                 ev_ila_fail   // bad ILA multiframe
);

  localparam int unsigned OW = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned FW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned PW = $clog2(F * K);

  // The configuration octets must fit in the second multiframe.
  initial begin
    assert (F * K >= ILA_CFG_OCTETS + 2)
      else $error("link_layer: F*K too small for the ILA configuration");
  end

  // character recognition
  function automatic logic is_char(input logic [7:0] d, input logic k,
                                   input logic [7:0] c);
    return (d == c) && (!CHECK_K_FLAG || k);
  endfunction

  logic is_k, is_r, is_q, is_a, is_f;
  always_comb begin
    is_k = is_char(din, din_k, CHAR_K);
    is_r = is_char(din, din_k, CHAR_R);
    is_q = is_char(din, din_k, CHAR_Q);
    is_a = is_char(din, din_k, CHAR_A);
    is_f = is_char(din, din_k, CHAR_F);
  end

  // registers
  ll_state_e            state_q;
  logic                 syncn_q;
  logic [2:0]           kcnt_q;      // /K/ counter (CGS and DATA)
  logic [2:0]           mcnt_q;      // ILA multiframe 1..4
  logic                 ila_run_q;   // ILA multiframes have started
  logic                 first_ok_q;  // current multiframe began with /R/
  logic                 cfg_en_q;    // capturing configuration octets
  logic [OW-1:0]        ocnt_q;      // octet in frame
  logic [FW-1:0]        fcnt_q;      // frame in multiframe
  logic [2:0]           wpos_q;      // misplaced alignment characters
  logic [7:0]           prev_last_q; // last octet of the previous frame
  logic [ILA_CFG_OCTETS-1:0][7:0] cfg_q;
  logic                 cfg_valid_q;
  logic [7:0]           dout_q;
  logic                 dout_valid_q;
  logic [OW-1:0]        dout_idx_q;
  logic                 ev_replace_q, ev_misplaced_q, ev_resync_q, ev_ila_fail_q;

  // position of the current octet in its multiframe
  logic [PW-1:0] pos;
  logic          last_of_frame, last_of_mf;
  always_comb begin
    pos           = PW'(fcnt_q) * PW'(F) + PW'(ocnt_q);
    last_of_frame = (ocnt_q == OW'(F - 1));
    last_of_mf    = last_of_frame && (fcnt_q == FW'(K - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q        <= LL_IDLE;
      syncn_q        <= 1'b0;
      kcnt_q         <= '0;
      mcnt_q         <= '0;
      ila_run_q      <= 1'b0;
      first_ok_q     <= 1'b0;
      cfg_en_q       <= 1'b0;
      ocnt_q         <= '0;
      fcnt_q         <= '0;
      wpos_q         <= '0;
      prev_last_q    <= '0;
      cfg_q          <= '0;
      cfg_valid_q    <= 1'b0;
      dout_q         <= '0;
      dout_valid_q   <= 1'b0;
      dout_idx_q     <= '0;
      ev_replace_q   <= 1'b0;
      ev_misplaced_q <= 1'b0;
      ev_resync_q    <= 1'b0;
      ev_ila_fail_q  <= 1'b0;
    end else begin
      dout_valid_q   <= 1'b0;
      ev_replace_q   <= 1'b0;
      ev_misplaced_q <= 1'b0;
      ev_resync_q    <= 1'b0;
      ev_ila_fail_q  <= 1'b0;
      if (din_valid) begin
        unique case (state_q)
          LL_IDLE: begin
            syncn_q     <= 1'b0;
            kcnt_q      <= '0;
            ila_run_q   <= 1'b0;
            cfg_valid_q <= 1'b0;
            state_q     <= LL_CGS;
          end

          LL_CGS: begin
            if (kcnt_q == 3'd4) begin
              state_q   <= LL_ILA;
              syncn_q   <= 1'b1;
              kcnt_q    <= '0;
              ila_run_q <= 1'b0;
            end else if (is_k) begin
              syncn_q <= 1'b0;
              kcnt_q  <= kcnt_q + 3'd1;
            end else begin
              syncn_q <= 1'b0;
              kcnt_q  <= '0;
            end
          end

          LL_ILA: begin
            if (!ila_run_q && is_k) begin
              // /K/ still arriving: frame edge not yet found
            end else begin
              logic [PW-1:0] p;
              logic [2:0]    m;
              logic          fok;
              p   = ila_run_q ? pos : '0;
              m   = ila_run_q ? mcnt_q : 3'd1;
              fok = ila_run_q ? first_ok_q : 1'b0;
              ila_run_q <= 1'b1;
              mcnt_q    <= m;
              // octet counters
              if (!ila_run_q) begin
                ocnt_q <= (F > 1) ? OW'(1) : '0;
                fcnt_q <= (F > 1) ? '0 : ((K > 1) ? FW'(1) : '0);
              end else if (last_of_frame) begin
                ocnt_q <= '0;
                fcnt_q <= (fcnt_q == FW'(K - 1)) ? '0 : fcnt_q + FW'(1);
              end else begin
                ocnt_q <= ocnt_q + OW'(1);
              end
              // multiframe start
              if (p == '0) fok = is_r;
              first_ok_q <= fok;
              // configuration data of multiframe 2
              if (m == 3'd2 && p == PW'(1)) cfg_en_q <= is_q;
              if (cfg_en_q && m == 3'd2 && p >= PW'(2) &&
                  p < PW'(ILA_CFG_OCTETS + 2)) begin
                cfg_q[p - PW'(2)] <= din;
                if (p == PW'(ILA_CFG_OCTETS + 1)) begin
                  cfg_valid_q <= 1'b1;
                  cfg_en_q    <= 1'b0;
                end
              end
              // multiframe end
              if (p == PW'(F * K - 1)) begin
                if (!(fok && is_a)) begin
                  state_q       <= LL_IDLE;
                  syncn_q       <= 1'b0;
                  ev_ila_fail_q <= 1'b1;
                end else if (m == 3'd4) begin
                  state_q     <= LL_DATA;
                  ocnt_q      <= '0;
                  fcnt_q      <= '0;
                  wpos_q      <= '0;
                  kcnt_q      <= '0;
                  prev_last_q <= din;
                end else begin
                  mcnt_q <= m + 3'd1;
                end
              end
            end
          end

          LL_DATA: begin
            logic [7:0] o;
            logic       resync;
            o      = din;
            resync = resync_req;
            // frame counters
            if (last_of_frame) begin
              ocnt_q <= '0;
              fcnt_q <= last_of_mf ? '0 : fcnt_q + FW'(1);
            end else begin
              ocnt_q <= ocnt_q + OW'(1);
            end
            // alignment characters
            if (is_a || is_f) begin
              if (last_of_frame) begin
                o            = prev_last_q;
                wpos_q       <= '0;
                ev_replace_q <= 1'b1;
              end else begin
                wpos_q         <= wpos_q + 3'd1;
                ev_misplaced_q <= 1'b1;
                if (wpos_q == 3'd3) resync = 1'b1;
              end
            end
            // four consecutive /K/ also mean the transmitter has restarted
            if (is_k) begin
              kcnt_q <= kcnt_q + 3'd1;
              if (kcnt_q == 3'd3) resync = 1'b1;
            end else begin
              kcnt_q <= '0;
            end
            if (last_of_frame) prev_last_q <= o;
            dout_q       <= o;
            dout_idx_q   <= ocnt_q;
            dout_valid_q <= 1'b1;
            if (resync) begin
              state_q     <= LL_IDLE;
              syncn_q     <= 1'b0;
              ev_resync_q <= 1'b1;
            end
          end

          default: state_q <= LL_IDLE;
        endcase
      end
    end
  end

  assign state         = state_q;
  assign syncn         = syncn_q;
  assign dout          = dout_q;
  assign dout_valid    = dout_valid_q;
  assign dout_idx      = dout_idx_q;
  assign ila_cfg       = cfg_q;
  assign ila_cfg_valid = cfg_valid_q;
  assign ev_replace    = ev_replace_q;
  assign ev_misplaced  = ev_misplaced_q;
  assign ev_resync     = ev_resync_q;
  assign ev_ila_fail   = ev_ila_fail_q;

  // SYNC~ is held low (synchronisation request) throughout IDLE and CGS.
  a_sync_low_in_cgs : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == LL_CGS) |-> !syncn_q);

endmodule
