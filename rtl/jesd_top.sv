// jesd_top: JESD204B receiver core for one lane, link layer followed by
// transport layer.
//
// Decoded octets from the deserializer and 8b/10b decoder enter the link
// layer, which runs code group synchronisation and initial lane alignment
// with the transmitter through SYNC~, checks frame alignment and replaces
// alignment characters. Data octets leave it tagged with their position in
// the frame; the transport layer assembles F of them into one frame and
// outputs M samples of N bits.
//
// Timing: an octet on din appears on the link layer output one clock later;
// the samples of a frame are valid one clock after its last octet left the
// link layer, i.e. two clocks after that octet was on din. One frame of F
// octets gives one set of M samples, so the sample rate is the octet rate
// divided by F.
//
// The layer split and the default link (one lane, two converters, four
// octets per frame, 14-bit samples in 16-bit words) follow the source
// design; frames per multiframe (K = 8) is this implementation's choice.
module jesd_top
  import jesd_pkg::ll_state_e, jesd_pkg::ILA_CFG_OCTETS;
#(
  parameter int unsigned F            = 4,
  parameter int unsigned K            = 8,
  parameter int unsigned M            = 2,
  parameter int unsigned N            = 14,
  parameter int unsigned NP           = 16,
  parameter int unsigned CS           = 0,
  parameter bit          CHECK_K_FLAG = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [7:0]                    din,
  input  logic                          din_k,
  input  logic                          din_valid,
  input  logic                          resync_req,
  output logic                          syncn,
  output ll_state_e                     link_state,
  output logic [ILA_CFG_OCTETS-1:0][7:0] ila_cfg,
  output logic                          ila_cfg_valid,
  output logic [M-1:0][N-1:0]           samples,
  output logic [M-1:0][(CS>0?CS:1)-1:0] ctrl,
  output logic                          sample_valid,
  output logic                          ev_replace,
  output logic                          ev_misplaced,
  output logic                          ev_resync,
  output logic                          ev_ila_fail
);

  logic [7:0]           ll_dout;
  logic                 ll_valid;
  logic [$clog2(F)-1:0] ll_idx;

  link_layer #(.F(F), .K(K), .CHECK_K_FLAG(CHECK_K_FLAG)) u_link (
    .clk, .rst_n, .din, .din_k, .din_valid, .resync_req,
    .syncn, .state(link_state),
    .dout(ll_dout), .dout_valid(ll_valid), .dout_idx(ll_idx),
    .ila_cfg, .ila_cfg_valid,
    .ev_replace, .ev_misplaced, .ev_resync, .ev_ila_fail
  );

  transport_layer #(.F(F), .M(M), .N(N), .NP(NP), .CS(CS)) u_transport (
    .clk, .rst_n,
    .in_octet(ll_dout), .in_valid(ll_valid), .in_idx(ll_idx),
    .samples, .ctrl, .sample_valid
  );

endmodule
