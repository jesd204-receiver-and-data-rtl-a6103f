// jesd_rx_subsystem: JESD204B receive path with data reduction, as it sits
// in the SoC next to the deserializer.
//
//   din/din_k/din_valid --+--> jesd_top (link + transport layer) --> samples
//                         |        |  SYNC~ to the transmitter         |
//                         |        v                                   v
//                         |   status pulses             per converter: rle_encoder,
//                         |                                            sma, bma
//                         +--> apbfifo (raw octet capture, APB slave)
//                         +--> cgs_fsm + fs_fsm (lane synchronisation
//                              monitor in the standard's form)
//
// The deserializer, the 8b/10b decoder and the AMBA bus infrastructure are
// outside this module: the decoded octet stream enters on din (din_k is the
// decoder's control-character flag, din_err its code/disparity error flag)
// and the APB slave port of the capture FIFO is brought out. All logic runs
// on one clock, the octet clock, with a synchronous active-low reset.
//
// Each converter channel feeds three reduction units side by side; the
// application picks the stream it needs:
//   rle_*  run-length tokens of the samples, rows of RLE_ROW samples
//   sma_*  sliding average over SMA_WINDOW samples, one per sample
//   bma_*  block average, one per BMA_BLOCK samples
// The averages restart when the link resynchronises.
//
// Following the source design: the receiver layers, the link parameters,
// the APB capture FIFO with its capability register and the three
// reduction algorithms with windows of 100 samples. This implementation's
// choices: running the reduction units in parallel on every channel, the
// RLE row length, the synchronisation monitor as a separate observer, and
// a single clock domain.
module jesd_rx_subsystem
  import jesd_pkg::ll_state_e, jesd_pkg::cs_state_e, jesd_pkg::fs_state_e,
         jesd_pkg::ILA_CFG_OCTETS;
#(
  parameter int unsigned F          = 4,    // octets per frame
  parameter int unsigned K          = 8,    // frames per multiframe
  parameter int unsigned M          = 2,    // converters
  parameter int unsigned N          = 14,   // converter resolution
  parameter int unsigned NP         = 16,   // bits per sample word
  parameter int unsigned CS         = 0,    // control bits per sample
  parameter int unsigned FIFO_DEPTH = 512,  // capture FIFO words
  parameter int unsigned SMA_WINDOW = 100,
  parameter int unsigned BMA_BLOCK  = 100,
  parameter int unsigned RLE_ROW    = 88,   // samples per RLE row
  parameter int unsigned RLE_CW     = 8     // RLE count bits
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // decoded lane data
  input  logic [7:0]                    din,
  input  logic                          din_k,
  input  logic                          din_err,
  input  logic                          din_valid,
  input  logic                          resync_req,
  output logic                          syncn,
  // receiver status
  output ll_state_e                     link_state,
  output logic [ILA_CFG_OCTETS-1:0][7:0] ila_cfg,
  output logic                          ila_cfg_valid,
  output logic                          ev_replace,
  output logic                          ev_misplaced,
  output logic                          ev_resync,
  output logic                          ev_ila_fail,
  // lane synchronisation monitor
  output cs_state_e                     mon_cs_state,
  output fs_state_e                     mon_fs_state,
  output logic                          mon_sync_request,
  output logic                          mon_align_err,
  output logic                          mon_aligned,
  output logic [$clog2(F)-1:0]          mon_octet_idx,
  output logic                          mon_frame_start,
  // samples
  output logic [M-1:0][N-1:0]           samples,
  output logic [M-1:0][(CS>0?CS:1)-1:0] ctrl,
  output logic                          sample_valid,
  // data reduction outputs, one set per converter
  output logic [M-1:0]                  rle_valid,
  output logic [M-1:0]                  rle_is_run,
  output logic [M-1:0][RLE_CW-1:0]      rle_count,
  output logic [M-1:0][N-1:0]           rle_value,
  output logic [M-1:0]                  sma_valid,
  output logic [M-1:0][N-1:0]           sma_data,
  output logic [M-1:0]                  bma_valid,
  output logic [M-1:0][N-1:0]           bma_data,
  // APB slave of the capture FIFO
  input  logic                          psel,
  input  logic                          penable,
  input  logic                          pwrite,
  input  logic [7:0]                    paddr,
  input  logic [31:0]                   pwdata,
  output logic [31:0]                   prdata,
  output logic                          pready,
  output logic                          pslverr,
  output logic                          fifo_empty,
  output logic                          fifo_full,
  output logic                          fifo_overflow
);

  // ---------------------------------------------------------------- receiver
  jesd_top #(.F(F), .K(K), .M(M), .N(N), .NP(NP), .CS(CS)) u_jesd (
    .clk, .rst_n, .din, .din_k, .din_valid, .resync_req,
    .syncn, .link_state, .ila_cfg, .ila_cfg_valid,
    .samples, .ctrl, .sample_valid,
    .ev_replace, .ev_misplaced, .ev_resync, .ev_ila_fail
  );

  // ------------------------------------------------------ raw data capture
  apbfifo #(.DW(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(din_valid), .wdata(din),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .empty(fifo_empty), .full(fifo_full), .overflow(fifo_overflow)
  );

  // ------------------------------------------ synchronisation monitor
  logic                 char_is_k;
  assign char_is_k = (din == jesd_pkg::CHAR_K);

  cgs_fsm u_cgs (
    .clk, .rst_n, .in_valid(din_valid), .char_k(char_is_k), .char_valid(!din_err),
    .sync_request(mon_sync_request), .state(mon_cs_state)
  );

  fs_fsm #(.F(F)) u_fs (
    .clk, .rst_n, .in_valid(din_valid), .sync_request(mon_sync_request),
    .din, .char_k(char_is_k), .state(mon_fs_state), .aligned(mon_aligned),
    .octet_idx(mon_octet_idx), .frame_start(mon_frame_start),
    .align_err(mon_align_err)
  );

  // ------------------------------------------------------ data reduction
  localparam int unsigned RW = $clog2(RLE_ROW);
  logic [RW-1:0] row_q;
  always_ff @(posedge clk) begin
    if (!rst_n || ev_resync) row_q <= '0;
    else if (sample_valid) row_q <= (row_q == RW'(RLE_ROW - 1)) ? '0 : row_q + 1'b1;
  end

  logic [M-1:0] rle_ready;
  for (genvar m = 0; m < M; m++) begin : g_app
    rle_encoder #(.W(N), .CW(RLE_CW)) u_rle (
      .clk, .rst_n, .in_valid(sample_valid), .in_data(samples[m]),
      .in_last(row_q == RW'(RLE_ROW - 1)), .in_ready(rle_ready[m]),
      .tok_valid(rle_valid[m]), .tok_is_run(rle_is_run[m]),
      .tok_count(rle_count[m]), .tok_value(rle_value[m])
    );
    sma #(.W(N), .WINDOW(SMA_WINDOW)) u_sma (
      .clk, .rst_n, .clear(ev_resync), .in_valid(sample_valid),
      .in_data(samples[m]), .out_valid(sma_valid[m]), .out_data(sma_data[m])
    );
    bma #(.W(N), .BLOCK(BMA_BLOCK)) u_bma (
      .clk, .rst_n, .clear(ev_resync), .in_valid(sample_valid),
      .in_data(samples[m]), .out_valid(bma_valid[m]), .out_data(bma_data[m])
    );
  end

  // Samples come at most once per F >= 2 clocks, so the encoder's one-clock
  // in_ready gap never meets a sample.
  a_rle_ready : assert property (@(posedge clk) disable iff (!rst_n)
    sample_valid |-> &rle_ready);

endmodule
