// jesd_tx_model: behavioural model of a JESD204B transmitter lane (a dummy
// ADC) for the testbenches. Not synthesizable design code.
//
// One octet per clock on dout (dout_k marks control characters, as an
// 8b/10b decoder in front of the receiver would). While syncn is low it
// sends /K/. After syncn goes high it sends the four-multiframe initial lane
// alignment sequence (/R/ first, /A/ last in every multiframe, /Q/ and the
// 14 configuration octets in the second one) and then data frames. Each data
// frame carries next_samples, packed MSB first, converter 0 first, tail
// bits zero; take pulses on the clock whose octet 0 carries them. In the
// last octet of a frame the transmitter applies the standard's character
// replacement: /A/ in the last frame of a multiframe and /F/ in the others
// when the octet equals that of the previous frame (/F/ not twice in a row).
//
// Fault injection: inject_misplace puts an /A/ in octet 0 of the next data
// frame; bad_ila makes the first multiframe of the next ILA start with a
// data octet instead of /R/. orig/orig_valid give the octet that the
// receiver should deliver for every data octet sent.
module jesd_tx_model #(
  parameter int F  = 4,
  parameter int K  = 8,
  parameter int M  = 2,
  parameter int N  = 14,
  parameter int NP = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                syncn,
  input  logic                inject_misplace,
  input  logic                bad_ila,
  input  logic [M-1:0][N-1:0] next_samples,
  output logic                take,
  output logic [7:0]          dout,
  output logic                dout_k,
  output logic [7:0]          orig,
  output logic                orig_valid,
  output int                  phase,       // 0 /K/, 1 ILA, 2 data
  output int                  n_replaced   // /A/ or /F/ substitutions sent
);

  localparam int OPW = NP / 8;

  int         pos;          // octet in multiframe
  int         mf;           // ILA multiframe 0..3
  logic [7:0] frame [F];
  logic [7:0] prev_last;
  logic       prev_f;
  logic       pend_misplace, pend_bad;
  logic [7:0] cfg [14];

  initial begin
    cfg[0] = 8'h01; cfg[1] = 8'h00; cfg[2] = 8'h00; cfg[3] = 8'h00;
    cfg[4] = 8'(F - 1); cfg[5] = 8'(K - 1); cfg[6] = 8'(M - 1);
    cfg[7] = 8'(N - 1); cfg[8] = 8'h40 | 8'(NP - 1); cfg[9] = 8'h20;
    cfg[10] = 8'h00; cfg[11] = 8'h00; cfg[12] = 8'h00;
    cfg[13] = 8'h00;
    for (int i = 0; i < 13; i++) cfg[13] = cfg[13] + cfg[i];
  end

  always @(posedge clk) begin
    take       <= 1'b0;
    orig_valid <= 1'b0;
    if (inject_misplace) pend_misplace <= 1'b1;
    if (bad_ila)         pend_bad      <= 1'b1;
    if (!rst_n) begin
      phase <= 0; pos <= 0; mf <= 0; dout <= 8'hBC; dout_k <= 1'b1;
      prev_last <= 8'h7C; prev_f <= 1'b0; n_replaced <= 0;
      pend_misplace <= 1'b0; pend_bad <= 1'b0; orig <= '0;
    end else if (!syncn) begin
      phase <= 0; pos <= 0; mf <= 0; dout <= 8'hBC; dout_k <= 1'b1;
    end else if (phase == 0 || phase == 1) begin
      // initial lane alignment
      logic [7:0] o; logic k;
      o = 8'(pos + 8'h20 * mf); k = 1'b0;
      if (pos == 0) begin o = 8'h1C; k = 1'b1; end
      if (pos == F * K - 1) begin o = 8'h7C; k = 1'b1; end
      if (mf == 1 && pos == 1) begin o = 8'h9C; k = 1'b1; end
      if (mf == 1 && pos >= 2 && pos < 16) o = cfg[pos - 2];
      if (mf == 0 && pos == 0 && pend_bad) begin o = 8'h33; k = 1'b0; pend_bad <= 1'b0; end
      dout <= o; dout_k <= k; phase <= 1;
      if (pos == F * K - 1) begin
        pos <= 0;
        if (mf == 3) begin phase <= 2; prev_last <= 8'h7C; prev_f <= 1'b0; end
        else mf <= mf + 1;
      end else pos <= pos + 1;
    end else begin
      // data frames
      int oi; logic [7:0] o; logic k;
      oi = pos % F;
      if (oi == 0) begin
        for (int m = 0; m < M; m++) begin
          logic [NP-1:0] w;
          w = '0;
          w[NP-1 -: N] = next_samples[m];
          for (int j = 0; j < OPW; j++) frame[m*OPW + j] = w[NP-1-8*j -: 8];
        end
        take <= 1'b1;
      end
      o = frame[oi]; k = 1'b0;
      orig <= frame[oi]; orig_valid <= 1'b1;
      if (oi == 0 && pend_misplace) begin
        // a misplaced /A/ reaches the receiver's output unchanged
        o = 8'h7C; k = 1'b1; pend_misplace <= 1'b0; orig <= 8'h7C;
      end
      if (oi == F - 1) begin
        if (pos == F * K - 1) begin
          if (frame[oi] == prev_last) begin o = 8'h7C; k = 1'b1; end
          prev_f <= 1'b0;
        end else begin
          if (frame[oi] == prev_last && !prev_f) begin
            o = 8'hFC; k = 1'b1; prev_f <= 1'b1;
          end else prev_f <= 1'b0;
        end
        if (k) n_replaced <= n_replaced + 1;
        prev_last <= frame[oi];
      end
      dout <= o; dout_k <= k;
      pos <= (pos == F * K - 1) ? 0 : pos + 1;
    end
  end

endmodule
