// transport_layer: JESD204B receiver transport layer (deframer) for one lane
// and one sample per converter per frame (L = 1, S = 1).
//
// A frame is F octets. Converter m owns NP/8 consecutive octets of it,
// converter 0 first, most significant octet first. Within its NP-bit word
// the sample occupies the N most significant bits, followed by CS control
// bits; the remaining NP-N-CS low bits are tail bits and are dropped. For
// the default link (M = 2, N = 14, NP = 16, F = 4) a frame is
//   octet 0 = s0[13:6], octet 1 = {s0[5:0], 2 tail bits},
//   octet 2 = s1[13:6], octet 3 = {s1[5:0], 2 tail bits}.
//
// Octets arrive from the link layer with their position in the frame
// (in_idx). A frame is released only when all F positions were received in
// order since the last octet 0, so a frame cut by a resynchronisation is
// never output. samples/ctrl are registered and sample_valid pulses for one
// clock on the cycle after the last octet of the frame.
//
// The octet layout follows the source design (its description of the octet
// structure and its 14-bit samples in a 4-octet frame); the zero control
// bits by default and the in-order completeness check are this
// implementation's choices.
module transport_layer #(
  parameter int unsigned F  = 4,   // octets per frame
  parameter int unsigned M  = 2,   // converters
  parameter int unsigned N  = 14,  // converter resolution
  parameter int unsigned NP = 16,  // bits per sample word (N')
  parameter int unsigned CS = 0    // control bits per sample
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [7:0]                   in_octet,
  input  logic                         in_valid,
  input  logic [$clog2(F)-1:0]         in_idx,
  output logic [M-1:0][N-1:0]          samples,
  output logic [M-1:0][(CS>0?CS:1)-1:0] ctrl,
  output logic                         sample_valid
);

  localparam int unsigned OW  = $clog2(F);
  localparam int unsigned OPW = NP / 8;          // octets per word
  localparam int unsigned CW  = (CS > 0) ? CS : 1;

  initial begin
    assert (M * NP == 8 * F)
      else $error("transport_layer: M*NP must equal 8*F");
    assert (NP % 8 == 0 && N + CS <= NP)
      else $error("transport_layer: bad N/NP/CS");
  end

  logic [F-1:0][7:0] frame_q;
  logic [OW:0]       next_q;     // next expected position, F = none
  logic [M-1:0][N-1:0]  samples_q;
  logic [M-1:0][CW-1:0] ctrl_q;
  logic              valid_q;

  // unpack the frame as it would be with the current octet written
  logic [F-1:0][7:0]    frame_d;
  logic [M-1:0][N-1:0]  samples_d;
  logic [M-1:0][CW-1:0] ctrl_d;
  always_comb begin
    frame_d = frame_q;
    frame_d[in_idx] = in_octet;
    for (int m = 0; m < M; m++) begin
      logic [NP-1:0] word;
      for (int o = 0; o < OPW; o++)
        word[NP-1-8*o -: 8] = frame_d[m*OPW + o];
      samples_d[m] = word[NP-1 -: N];
      if (CS > 0) ctrl_d[m] = CW'(word >> (NP - N - CW));
      else        ctrl_d[m] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame_q   <= '0;
      next_q    <= (OW+1)'(F);
      samples_q <= '0;
      ctrl_q    <= '0;
      valid_q   <= 1'b0;
    end else begin
      valid_q <= 1'b0;
      if (in_valid) begin
        frame_q[in_idx] <= in_octet;
        if (in_idx == '0)
          next_q <= (F > 1) ? (OW+1)'(1) : (OW+1)'(F);
        else if ((OW+1)'(in_idx) == next_q)
          next_q <= ((OW+1)'(in_idx) == (OW+1)'(F - 1)) ? (OW+1)'(F) : next_q + 1'b1;
        else
          next_q <= (OW+1)'(F);
        if (in_idx == OW'(F - 1) &&
            (F == 1 || (OW+1)'(in_idx) == next_q)) begin
          samples_q <= samples_d;
          ctrl_q    <= ctrl_d;
          valid_q   <= 1'b1;
        end
      end
    end
  end

  assign samples      = samples_q;
  assign ctrl         = ctrl_q;
  assign sample_valid = valid_q;

endmodule
