// bma: block moving average, a downsampling average. The input is cut into
// consecutive blocks of BLOCK samples; for each block one output
// floor(sum / BLOCK) is produced, so the output rate is 1/BLOCK of the input
// rate.
//
// Timing: the average of a block is registered and out_valid pulses one
// clock after the last sample of the block. clear restarts the block.
//
// The block average and its use for downsampling follow the source design;
// a block of 100 samples matches the downsampling of its sine and triangle
// wave examples (3072 samples to about 30). Samples are unsigned, blocks do
// not overlap and rounding is floor: these are this implementation's
// choices.
module bma #(
  parameter int unsigned W     = 14,   // bits per sample
  parameter int unsigned BLOCK = 100   // samples per block
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  localparam int unsigned SW = W + $clog2(BLOCK + 1);
  localparam int unsigned NW = $clog2(BLOCK + 1);

  logic [SW-1:0] acc_q;
  logic [NW-1:0] cnt_q;
  logic          ov_q;
  logic [W-1:0]  y_q;

  logic [SW-1:0] acc_d;
  always_comb acc_d = acc_q + SW'(in_data);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      acc_q <= '0;
      cnt_q <= '0;
      ov_q  <= 1'b0;
      y_q   <= '0;
    end else begin
      ov_q <= 1'b0;
      if (in_valid) begin
        if (cnt_q == NW'(BLOCK - 1)) begin
          y_q   <= W'(acc_d / SW'(BLOCK));
          ov_q  <= 1'b1;
          acc_q <= '0;
          cnt_q <= '0;
        end else begin
          acc_q <= acc_d;
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  assign out_valid = ov_q;
  assign out_data  = y_q;

endmodule
