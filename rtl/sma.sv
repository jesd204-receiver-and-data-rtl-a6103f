// sma: sliding moving average, y[n] = floor( (1/WINDOW) * sum_{i=0}^{WINDOW-1} x[n-i] ).
//
// The window is a shift register of WINDOW samples. Instead of adding all
// taps every cycle, a running sum is kept: each new sample is added and the
// sample leaving the window is subtracted, which gives the same sum with one
// adder and one subtractor. The sum is divided by the constant WINDOW.
//
// Timing: one output per input sample, registered, one clock after the
// sample (in_valid -> out_valid). Outputs start once WINDOW samples have
// been received since reset or clear; clear empties the window.
//
// The shift-register window, the sum and the 1/WINDOW scaling follow the
// source design, as does the window of 100 samples it used on the
// receiver's sine output; samples are unsigned (offset binary), the
// running-sum form and the floor rounding are this implementation's.
module sma #(
  parameter int unsigned W      = 14,   // bits per sample
  parameter int unsigned WINDOW = 100   // samples in the window
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  localparam int unsigned SW = W + $clog2(WINDOW + 1);
  localparam int unsigned NW = $clog2(WINDOW + 1);

  logic [W-1:0]  sr_q [WINDOW];
  logic [SW-1:0] sum_q;
  logic [NW-1:0] fill_q;
  logic          ov_q;
  logic [W-1:0]  y_q;

  logic [SW-1:0] sum_d;
  always_comb sum_d = sum_q + SW'(in_data) - SW'(sr_q[WINDOW-1]);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < WINDOW; i++) sr_q[i] <= '0;
      sum_q  <= '0;
      fill_q <= '0;
      ov_q   <= 1'b0;
      y_q    <= '0;
    end else begin
      ov_q <= 1'b0;
      if (in_valid) begin
        sr_q[0] <= in_data;
        for (int i = 1; i < WINDOW; i++) sr_q[i] <= sr_q[i-1];
        sum_q <= sum_d;
        if (fill_q != NW'(WINDOW)) fill_q <= fill_q + 1'b1;
        if (fill_q >= NW'(WINDOW - 1)) begin
          ov_q <= 1'b1;
          y_q  <= W'(sum_d / SW'(WINDOW));
        end
      end
    end
  end

  assign out_valid = ov_q;
  assign out_data  = y_q;

endmodule
