// rle_encoder: streaming run-length encoder for the application layer.
//
// Symbols of W bits arrive with in_valid; in_last marks the last symbol of
// a row (a row of a binary image, or a block of samples). Consecutive equal
// symbols form a run. When a run ends (a different symbol arrives, the row
// ends, or the run reaches the largest count CW bits hold) one token is
// output:
//   tok_is_run = 1: the run  (tok_count, tok_value), tok_count >= 2
//   tok_is_run = 0: a single symbol tok_value (tok_count = 1)
// Runs never cross a row boundary. Example: the row 0 1 1 1 1 1 0 becomes
// the tokens 0, (5,1), 0.
//
// Timing: tokens are registered and appear one clock after the symbol
// that ends the run. When the last symbol of a row differs from the run
// before it, two tokens are due; the second one is output on the next
// clock and in_ready is low for that clock, so the source must hold its
// symbol while in_ready is low. There is no output back-pressure.
//
// The token format (literal for a single symbol, count and value for a
// run) follows the algorithm of the source design; the count width, the
// count saturation and the row marker are this implementation's.
module rle_encoder #(
  parameter int unsigned W  = 1,  // bits per symbol
  parameter int unsigned CW = 8   // bits of the run count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  input  logic          in_last,
  output logic          in_ready,
  output logic          tok_valid,
  output logic          tok_is_run,
  output logic [CW-1:0] tok_count,
  output logic [W-1:0]  tok_value
);

  logic          have_q;    // a run is open
  logic [W-1:0]  cur_q;
  logic [CW-1:0] cnt_q;
  logic          pend_q;    // a single-symbol token waits for the next clock
  logic [W-1:0]  pend_val_q;
  logic          tv_q, trun_q;
  logic [CW-1:0] tcnt_q;
  logic [W-1:0]  tval_q;

  localparam logic [CW-1:0] CMAX = '1;

  assign in_ready = !pend_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_q     <= 1'b0;
      cur_q      <= '0;
      cnt_q      <= '0;
      pend_q     <= 1'b0;
      pend_val_q <= '0;
      tv_q       <= 1'b0;
      trun_q     <= 1'b0;
      tcnt_q     <= '0;
      tval_q     <= '0;
    end else begin
      tv_q <= 1'b0;
      if (pend_q) begin
        tv_q   <= 1'b1;
        trun_q <= 1'b0;
        tcnt_q <= CW'(1);
        tval_q <= pend_val_q;
        pend_q <= 1'b0;
      end else if (in_valid) begin
        if (have_q && in_data == cur_q && cnt_q != CMAX) begin
          // run continues
          if (in_last) begin
            tv_q   <= 1'b1;
            trun_q <= 1'b1;
            tcnt_q <= cnt_q + 1'b1;
            tval_q <= cur_q;
            have_q <= 1'b0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end else begin
          if (have_q) begin
            // close the open run
            tv_q   <= 1'b1;
            trun_q <= (cnt_q > CW'(1));
            tcnt_q <= cnt_q;
            tval_q <= cur_q;
            if (in_last) begin
              pend_q     <= 1'b1;
              pend_val_q <= in_data;
              have_q     <= 1'b0;
            end else begin
              cur_q  <= in_data;
              cnt_q  <= CW'(1);
            end
          end else if (in_last) begin
            // a row of one symbol
            tv_q   <= 1'b1;
            trun_q <= 1'b0;
            tcnt_q <= CW'(1);
            tval_q <= in_data;
          end else begin
            have_q <= 1'b1;
            cur_q  <= in_data;
            cnt_q  <= CW'(1);
          end
        end
      end
    end
  end

  assign tok_valid  = tv_q;
  assign tok_is_run = trun_q;
  assign tok_count  = tcnt_q;
  assign tok_value  = tval_q;

  a_run_count : assert property (@(posedge clk) disable iff (!rst_n)
    (tv_q && trun_q) |-> (tcnt_q >= CW'(2)));

endmodule
