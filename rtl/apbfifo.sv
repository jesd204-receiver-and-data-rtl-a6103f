// apbfifo: capture FIFO for deserialized link data with an AMBA APB slave
// port, used to inspect the raw octet stream from a debug monitor.
//
// The write side pushes one DW-bit word per clock with wr_en high; when the
// FIFO is full the word is dropped and a sticky overflow flag is set. The
// APB side has two 32-bit read registers:
//   0x00  capability register, the constant CAP_VALUE (0xDEADBEEF)
//   0x04  data register: reading it pops the oldest word. Bits DW-1:0 are
//         the word, bit 31 is 1 when a word was returned (FIFO not empty),
//         bit 30 is the overflow flag. An empty FIFO reads as zero (apart
//         from the overflow flag).
// Writing 1 to bit 0 of 0x04 clears the FIFO and the overflow flag; other
// writes are ignored, so bits 31:1 of pwdata are unused by design. Accesses complete in one access phase (pready = 1),
// pslverr is 0. prdata is valid in the access phase (combinational read
// of the head word) and the pop happens at the end of that phase.
//
// The two registers, their order and the constant follow the source
// design. It leaves the FIFO's depth, width, flags and clocking open: here
// both sides share one clock, the depth is 512 and a word is one octet.
module apbfifo #(
  parameter int unsigned DW        = 8,            // bits per FIFO word (<= 30)
  parameter int unsigned DEPTH     = 512,          // words, power of two
  parameter logic [31:0] CAP_VALUE = 32'hDEADBEEF  // capability register
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (deserialized data)
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  // APB slave
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [7:0]    paddr,
  input  logic [31:0]   pwdata,
  output logic [31:0]   prdata,
  output logic          pready,
  output logic          pslverr,
  // status
  output logic          empty,
  output logic          full,
  output logic          overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DW <= 30) else $error("apbfifo: DW must leave room for the flags");
    assert ((1 << AW) == DEPTH) else $error("apbfifo: DEPTH must be a power of two");
  end

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wptr_q, rptr_q;
  logic          ovf_q;

  logic acc, rd_data, wr_ctrl, pop, push, clr;
  always_comb begin
    empty   = (wptr_q == rptr_q);
    full    = (wptr_q[AW-1:0] == rptr_q[AW-1:0]) && (wptr_q[AW] != rptr_q[AW]);
    acc     = psel && penable;
    rd_data = acc && !pwrite && (paddr[7:2] == 6'd1);
    wr_ctrl = acc &&  pwrite && (paddr[7:2] == 6'd1);
    clr     = wr_ctrl && pwdata[0];
    pop     = rd_data && !empty;
    push    = wr_en && !full;
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
      ovf_q  <= 1'b0;
    end else if (clr) begin
      wptr_q <= '0;
      rptr_q <= '0;
      ovf_q  <= 1'b0;
    end else begin
      if (push) wptr_q <= wptr_q + 1'b1;
      if (pop)  rptr_q <= rptr_q + 1'b1;
      if (wr_en && full) ovf_q <= 1'b1;
    end
  end

  always_comb begin
    prdata = '0;
    if (psel && !pwrite) begin
      unique case (paddr[7:2])
        6'd0: prdata = CAP_VALUE;
        6'd1: begin
          prdata[30] = ovf_q;
          if (!empty) begin
            prdata[31]     = 1'b1;
            prdata[DW-1:0] = mem[rptr_q[AW-1:0]];
          end
        end
        default: prdata = '0;
      endcase
    end
  end

  assign pready   = 1'b1;
  assign pslverr  = 1'b0;
  assign overflow = ovf_q;

  // APB: an access phase is always preceded by a setup phase of the same
  // transfer, and the address and direction are held across it.
  a_apb_setup : assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable) |-> $past(psel) && !$past(penable));
  a_apb_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable) |-> $stable(paddr) && $stable(pwrite));

endmodule
