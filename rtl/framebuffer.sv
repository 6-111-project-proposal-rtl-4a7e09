// framebuffer: the double-buffered point memory ("BRAM controller").
//
// Two banks of DEPTH points. The network side writes points in order into
// the write bank; the display side reads the other bank. The bank is filled
// with a complete frame when a point flagged last arrives or the bank is
// full; further points are then ignored. Points arrive in datagrams whose
// integrity is known only at their end, so each datagram is closed by
// wr_commit (keep its points) or wr_abort (rewind the write pointer to where
// the datagram began). A commit that closes a filled bank swaps the banks:
// the just-written bank goes to the display with frame_len = number of
// points written, and the old display bank becomes the next write bank.
// A frame cut off by a network outage, or holding a corrupted datagram,
// therefore never reaches the display. frame_len is 0 until the first swap.
// Memory: one array of 2*DEPTH points, bank select in the top address bit,
// one write port and one registered read port (block RAM friendly).
// Timing: rd_pt is valid one clock after rd_addr; a swap happens in the
// clock after wr_commit and is seen by the reader from the clock after.
module framebuffer
  import laser_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      wr_valid,
  input  point_t                    wr_pt,
  input  logic                      wr_last,
  input  logic                      wr_commit,
  input  logic                      wr_abort,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output point_t                    rd_pt,
  output logic [$clog2(DEPTH):0]    frame_len,
  output logic                      swap
);

  localparam int AW = $clog2(DEPTH);

  point_t          mem [2*DEPTH];
  logic            wbank;       // bank being written; display reads !wbank
  logic [AW:0]     wptr;        // points written to the write bank
  logic [AW:0]     cptr;        // points of committed datagrams
  logic            filled;      // frame complete, waiting for the commit

  always_ff @(posedge clk) begin
    if (wr_valid && !filled) mem[{wbank, wptr[AW-1:0]}] <= wr_pt;
    rd_pt <= mem[{!wbank, rd_addr}];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank     <= 1'b0;
      wptr      <= '0;
      cptr      <= '0;
      filled    <= 1'b0;
      frame_len <= '0;
      swap      <= 1'b0;
    end else begin
      swap <= 1'b0;
      if (wr_abort) begin
        wptr   <= cptr;
        filled <= 1'b0;
      end else if (wr_commit) begin
        if (filled) begin
          wbank     <= !wbank;
          wptr      <= '0;
          cptr      <= '0;
          filled    <= 1'b0;
          frame_len <= wptr;
          swap      <= 1'b1;
        end else begin
          cptr <= wptr;
        end
      end else if (wr_valid && !filled) begin
        wptr <= wptr + 1'b1;
        if (wr_last || wptr == (AW+1)'(DEPTH - 1)) filled <= 1'b1;
      end
    end
  end

  a_close_once: assert property (@(posedge clk) disable iff (rst) !(wr_commit && wr_abort));
  a_len_fits:   assert property (@(posedge clk) disable iff (rst) frame_len <= (AW+1)'(DEPTH));

endmodule
