// Synchronous show-ahead FIFO.
//
// Buffers parsed tokens between the host interface and the subcarrier
// modulation unit, so the host can deliver a packet in a burst while the
// modulator consumes it at the symbol rate. The storage is a plain array
// (block RAM); the head entry is always visible on rd_data while empty is
// low, and rd_en pops it. A write to a full FIFO and a read from an empty
// one are ignored (and flagged by assertions). Depth is a power of two. The
// published design only speaks of the depth of the host-to-FPGA buffering; the
// depth and the show-ahead interface are this design's choice.
module sync_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
