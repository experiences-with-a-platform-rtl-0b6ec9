// Ping-pong symbol buffer: two banks of N complex samples.
//
// The writer fills one bank at any addresses and in any order, then pulses
// wr_done to hand the bank over; the reader reads the other bank with one
// cycle of latency (rd_data is registered and holds while rd_en is low) and
// pulses rd_done to give it back. wr_ready says the writer's current bank is
// free, rd_ready that the reader's current bank is full. The design uses one
// such buffer in front of the IFFT (natural-order symbol assembly) and one
// behind it (bit-reversal reordering and cyclic-prefix reads). Double
// buffering is this design's choice; the published design does not describe the
// symbol storage.
module symbol_buffer
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_addr,
  input  cplx_t                wr_data,
  input  logic                 wr_done,
  output logic                 wr_ready,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] rd_addr,
  output cplx_t                rd_data,
  input  logic                 rd_done,
  output logic                 rd_ready
);
  cplx_t mem0 [N];
  cplx_t mem1 [N];
  logic  wbank, rbank;
  logic [1:0] full;

  assign wr_ready = !full[wbank];
  assign rd_ready = full[rbank];

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready && !wbank) mem0[wr_addr] <= wr_data;
    if (wr_en && wr_ready &&  wbank) mem1[wr_addr] <= wr_data;
    if (rd_en) rd_data <= rbank ? mem1[rd_addr] : mem0[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      rbank <= 1'b0;
      full  <= '0;
    end else begin
      if (wr_done && wr_ready) begin
        full[wbank] <= 1'b1;
        wbank       <= !wbank;
      end
      if (rd_done && rd_ready) begin
        full[rbank] <= 1'b0;
        rbank       <= !rbank;
      end
    end
  end

  a_wr_free: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready);
  a_rd_full: assert property (@(posedge clk) disable iff (!rst_n) rd_done |-> rd_ready);
endmodule
