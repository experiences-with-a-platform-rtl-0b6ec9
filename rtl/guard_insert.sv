// Guard interval (cyclic prefix) insertion and output sequencing.
//
// For each symbol in the output buffer it sends the last G time samples
// (addresses N-G .. N-1) followed by the whole symbol (0 .. N-1), one sample
// per clock, to the D/A port; G is the guard length that travelled with the
// symbol through the guard queue. The next symbol starts in the cycle after
// the last sample of the previous one when it is ready, so a frame goes out
// without gaps as long as the host keeps up. With no symbol ready the port
// sends zeros with dac_valid low.
//
// Timing: N+G cycles per symbol; a sample leaves one cycle after it is read
// (the buffer read is registered). sym_start marks the first sample of each
// symbol. Copying the tail of the IFFT output to the front follows the
// published design; the idle behaviour is this design's choice.
module guard_insert
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // output buffer read side
  input  logic                 rd_ready,
  output logic                 rd_en,
  output logic [$clog2(N)-1:0] rd_addr,
  input  cplx_t                rd_data,
  output logic                 rd_done,
  // guard length queue
  input  logic                 meta_valid,
  input  logic [7:0]           meta_guard,
  output logic                 meta_pop,
  // D/A port
  output logic                 dac_valid,
  output sample_t              dac_i,
  output sample_t              dac_q,
  output logic                 sym_start
);
  localparam int unsigned AW = $clog2(N);

  logic          active;
  logic [AW:0]   pos;      // 0 .. N+G-1
  logic [AW:0]   total;    // N+G
  logic [7:0]    g;
  logic          go;
  logic [AW:0]   p;
  logic [7:0]    gg;
  logic          sample_q, start_q;

  always_comb begin
    go       = !active && rd_ready && meta_valid;
    meta_pop = go;
    p        = active ? pos : '0;
    gg       = active ? g : meta_guard;
    rd_en    = go || active;
    // positions below G read the tail of the symbol
    if (p < (AW+1)'(gg)) rd_addr = AW'((AW+1)'(N) - (AW+1)'(gg) + p);
    else                 rd_addr = AW'(p - (AW+1)'(gg));
    rd_done  = active && (pos == total - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= 1'b0;
      pos      <= '0;
      total    <= '0;
      g        <= '0;
      sample_q <= 1'b0;
      start_q  <= 1'b0;
    end else begin
      sample_q <= rd_en;
      start_q  <= go;
      if (go) begin
        active <= 1'b1;
        g      <= meta_guard;
        total  <= (AW+1)'(N) + (AW+1)'(meta_guard);
        pos    <= (AW+1)'(1);
      end else if (active) begin
        pos <= pos + 1'b1;
        if (pos == total - 1'b1) active <= 1'b0;
      end
    end
  end

  assign dac_valid = sample_q;
  assign dac_i     = sample_q ? rd_data.re : '0;
  assign dac_q     = sample_q ? rd_data.im : '0;
  assign sym_start = start_q;

  a_rd_ready: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> (rd_ready || active));
endmodule
