// 256-point inverse FFT, one complex sample per clock.
//
// Eight radix-2 decimation-in-frequency stages (delays 128, 64, ..., 1) in
// single-path delay-feedback form compute
//   x[n] = 1/256 * sum_k X[k] * exp(+j*2*pi*k*n/256).
// The core reads a complete symbol of 256 frequency-domain inputs, in
// natural order, from a ready bank of the input buffer, one per cycle, and
// emits the 256 time samples in bit-reversed order together with their
// natural index (out_addr), so the consumer can store them in place.
//
// Symbols follow each other without a gap cycle. When no further symbol is
// ready, each stage drains the results it still holds on its own, so the
// last symbol of a burst comes out on time; a symbol that becomes ready
// later simply enters behind it. If the consumer is not ready (out_ready
// low while out_valid is high) the whole pipeline freezes for that cycle.
//
// Latency: the first sample of a symbol appears 265 cycles after its first
// input is read, the last 255 cycles later. The 256-point size and the
// 16-bit output pair follow the published design; the pipeline architecture,
// scaling and flush scheme are this design's choices.
module ifft256 #(
  parameter int unsigned LOG2N = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // input buffer read side (one-cycle read latency)
  input  logic             in_avail,
  output logic             in_rd,
  output logic [LOG2N-1:0] in_addr,
  input  ofdm_pkg::cplx_t  in_data,
  output logic             in_done,
  // time-domain output
  output logic             out_valid,
  input  logic             out_ready,
  output logic [LOG2N-1:0] out_addr,
  output ofdm_pkg::cplx_t  out_s,
  output logic             out_last,
  // status: some stage is draining a finished symbol with no input behind it
  output logic             draining
);
  import ofdm_pkg::cplx_t;

  localparam int unsigned N = 1 << LOG2N;

  logic             en;
  logic             active;
  logic [LOG2N-1:0] feed_cnt;
  logic             go;
  logic             s0_vld;
  logic [LOG2N-1:0] out_cnt;

  logic  vld   [LOG2N+1];
  cplx_t smp   [LOG2N+1];
  logic [LOG2N-1:0] drain;

  // ---------------- feeder ----------------
  always_comb begin
    go      = !active && in_avail;
    in_rd   = en && (go || active);
    in_addr = active ? feed_cnt : '0;
    in_done = en && active && (feed_cnt == LOG2N'(N-1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= 1'b0;
      feed_cnt <= '0;
      s0_vld   <= 1'b0;
    end else if (en) begin
      s0_vld <= go || active;
      if (go) begin
        active   <= 1'b1;
        feed_cnt <= LOG2N'(1);
      end else if (active) begin
        feed_cnt <= feed_cnt + 1'b1;
        if (feed_cnt == LOG2N'(N-1)) active <= 1'b0;
      end
    end
  end

  assign vld[0] = s0_vld;
  assign smp[0] = in_data;

  // ---------------- butterfly stages ----------------
  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    ifft_sdf_stage #(.N(N), .L(N >> (s + 1))) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (en),
      .in_vld  (vld[s]),
      .in_s    (smp[s]),
      .out_vld (vld[s+1]),
      .out_s   (smp[s+1]),
      .draining(drain[s])
    );
  end

  // ---------------- output ----------------
  assign out_valid = vld[LOG2N];
  assign draining  = |drain;
  assign out_s     = smp[LOG2N];
  always_comb begin
    for (int i = 0; i < LOG2N; i++) out_addr[i] = out_cnt[LOG2N-1-i];
  end
  assign out_last  = (out_cnt == LOG2N'(N-1));
  assign en        = !(out_valid && !out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) out_cnt <= '0;
    else if (en && vld[LOG2N]) out_cnt <= out_cnt + 1'b1;
  end
endmodule
