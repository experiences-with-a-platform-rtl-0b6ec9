// OFDM transmit modulator for a frequency-agile software radio.
//
// The host performs all bit-level processing (framing, scrambling, coding,
// interleaving, subcarrier assignment) and sends this core a byte stream of
// blocks: NCARRIERS, MOD, GUARD and DATA (see blk_parser). The core turns
// them into an OFDM waveform whose 256 subcarriers are each individually
// enabled and modulated (BPSK, QPSK, 16-QAM or 64-QAM), so software can
// place and resize any number of sub-bands anywhere in the band, and change
// the configuration between any two symbols.
//
//   host bytes -> blk_parser -> token FIFO -> symbol_builder -> input buffer
//     -> ifft256 -> output buffer -> guard_insert -> D/A samples
//
// Configuration travels as tokens in the same FIFO as the data, so a change
// sent between two DATA blocks takes effect exactly between the two
// symbols. The guard length in force when a symbol is built travels with it
// through a small queue to the cyclic-prefix stage.
//
// Interface: valid/ready byte input; one 16-bit I/Q sample per clock out,
// with dac_valid high while a symbol is being sent. The clock is the sample
// clock (80 MHz gives 312.5 kHz subcarrier spacing). Each symbol takes
// 256+G cycles at the output; the pipeline sustains that rate
// back-to-back. The block set, the 256-point IFFT and the control format
// follow the published design; the FIFO depth, the buffering scheme and the
// encodings are this design's choices.
module ofdm_tx_top
  import ofdm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_valid,
  input  logic [7:0] host_data,
  output logic       host_ready,
  output logic       dac_valid,
  output sample_t    dac_i,
  output sample_t    dac_q,
  output logic       sym_start,
  output logic       parse_error
);
  localparam int unsigned TW = $bits(token_t);

  // parser -> token FIFO
  logic   p_valid, p_ready;
  token_t p_tok;
  logic   f_full, f_empty, f_pop;
  token_t f_tok;
  logic [$clog2(FIFO_DEPTH):0] f_count;

  blk_parser u_parser (
    .clk, .rst_n,
    .in_valid (host_valid), .in_data (host_data), .in_ready (host_ready),
    .tok_valid(p_valid), .tok (p_tok), .tok_ready (p_ready),
    .err      (parse_error)
  );

  assign p_ready = !f_full;

  sync_fifo #(.W(TW), .DEPTH(FIFO_DEPTH)) u_tok_fifo (
    .clk, .rst_n,
    .wr_en(p_valid && p_ready), .wr_data(p_tok), .full(f_full),
    .rd_en(f_pop), .rd_data(f_tok), .empty(f_empty), .count(f_count)
  );

  // symbol builder -> input buffer, guard queue
  logic        ib_wr_en, ib_wr_done, ib_wr_ready;
  logic [LOG2N-1:0] ib_wr_addr;
  cplx_t       ib_wr_data;
  logic        m_push, m_full, m_empty, m_pop;
  logic [7:0]  m_guard_in, m_guard_out;
  logic [3:0]  m_count;

  symbol_builder #(.N(NFFT)) u_builder (
    .clk, .rst_n,
    .tok_valid(!f_empty), .tok(f_tok), .tok_pop(f_pop),
    .wr_ready(ib_wr_ready), .wr_en(ib_wr_en), .wr_addr(ib_wr_addr),
    .wr_data(ib_wr_data), .wr_done(ib_wr_done),
    .meta_full(m_full), .meta_push(m_push), .meta_guard(m_guard_in)
  );

  sync_fifo #(.W(8), .DEPTH(8)) u_guard_q (
    .clk, .rst_n,
    .wr_en(m_push), .wr_data(m_guard_in), .full(m_full),
    .rd_en(m_pop), .rd_data(m_guard_out), .empty(m_empty), .count(m_count)
  );

  // input buffer -> IFFT
  logic        ib_rd_en, ib_rd_done, ib_rd_ready;
  logic [LOG2N-1:0] ib_rd_addr;
  cplx_t       ib_rd_data;

  symbol_buffer #(.N(NFFT)) u_in_buf (
    .clk, .rst_n,
    .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ib_wr_data),
    .wr_done(ib_wr_done), .wr_ready(ib_wr_ready),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data),
    .rd_done(ib_rd_done), .rd_ready(ib_rd_ready)
  );

  // IFFT -> output buffer
  logic        x_valid, x_ready, x_last;
  logic [LOG2N-1:0] x_addr;
  cplx_t       x_s;

  ifft256 #(.LOG2N(LOG2N)) u_ifft (
    .clk, .rst_n,
    .in_avail(ib_rd_ready), .in_rd(ib_rd_en), .in_addr(ib_rd_addr),
    .in_data(ib_rd_data), .in_done(ib_rd_done),
    .out_valid(x_valid), .out_ready(x_ready), .out_addr(x_addr),
    .out_s(x_s), .out_last(x_last), .draining()
  );

  logic        ob_rd_en, ob_rd_done, ob_rd_ready;
  logic [LOG2N-1:0] ob_rd_addr;
  cplx_t       ob_rd_data;

  symbol_buffer #(.N(NFFT)) u_out_buf (
    .clk, .rst_n,
    .wr_en(x_valid && x_ready), .wr_addr(x_addr), .wr_data(x_s),
    .wr_done(x_valid && x_ready && x_last), .wr_ready(x_ready),
    .rd_en(ob_rd_en), .rd_addr(ob_rd_addr), .rd_data(ob_rd_data),
    .rd_done(ob_rd_done), .rd_ready(ob_rd_ready)
  );

  // cyclic prefix -> D/A
  guard_insert #(.N(NFFT)) u_guard (
    .clk, .rst_n,
    .rd_ready(ob_rd_ready), .rd_en(ob_rd_en), .rd_addr(ob_rd_addr),
    .rd_data(ob_rd_data), .rd_done(ob_rd_done),
    .meta_valid(!m_empty), .meta_guard(m_guard_out), .meta_pop(m_pop),
    .dac_valid, .dac_i, .dac_q, .sym_start
  );
endmodule
