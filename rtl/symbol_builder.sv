// Subcarrier modulation unit: assembles one OFDM symbol at a time.
//
// It holds the configuration of the 256 subcarrier modulators (enable and
// modulation type per IFFT input), the number of data bytes consumed per
// symbol (NCARRIERS) and the guard interval length. Tokens arrive in stream
// order from the token FIFO. Between symbols, configuration tokens are
// applied as they reach the head of the FIFO. A DATA token at the head
// starts a symbol: the unit scans IFFT inputs 0..255, one per cycle, the
// first of them in the same cycle and the next symbol right after the last. An
// enabled input takes the next data byte and writes its constellation point;
// a disabled input, or an enabled one after NCARRIERS bytes were already
// used in this symbol, gets zero and consumes nothing. If the FIFO runs dry
// mid-symbol the scan waits; a configuration token met while a data byte is
// awaited is applied in order first. After input 255 the symbol buffer bank
// is handed over and the guard length in force is pushed, with the symbol,
// to the guard-insertion stage.
//
// Timing: 256 cycles per symbol (one per IFFT input), plus one per
// configuration token and per cycle the FIFO is empty while a byte is due.
// The scan starts only when a symbol-buffer bank and a guard-queue slot
// are free. The zero insertion for disabled subcarriers,
// the per-carrier enable and modulation, NCARRIERS and GUARD follow the
// published design; the nibble encoding (bit 3 enable, bits 1:0 modulation), the
// reset state (all disabled, 256 carriers, no guard) and the cap on
// consumption are this design's choices.
module symbol_builder
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // token FIFO, show-ahead
  input  logic                 tok_valid,
  input  token_t               tok,
  output logic                 tok_pop,
  // IFFT input buffer write port
  input  logic                 wr_ready,
  output logic                 wr_en,
  output logic [$clog2(N)-1:0] wr_addr,
  output cplx_t                wr_data,
  output logic                 wr_done,
  // guard length queue
  input  logic                 meta_full,
  output logic                 meta_push,
  output logic [7:0]           meta_guard
);
  localparam int unsigned AW = $clog2(N);

  mod_cfg_t         cfg [N];
  logic [AW:0]      ncarr;    // 1..N
  logic [7:0]       guard;
  logic             busy;     // a symbol is part-way through
  logic             scanning; // an IFFT input is handled this cycle
  logic [AW-1:0]    bin;
  logic [AW:0]      used;

  mod_cfg_t         cur;
  logic             need;     // this input wants a data byte
  logic             is_data;
  logic             apply;    // apply a configuration token this cycle
  logic             advance;
  sample_t          map_re, map_im;

  qam_mapper u_map (.mod(cur.mod), .bits(tok.data), .re(map_re), .im(map_im));

  always_comb begin
    scanning = busy || (tok_valid && (tok.kind == TK_DATA) && wr_ready && !meta_full);
    cur     = cfg[bin];
    need    = cur.en && (used < ncarr);
    is_data = (tok.kind == TK_DATA);
    apply   = tok_valid && !is_data && (!scanning || need);
    advance = scanning && (!need || (tok_valid && is_data));
    tok_pop = apply || (scanning && need && tok_valid && is_data);
    wr_en   = advance;
    wr_addr = bin;
    wr_data = need ? cplx_t'{re: map_re, im: map_im} : cplx_t'('0);
    wr_done = advance && (bin == AW'(N-1));
    meta_push  = wr_done;
    meta_guard = guard;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cfg[i] <= '0;
      ncarr    <= (AW+1)'(N);
      guard    <= '0;
      busy     <= 1'b0;
      bin      <= '0;
      used     <= '0;
    end else begin
      if (apply) begin
        unique case (tok.kind)
          TK_MOD: begin
            cfg[tok.addr[AW-1:0]]        <= mod_cfg_t'(tok.data[3:0]);
            cfg[tok.addr[AW-1:0] + 1'b1] <= mod_cfg_t'(tok.data[7:4]);
          end
          TK_NCARR: ncarr <= (tok.data == 8'd0) ? (AW+1)'(N) : (AW+1)'(tok.data);
          TK_GUARD: guard <= tok.data;
          default: ;
        endcase
      end
      if (advance) begin
        bin  <= bin + 1'b1;
        busy <= (bin != AW'(N-1));
        if (bin == AW'(N-1)) used <= '0;
        else if (need)       used <= used + 1'b1;
      end
    end
  end

  a_buf_free: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready);
endmodule
