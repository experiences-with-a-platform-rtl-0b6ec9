// Shared definitions for the OFDM transmit modulator.
//
// The host sends a byte stream made of four kinds of block (NCARRIERS, MOD,
// GUARD, DATA). The parser turns that stream into tokens, one token per data
// byte or configuration item, and the tokens flow in order through a FIFO to
// the symbol builder. This package holds the token type, the block
// identifier codes, the subcarrier modulation codes and the constellation
// levels shared by the modules.
//
// The four block types and the byte-wide fields follow the published design; the
// numeric identifier codes, the 4-bit configuration encoding and the
// constellation amplitudes are this design's own choices.
package ofdm_pkg;

  // Number of IFFT inputs / subcarriers and its log2.
  localparam int unsigned NFFT  = 256;
  localparam int unsigned LOG2N = 8;

  // Width of one real or imaginary sample component.
  localparam int unsigned SW = 16;

  typedef logic signed [SW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Block identifier bytes (the codes are this design's choice).
  localparam logic [7:0] ID_NCARRIERS = 8'h01;
  localparam logic [7:0] ID_MOD       = 8'h02;
  localparam logic [7:0] ID_GUARD     = 8'h03;
  localparam logic [7:0] ID_DATA      = 8'h04;

  // Token kinds passed from the parser to the symbol builder.
  typedef enum logic [1:0] {
    TK_DATA  = 2'd0,  // data = subcarrier data byte
    TK_MOD   = 2'd1,  // addr = first modulator, data = {cfg[addr+1], cfg[addr]}
    TK_NCARR = 2'd2,  // data = carriers consumed per symbol, 0 means 256
    TK_GUARD = 2'd3   // data = guard interval length in samples
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e  kind;
    logic [7:0] addr;
    logic [7:0] data;
  } token_t;

  // Subcarrier modulation select (low two bits of a modulator's 4-bit
  // configuration nibble; bit 3 of the nibble is the enable).
  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_e;

  typedef struct packed {
    logic       en;
    logic       rsvd;
    mod_e       mod;
  } mod_cfg_t;

  // Constellation unit levels: 16384 scaled by the 802.11a normalisation
  // factors 1, 1/sqrt(2), 1/sqrt(10) and 1/sqrt(42), rounded.
  localparam int K_BPSK  = 16384;
  localparam int K_QPSK  = 11585;
  localparam int K_QAM16 = 5181;
  localparam int K_QAM64 = 2528;

  // Reverse the order of the LOG2N index bits.
  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] v);
    for (int i = 0; i < LOG2N; i++) bitrev[i] = v[LOG2N-1-i];
  endfunction

endpackage
