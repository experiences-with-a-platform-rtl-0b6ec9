// Host packet parser.
//
// The host describes what to transmit as a sequence of blocks, each an
// identifier byte followed by block-specific bytes:
//   NCARRIERS n          carriers consumed per OFDM symbol (0 encodes 256)
//   GUARD g              guard interval length in samples
//   MOD m {addr cfg}*m   m items, each configuring modulators addr and addr+1
//                        (cfg[3:0] -> addr, cfg[7:4] -> addr+1)
//   DATA n byte*n        n subcarrier data bytes (0 encodes 256)
// The parser walks this grammar one byte per cycle and emits one token per
// data byte, per MOD item and per NCARRIERS/GUARD value, keeping the order
// of the stream, so configuration changes stay in step with the data they
// apply to. Identifier and count bytes emit nothing. An unknown identifier
// byte is skipped and reported with a one-cycle err pulse.
//
// Interface: valid/ready byte input; valid/ready token output. A byte that
// produces a token is accepted only when the token is accepted in the same
// cycle (tok_valid follows in_valid combinationally); other bytes are always
// accepted. The block types and their layout follow the published design; the
// identifier codes, the zero-means-256 counts and the error handling are
// this design's choices.
module blk_parser
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       tok_valid,
  output token_t     tok,
  input  logic       tok_ready,
  output logic       err
);
  typedef enum logic [2:0] {
    S_ID, S_NCARR, S_GUARD, S_MODCNT, S_MODADDR, S_MODCFG, S_DATACNT, S_DATA
  } state_e;

  state_e     state;
  logic [8:0] remain;     // items or bytes left in the current block
  logic [7:0] mod_addr;
  logic       emits;
  logic       take;

  always_comb begin
    emits = (state == S_NCARR) || (state == S_GUARD) ||
            (state == S_MODCFG) || (state == S_DATA);
    in_ready  = emits ? tok_ready : 1'b1;
    tok_valid = in_valid && emits;
    take      = in_valid && in_ready;
    tok.addr  = '0;
    tok.data  = in_data;
    unique case (state)
      S_NCARR:  tok.kind = TK_NCARR;
      S_GUARD:  tok.kind = TK_GUARD;
      S_MODCFG: begin
        tok.kind = TK_MOD;
        tok.addr = mod_addr;
      end
      default:  tok.kind = TK_DATA;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_ID;
      remain   <= '0;
      mod_addr <= '0;
      err      <= 1'b0;
    end else begin
      err <= 1'b0;
      if (take) begin
        unique case (state)
          S_ID: begin
            unique case (in_data)
              ID_NCARRIERS: state <= S_NCARR;
              ID_GUARD:     state <= S_GUARD;
              ID_MOD:       state <= S_MODCNT;
              ID_DATA:      state <= S_DATACNT;
              default:      err   <= 1'b1;
            endcase
          end
          S_NCARR, S_GUARD: state <= S_ID;
          S_MODCNT: begin
            remain <= {1'b0, in_data};
            state  <= (in_data == 8'd0) ? S_ID : S_MODADDR;
          end
          S_MODADDR: begin
            mod_addr <= in_data;
            state    <= S_MODCFG;
          end
          S_MODCFG: begin
            remain <= remain - 1'b1;
            state  <= (remain == 9'd1) ? S_ID : S_MODADDR;
          end
          S_DATACNT: begin
            remain <= (in_data == 8'd0) ? 9'd256 : {1'b0, in_data};
            state  <= S_DATA;
          end
          S_DATA: begin
            remain <= remain - 1'b1;
            if (remain == 9'd1) state <= S_ID;
          end
          default: state <= S_ID;
        endcase
      end
    end
  end

  a_tok_kept: assert property (@(posedge clk) disable iff (!rst_n)
                               tok_valid && !tok_ready |-> !in_ready);
endmodule
