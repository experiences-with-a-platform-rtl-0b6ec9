// Self-checking testbench for symbol_builder.
//
// A show-ahead token queue stands in for the FIFO and an array for the
// symbol buffer. The token stream configures modulators with all four
// modulations and disabled ones, caps consumption with NCARRIERS, changes
// the guard length between symbols, and places one configuration token in
// the middle of a symbol's data. A model here replays the same tokens and
// predicts every IFFT input of every symbol and the guard length sent with
// it. Also checks that, with tokens waiting and the buffer free, a symbol
// takes exactly 256 cycles, and that nothing is written while the buffer
// reports busy.
module tb_symbol_builder;
  import ofdm_pkg::*;
  import ofdm_ref_pkg::*;
  localparam int N = 256;

  logic clk = 1'b0, rst_n;
  always #5 clk = !clk;
  logic tok_valid, tok_pop, wr_ready, wr_en, wr_done, meta_full, meta_push;
  token_t tok;
  logic [7:0] wr_addr, meta_guard;
  cplx_t wr_data;
  symbol_builder #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  token_t toks[$];
  int ti = 0;
  // model state
  int mcfg[N], mncarr = 256, mguard = 0;
  int exp_re[$], exp_im[$], exp_guard[$];
  int got_re[N], got_im[N];
  int nsym = 0, bins_written = 0, busy_writes = 0;
  int sym_t0 = -1, cyc = 0, fast_syms = 0;

  assign tok_valid = (ti < toks.size());
  assign tok = tok_valid ? toks[ti] : '0;

  function automatic token_t mk(tok_kind_e k, int a, int d);
    token_t t;
    t.kind = k; t.addr = 8'(a); t.data = 8'(d);
    return t;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL %s", what); end
  endtask

  // Replay the token list through the model to build expectations.
  task automatic model();
    int p, used, re, im;
    p = 0;
    while (p < toks.size()) begin
      if (toks[p].kind != TK_DATA) begin
        apply(toks[p]); p++;
      end else begin
        used = 0;
        for (int b = 0; b < N; b++) begin
          bit need;
          need = mcfg[b][3] && (used < mncarr);
          if (need) begin
            while (toks[p].kind != TK_DATA) begin apply(toks[p]); p++; end
            map(mcfg[b] & 3, int'(toks[p].data), re, im); p++; used++;
          end else begin re = 0; im = 0; end
          exp_re.push_back(re); exp_im.push_back(im);
        end
        exp_guard.push_back(mguard);
      end
    end
  endtask

  task automatic apply(token_t t);
    case (t.kind)
      TK_MOD:   begin mcfg[t.addr] = int'(t.data) & 15; mcfg[(int'(t.addr) + 1) % N] = int'(t.data) >> 4; end
      TK_NCARR: mncarr = (t.data == 0) ? 256 : int'(t.data);
      TK_GUARD: mguard = int'(t.data);
      default: ;
    endcase
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // consumer side
  always @(posedge clk) if (rst_n) begin
    if (tok_pop) ti <= ti + 1;
    if (wr_en && !wr_ready) busy_writes++;
    if (wr_en) begin
      if (wr_addr == 0) sym_t0 <= cyc;
      got_re[wr_addr] <= int'(wr_data.re);
      got_im[wr_addr] <= int'(wr_data.im);
      bins_written++;
    end
    if (meta_push) begin
      chk(exp_guard.size() > 0 && meta_guard == 8'(exp_guard[0]), $sformatf("guard of symbol %0d", nsym));
      if (exp_guard.size() > 0) void'(exp_guard.pop_front());
      if (cyc - sym_t0 == 255) fast_syms++;
    end
  end

  // compare a finished symbol one cycle after its last write
  always @(posedge clk) if (rst_n && meta_push) begin
    #1;
    wr_ready = (nsym == 1) ? 1'b0 : wr_ready;
    for (int b = 0; b < N; b++) begin
      chk(got_re[b] == exp_re[0] && got_im[b] == exp_im[0],
          $sformatf("sym %0d bin %0d got (%0d,%0d) want (%0d,%0d)", nsym, b, got_re[b], got_im[b], exp_re[0], exp_im[0]));
      void'(exp_re.pop_front()); void'(exp_im.pop_front());
    end
    nsym++;
  end

  initial begin
    int d;
    for (int i = 0; i < N; i++) mcfg[i] = 0;
    // config 1: bins 0..63 enabled, all four modulations, bins 10,11 disabled
    toks.push_back(mk(TK_NCARR, 0, 0));
    toks.push_back(mk(TK_GUARD, 0, 64));
    for (int a = 0; a < 64; a += 2) begin
      int lo, hi;
      lo = 8 | (a / 2) % 4; hi = 8 | ((a / 2) + 1) % 4;
      if (a == 10) begin lo = 0; hi = 0; end
      toks.push_back(mk(TK_MOD, a, hi * 16 + lo));
    end
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < 62; i++) toks.push_back(mk(TK_DATA, 0, $urandom_range(255)));
    // config 2: NCARRIERS 40 caps the 62 enabled, guard 16, enable bins 250..255
    toks.push_back(mk(TK_NCARR, 0, 40));
    toks.push_back(mk(TK_GUARD, 0, 16));
    toks.push_back(mk(TK_MOD, 250, 'h9B));
    toks.push_back(mk(TK_MOD, 252, 'hA8));
    toks.push_back(mk(TK_MOD, 254, 'hB9));
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 40; i++) toks.push_back(mk(TK_DATA, 0, $urandom_range(255)));
    // config 3: a MOD token in the middle of a symbol's data disables bin 63
    toks.push_back(mk(TK_NCARR, 0, 70));
    for (int i = 0; i < 30; i++) toks.push_back(mk(TK_DATA, 0, $urandom_range(255)));
    toks.push_back(mk(TK_MOD, 62, 'h0B));
    for (int i = 0; i < 37; i++) toks.push_back(mk(TK_DATA, 0, $urandom_range(255)));
    model();

    rst_n = 1'b0; wr_ready = 1'b1; meta_full = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // buffer busy for a while after the second symbol is handed over
    wait (nsym == 2);
    wr_ready <= 1'b0;
    repeat (300) @(posedge clk);
    wr_ready <= 1'b1;
    wait (nsym == 6);
    repeat (3) @(posedge clk);
    chk(ti == toks.size(), $sformatf("tokens consumed %0d of %0d", ti, toks.size()));
    chk(busy_writes == 0, "write while buffer busy");
    chk(fast_syms >= 4, $sformatf("only %0d symbols took 256 cycles", fast_syms));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
