// End-to-end testbench for ofdm_tx_top at its default size.
//
// Builds host packets with the four block types and, in parallel, a model
// of what must come out: the modulator configuration, the IFFT inputs of
// every symbol (reference mapping), their inverse DFT and the cyclic
// prefix. Every output sample is compared within +-3 LSB.
//
// Burst 1 is an 802.11a-style frame placed on 256-point bins (802.11a
// subcarrier k -> bin k mod 256): short training symbols on 12 QPSK
// carriers with no guard, long training on 52 BPSK carriers with a 128
// sample guard, a SIGNAL symbol and a 64-QAM payload with BPSK pilots and
// a 64-sample guard, then a 16-QAM symbol whose 52 enabled carriers are
// capped by NCARRIERS 40. An unknown identifier byte sits between blocks.
// After a pause (the IFFT must drain itself) burst 2 fills all 256
// carriers with a 255-sample guard for sixteen symbols, enough to fill the
// token FIFO, and then drops to 52 carriers with no guard. Burst 3 sends
// the small example packet of the published design (NCARRIERS 64, GUARD
// 64, 32 MOD items, two DATA blocks of 64 bytes), a symbol with a single
// subcarrier, and a 112-carrier (35 MHz) 64-QAM band that moves from
// positive to negative frequencies and then splits into two sub-bands.
// Host bytes arrive with occasional idle cycles.
//
// Mechanisms counted, each of which must occur: parser error, host
// backpressure, IFFT drain of a symbol with no successor, IFFT stall on a
// full output buffer, a change of guard between symbols of one frame,
// NCARRIERS cap, disabled carriers, each modulation, a full 256-carrier
// symbol, a single-carrier symbol, a change of the used band between
// symbols. Symbols of a burst with only data between them must leave back
// to back (N+G cycles apart); a symbol preceded by configuration bytes may
// start later, never earlier, and the largest such delay is reported.
module tb_ofdm_tx_top;
  import ofdm_pkg::*;
  import ofdm_ref_pkg::*;
  localparam int N = 256;

  logic clk = 1'b0, rst_n;
  always #5 clk = !clk;
  logic       host_valid, host_ready, dac_valid, sym_start, parse_error;
  logic [7:0] host_data;
  sample_t    dac_i, dac_q;

  ofdm_tx_top dut (.*);

  int checks = 0, failures = 0;
  byte unsigned bytes[$];
  int pend[$];                 // data bytes not yet put into DATA blocks
  int mcfg[N], mncarr = 256, mguard = 0;
  int exp_i[$], exp_q[$], exp_len[$], exp_burst[$];
  int burst = 0, nsym = 0;
  // mechanism counters
  int n_err = 0, n_backpressure = 0, n_drain = 0, n_stall = 0, n_guard_change = 0;
  int n_cap = 0, n_disabled = 0, n_mod[4] = '{0, 0, 0, 0}, n_full = 0;
  int last_guard = -1;
  int n_single = 0, n_move = 0, n_fig8 = 0;
  int cfg_since = 0, exp_cfg[$], max_cfg_gap = 0;
  int data_blk = 0;             // fixed DATA block size, 0 = random
  bit prev_en[N];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  // ---------------- packet and model building ----------------
  task automatic flush_data();
    while (pend.size() > 0) begin
      int n;
      n = (data_blk > 0) ? data_blk : $urandom_range(1, 256);
      if (n > pend.size()) n = pend.size();
      bytes.push_back(ID_DATA);
      bytes.push_back(8'(n));
      for (int i = 0; i < n; i++) bytes.push_back(8'(pend.pop_front()));
    end
  endtask

  task automatic set_ncarr(int v);
    flush_data();
    bytes.push_back(ID_NCARRIERS); bytes.push_back(8'(v));
    cfg_since += 2;
    mncarr = (v == 0) ? 256 : v;
  endtask

  task automatic set_guard(int g);
    flush_data();
    bytes.push_back(ID_GUARD); bytes.push_back(8'(g));
    cfg_since += 2;
    mguard = g;
  endtask

  // write the whole table from new_cfg, as 128 MOD items
  task automatic set_mod(int new_cfg[N]);
    flush_data();
    bytes.push_back(ID_MOD); bytes.push_back(8'd128);
    cfg_since += 258;
    for (int a = 0; a < N; a += 2) begin
      bytes.push_back(8'(a));
      bytes.push_back(8'((new_cfg[a+1] << 4) | new_cfg[a]));
    end
    mcfg = new_cfg;
  endtask

  // write cnt MOD items for modulators lo .. lo+2*cnt-1 only
  task automatic set_mod_items(int lo, int cnt, int new_cfg[N]);
    flush_data();
    bytes.push_back(ID_MOD); bytes.push_back(8'(cnt));
    cfg_since += 2 + 2 * cnt;
    for (int i = 0; i < cnt; i++) begin
      int a;
      a = (lo + 2 * i) % N;
      bytes.push_back(8'(a));
      bytes.push_back(8'((new_cfg[(a+1) % N] << 4) | new_cfg[a]));
      mcfg[a] = new_cfg[a]; mcfg[(a+1) % N] = new_cfg[(a+1) % N];
    end
  endtask

  task automatic symbol();
    int xr[N], xi[N], used, en_cnt, dis;
    real tr[N], ti[N];
    used = 0; en_cnt = 0; dis = 0;
    for (int b = 0; b < N; b++) begin
      xr[b] = 0; xi[b] = 0;
      if (mcfg[b][3]) en_cnt++;
      if (mcfg[b][3] && used < mncarr) begin
        int d;
        d = $urandom_range(255);
        pend.push_back(d);
        map(mcfg[b] & 3, d, xr[b], xi[b]);
        n_mod[mcfg[b] & 3]++;
        used++;
      end else if (!mcfg[b][3]) dis = 1;
    end
    if (en_cnt > mncarr) n_cap++;
    if (dis != 0) n_disabled++;
    if (used == N) n_full++;
    if (used == 1) n_single++;
    if (exp_burst.size() > 0 && exp_burst[exp_burst.size()-1] == burst) begin
      int moved;
      moved = 0;
      for (int b = 0; b < N; b++) if (prev_en[b] != mcfg[b][3]) moved = 1;
      if (moved != 0) n_move++;
    end
    for (int b = 0; b < N; b++) prev_en[b] = mcfg[b][3];
    if (last_guard >= 0 && last_guard != mguard && exp_burst.size() > 0 &&
        exp_burst[exp_burst.size()-1] == burst) n_guard_change++;
    last_guard = mguard;
    idft(xr, xi, tr, ti);
    for (int n = N - mguard; n < N; n++) begin exp_i.push_back($rtoi(tr[n] * 1024.0)); exp_q.push_back($rtoi(ti[n] * 1024.0)); end
    for (int n = 0; n < N; n++)          begin exp_i.push_back($rtoi(tr[n] * 1024.0)); exp_q.push_back($rtoi(ti[n] * 1024.0)); end
    exp_len.push_back(N + mguard);
    exp_burst.push_back(burst);
    exp_cfg.push_back(cfg_since);
    cfg_since = 0;
  endtask

  function automatic int bin_of(int k);   // 802.11a subcarrier -> 256-point bin
    return (k + N) % N;
  endfunction

  // ---------------- output checking ----------------
  int start_cyc[$];
  int cyc = 0, got = 0, first_in = -1, first_out = -1;
  real max_err = 0.0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (parse_error) n_err++;
      if (host_valid && !host_ready) n_backpressure++;
      if (dut.u_ifft.draining) n_drain++;
      if (!dut.u_ifft.en) n_stall++;
      if (sym_start) start_cyc.push_back(cyc);
      if (host_valid && host_ready && first_in < 0) first_in = cyc;
      if (dac_valid && first_out < 0) first_out = cyc;
      if (dac_valid) begin
        if (exp_i.size() == 0) chk(0, "extra output sample");
        else begin
          real di, dq;
          di = real'(dac_i) - real'(exp_i[0]) / 1024.0;
          dq = real'(dac_q) - real'(exp_q[0]) / 1024.0;
          checks++;
          if (di > max_err) max_err = di;
          if (-di > max_err) max_err = -di;
          if (dq > max_err) max_err = dq;
          if (-dq > max_err) max_err = -dq;
          if (di > 3.0 || di < -3.0 || dq > 3.0 || dq < -3.0) begin
            failures++;
            if (failures < 8) $display("sample %0d got (%0d,%0d) want (%f,%f)", got, dac_i, dac_q,
                                       real'(exp_i[0]) / 1024.0, real'(exp_q[0]) / 1024.0);
          end
          void'(exp_i.pop_front()); void'(exp_q.pop_front());
          got++;
        end
      end
    end
  end

  // ---------------- host driver ----------------
  int bi = 0;
  task automatic send_all();
    while (bi < bytes.size()) begin
      bit fire;
      host_valid <= ($urandom_range(15) != 0);
      host_data  <= bytes[bi];
      @(negedge clk);
      fire = host_valid && host_ready;
      @(posedge clk);
      if (fire) bi++;
    end
    host_valid <= 1'b0;
  endtask

  initial begin
    int c[N], total;
    for (int b = 0; b < N; b++) begin mcfg[b] = 0; c[b] = 0; end

    // ---- burst 1: 802.11a-style frame ----
    burst = 1;
    for (int k = -24; k <= 24; k += 4) if (k != 0) c[bin_of(k)] = 8 | int'(MOD_QPSK);
    set_ncarr(12); set_guard(0); set_mod(c);
    symbol(); symbol();
    for (int b = 0; b < N; b++) c[b] = 0;
    for (int k = -26; k <= 26; k++) if (k != 0) c[bin_of(k)] = 8 | int'(MOD_BPSK);
    set_ncarr(52); set_guard(128); set_mod(c);
    symbol(); symbol();
    set_guard(64);
    symbol();                                  // SIGNAL, BPSK
    bytes.push_back(8'hEE);                    // unknown identifier
    for (int k = -26; k <= 26; k++)
      if (k != 0) c[bin_of(k)] = (k == 7 || k == -7 || k == 21 || k == -21) ? (8 | int'(MOD_BPSK)) : (8 | int'(MOD_QAM64));
    set_mod(c);
    symbol(); symbol(); symbol();
    for (int k = -26; k <= 26; k++) if (k != 0) c[bin_of(k)] = 8 | int'(MOD_QAM16);
    set_ncarr(40); set_mod(c);
    symbol();
    flush_data();

    rst_n = 1'b0; host_valid = 1'b0; host_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send_all();
    wait (exp_i.size() == 0);
    repeat (2000) @(posedge clk);             // pause

    // ---- burst 2: full band, then 52 carriers without guard ----
    burst = 2;
    for (int b = 0; b < N; b++) c[b] = 8 | int'(MOD_QAM16);
    set_ncarr(0); set_guard(255); set_mod(c);
    repeat (16) symbol();
    for (int b = 0; b < N; b++) c[b] = 0;
    for (int k = -26; k <= 26; k++) if (k != 0) c[bin_of(k)] = 8 | int'(MOD_QPSK);
    set_ncarr(52); set_guard(0); set_mod(c);
    symbol(); symbol(); symbol();
    flush_data();
    send_all();
    wait (exp_i.size() == 0);
    repeat (2000) @(posedge clk);              // pause

    // ---- burst 3: example packet, one carrier, moving 112-carrier band ----
    burst = 3;
    for (int b = 0; b < N; b++) c[b] = 0;
    set_mod(c);
    // the example packet: NCARRIERS 64, GUARD 64, 32 MOD items, 2 x DATA 64
    for (int b = 0; b < 64; b++) c[b] = 8 | $urandom_range(3);
    set_ncarr(64); set_guard(64); set_mod_items(0, 32, c);
    data_blk = 64;
    symbol(); symbol();
    flush_data();
    data_blk = 0;
    n_fig8 += 2;
    // a single subcarrier
    for (int b = 0; b < N; b++) c[b] = 0;
    c[200] = 8 | int'(MOD_BPSK);
    set_ncarr(1); set_guard(16); set_mod(c);
    symbol();
    // 112 carriers (35 MHz) of 64-QAM at positive frequencies, then moved
    // to negative frequencies, then split into two sub-bands with a hole
    for (int b = 0; b < N; b++) c[b] = (b >= 8 && b < 120) ? (8 | int'(MOD_QAM64)) : 0;
    set_ncarr(112); set_guard(32); set_mod(c);
    symbol(); symbol();
    for (int b = 0; b < N; b++) c[b] = (b >= 144) ? (8 | int'(MOD_QAM64)) : 0;
    set_mod(c);
    symbol(); symbol();
    for (int b = 0; b < N; b++)
      c[b] = (b >= 20 && b < 76) ? (8 | int'(MOD_QPSK)) : (b >= 180 && b < 236) ? (8 | int'(MOD_QAM16)) : 0;
    set_mod(c);
    symbol();
    flush_data();
    send_all();
    wait (exp_i.size() == 0);
    repeat (20) @(posedge clk);

    total = exp_len.size();
    chk(start_cyc.size() == total, $sformatf("%0d symbols sent, %0d expected", start_cyc.size(), total));
    for (int s = 1; s < total && s < start_cyc.size(); s++)
      if (exp_burst[s] == exp_burst[s-1] && s > 2) begin
        int gap;
        gap = start_cyc[s] - start_cyc[s-1] - exp_len[s-1];
        // with nothing but data in between, symbols must leave back to back;
        // configuration bytes in between may delay a symbol, never advance it
        if (exp_cfg[s] == 0)
          chk(gap == 0, $sformatf("symbol %0d started %0d cycles late", s, gap));
        else begin
          chk(gap >= 0, $sformatf("symbol %0d started %0d cycles early", s, -gap));
          if (gap > max_cfg_gap) max_cfg_gap = gap;
        end
      end
    chk(n_err == 1, $sformatf("parse errors %0d", n_err));
    chk(n_backpressure > 0, "host backpressure never happened");
    chk(n_drain > 0, "IFFT drain never happened");
    chk(n_stall > 0, "IFFT stall never happened");
    chk(n_guard_change > 0, "guard change never happened");
    chk(n_cap > 0, "NCARRIERS cap never happened");
    chk(n_disabled > 0, "no disabled carriers");
    for (int m = 0; m < 4; m++) chk(n_mod[m] > 0, $sformatf("modulation %0d unused", m));
    chk(n_full > 0, "no full-band symbol");
    chk(n_single > 0, "no single-carrier symbol");
    chk(n_move > 0, "the used band never moved between symbols");
    chk(n_fig8 > 0, "example packet not sent");
    $display("first host byte to first output sample: %0d cycles", first_out - first_in);
    $display("largest output error: %f LSB", max_err);
    $display("largest gap after a reconfiguration: %0d cycles", max_cfg_gap);
    $display("symbols=%0d samples=%0d errors=%0d backpressure=%0d drain=%0d stall=%0d guard_changes=%0d cap=%0d disabled=%0d mods=%0d/%0d/%0d/%0d full=%0d single=%0d moves=%0d",
             total, got, n_err, n_backpressure, n_drain, n_stall, n_guard_change, n_cap, n_disabled,
             n_mod[0], n_mod[1], n_mod[2], n_mod[3], n_full, n_single, n_move);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
