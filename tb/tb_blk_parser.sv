// Self-checking testbench for blk_parser.
//
// Sends a packet laid out like the published design's example (NCARRIERS 64,
// GUARD 64, MOD with 32 items for modulators 0..63, then two DATA blocks of
// 64 bytes) followed by a DATA block of 256 bytes (count byte 0), a MOD
// block with no items and an unknown identifier byte. The expected token
// list is built here from the same block list. The token side applies
// random backpressure; checks every token, the error pulse and that no
// byte is lost or duplicated.
module tb_blk_parser;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n;
  always #5 clk = !clk;
  logic       in_valid, in_ready, tok_valid, tok_ready, err;
  logic [7:0] in_data;
  token_t     tok;
  blk_parser dut (.*);

  int checks = 0, failures = 0, errs = 0;
  byte unsigned bytes[$];
  token_t exp_q[$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL %s", what); end
  endtask

  function automatic token_t mk(tok_kind_e k, int a, int d);
    token_t t;
    t.kind = k; t.addr = 8'(a); t.data = 8'(d);
    return t;
  endfunction

  initial begin
    // NCARRIERS 64, GUARD 64
    bytes.push_back(ID_NCARRIERS); bytes.push_back(64); exp_q.push_back(mk(TK_NCARR, 0, 64));
    bytes.push_back(ID_GUARD);     bytes.push_back(64); exp_q.push_back(mk(TK_GUARD, 0, 64));
    // MOD, 32 items
    bytes.push_back(ID_MOD); bytes.push_back(32);
    for (int i = 0; i < 32; i++) begin
      int c;
      c = $urandom_range(255);
      bytes.push_back(8'(2 * i)); bytes.push_back(8'(c));
      exp_q.push_back(mk(TK_MOD, 2 * i, c));
    end
    // two DATA blocks of 64, one of 256
    for (int b = 0; b < 3; b++) begin
      int n;
      n = (b < 2) ? 64 : 256;
      bytes.push_back(ID_DATA); bytes.push_back(8'(n & 255));
      for (int i = 0; i < n; i++) begin
        int d;
        d = $urandom_range(255);
        bytes.push_back(8'(d));
        exp_q.push_back(mk(TK_DATA, 0, d));
      end
    end
    // empty MOD block, unknown identifier, then NCARRIERS 0 (= 256)
    bytes.push_back(ID_MOD); bytes.push_back(0);
    bytes.push_back(8'hEE);
    bytes.push_back(ID_NCARRIERS); bytes.push_back(0); exp_q.push_back(mk(TK_NCARR, 0, 0));
  end

  // token checker
  token_t e;
  always @(posedge clk) begin
    if (rst_n && tok_valid && tok_ready) begin
      if (exp_q.size() == 0) chk(0, "unexpected token");
      else begin
        e = exp_q.pop_front();
        chk(tok == e, $sformatf("token %p expected %p", tok, e));
      end
    end
    if (rst_n && err) errs++;
  end

  initial begin
    int i;
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0; tok_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    i = 0;
    while (i < bytes.size()) begin
      bit fire;
      in_valid  <= ($urandom_range(4) != 0);
      in_data   <= bytes[i];
      tok_ready <= ($urandom_range(3) != 0);
      @(negedge clk);
      fire = in_valid && in_ready;
      @(posedge clk);
      if (fire) i++;
    end
    in_valid <= 1'b0;
    tok_ready <= 1'b1;
    repeat (4) @(posedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d tokens missing", exp_q.size()));
    chk(errs == 1, $sformatf("error pulses %0d", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
