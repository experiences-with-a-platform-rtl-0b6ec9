// Self-checking testbench for guard_insert.
//
// A two-bank buffer model holds random time-domain symbols; each comes
// with a guard length (0, 64, 255, 16, 128). Checks that every symbol goes
// out as its last G samples followed by all 256, that consecutive symbols
// follow without a gap (N+G cycles from one sym_start to the next), and
// that the output idles at zero with dac_valid low when nothing is ready.
module tb_guard_insert;
  import ofdm_pkg::*;
  localparam int N = 256;
  localparam int NS = 5;
  logic clk = 1'b0, rst_n;
  always #5 clk = !clk;
  logic rd_ready, rd_en, rd_done, meta_valid, meta_pop, dac_valid, sym_start;
  logic [7:0] rd_addr, meta_guard;
  cplx_t rd_data;
  sample_t dac_i, dac_q;
  guard_insert #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t sym [NS][N];
  int gl [NS] = '{0, 64, 255, 16, 128};
  int nready = 0, rs = 0, ms = 0;
  int exp_i[$], exp_q[$];
  int starts[$];
  int cyc = 0, idle_bad = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL %s", what); end
  endtask

  assign rd_ready   = (rs < nready);
  assign meta_valid = (ms < nready);
  assign meta_guard = (ms < NS) ? 8'(gl[ms]) : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_en) rd_data <= sym[rs][rd_addr];
    if (rd_done) rs <= rs + 1;
    if (meta_pop) ms <= ms + 1;
    if (rst_n && sym_start) starts.push_back(cyc);
    if (rst_n && dac_valid) begin
      chk(exp_i.size() > 0 && int'(dac_i) == exp_i[0] && int'(dac_q) == exp_q[0],
          $sformatf("sample at cycle %0d", cyc));
      if (exp_i.size() > 0) begin void'(exp_i.pop_front()); void'(exp_q.pop_front()); end
    end else if (rst_n && (dac_i != 0 || dac_q != 0)) idle_bad++;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < N; i++) sym[s][i] = cplx_t'($urandom);
      for (int i = N - gl[s]; i < N; i++) begin exp_i.push_back(int'(sym[s][i].re)); exp_q.push_back(int'(sym[s][i].im)); end
      for (int i = 0; i < N; i++)         begin exp_i.push_back(int'(sym[s][i].re)); exp_q.push_back(int'(sym[s][i].im)); end
    end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    nready = 2;                 // two symbols at once: back to back
    wait (rs == 2);
    repeat (50) @(posedge clk); // a gap
    nready = NS;
    wait (rs == NS);
    repeat (5) @(posedge clk);
    chk(exp_i.size() == 0, $sformatf("%0d samples missing", exp_i.size()));
    chk(starts.size() == NS, "symbol starts");
    for (int s = 1; s < NS; s++)
      if (s != 2) chk(starts[s] - starts[s-1] == N + gl[s-1],
                      $sformatf("symbol %0d starts %0d cycles after the previous", s, starts[s] - starts[s-1]));
    chk(idle_bad == 0, "non-zero output while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
