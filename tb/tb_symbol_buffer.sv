// Self-checking testbench for symbol_buffer.
//
// Writes random symbols at bit-reversed addresses into alternate banks and
// reads them back in natural order; checks the data (one-cycle read
// latency, held while rd_en is low) and the full/free handshake: a third
// symbol cannot be written while two are unread.
module tb_symbol_buffer;
  import ofdm_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst_n;
  always #5 clk = !clk;
  logic wr_en, wr_done, wr_ready, rd_en, rd_done, rd_ready;
  logic [3:0] wr_addr, rd_addr;
  cplx_t wr_data, rd_data;
  symbol_buffer #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t sym [4][N];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_sym(int s);
    for (int i = 0; i < N; i++) begin
      wr_en <= 1'b1;
      wr_addr <= 4'({<<{4'(i)}});
      wr_data <= sym[s][{<<{4'(i)}}];
      wr_done <= (i == N - 1);
      @(posedge clk);
    end
    wr_en <= 1'b0; wr_done <= 1'b0;
  endtask

  task automatic read_sym(int s);
    for (int i = 0; i < N; i++) begin
      rd_en <= 1'b1; rd_addr <= 4'(i); rd_done <= (i == N - 1);
      @(posedge clk);
      rd_en <= 1'b0; rd_done <= 1'b0;
      @(posedge clk);
      #1 chk(rd_data == sym[s][i], $sformatf("sym %0d word %0d", s, i));
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < N; i++) sym[s][i] = cplx_t'($urandom);
    rst_n = 1'b0; wr_en = 0; wr_done = 0; rd_en = 0; rd_done = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 chk(wr_ready && !rd_ready, "reset flags");
    write_sym(0);
    #1 chk(wr_ready && rd_ready, "one full");
    write_sym(1);
    #1 chk(!wr_ready && rd_ready, "both full");
    read_sym(0);
    #1 chk(wr_ready && rd_ready, "one freed");
    write_sym(2);
    read_sym(1);
    read_sym(2);
    #1 chk(wr_ready && !rd_ready, "all read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
