// Self-checking testbench for sync_fifo.
//
// Random pushes and pops (never into a full or out of an empty FIFO)
// against a queue model: checks every popped word, the count, and the
// full/empty flags, including filling the FIFO completely.
module tb_sync_fifo;
  localparam int W = 18, DEPTH = 16;
  logic clk = 1'b0, rst_n;
  always #5 clk = !clk;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;
  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      // phase: fill, drain, random
      bit w, r;
      if (i < 300)       begin w = ($urandom_range(3) != 0); r = ($urandom_range(3) == 0); end
      else if (i < 600)  begin w = ($urandom_range(3) == 0); r = ($urandom_range(3) != 0); end
      else               begin w = 1'($urandom_range(1)); r = 1'($urandom_range(1)); end
      if (q.size() == DEPTH) w = 0;
      if (q.size() == 0) r = 0;
      wr_en   <= w;
      rd_en   <= r;
      wr_data <= W'($urandom);
      #1;
      chk(count == ($clog2(DEPTH)+1)'(q.size()), "count");
      chk(full == (q.size() == DEPTH), "full");
      chk(empty == (q.size() == 0), "empty");
      if (r) chk(rd_data == q[0], $sformatf("data %h vs %h", rd_data, q[0]));
      @(posedge clk);
      if (r) void'(q.pop_front());
      if (w) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
