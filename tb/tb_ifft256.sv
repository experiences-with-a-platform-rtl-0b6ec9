// Self-checking testbench for ifft256.
//
// Feeds random frequency-domain frames from a model of the input buffer and
// compares every output sample with a floating-point inverse DFT
// (x[n] = 1/256 sum X[k] e^{+j2pi kn/256}) within +-3 LSB. Phase 1 offers
// three frames at once with the output always ready and checks that they
// come out back to back (768 consecutive valid cycles, the last
// drained without a successor) and that the
// first sample appears 265 cycles after the first input read. The frames
// then stop, so the core must drain itself. Phase 2 offers
// three more frames with random output backpressure, which freezes the
// pipeline.
module tb_ifft256;
  import ofdm_pkg::*;

  localparam int N  = 256;
  localparam int NF = 6;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = !clk;

  logic       in_avail, in_rd, in_done, draining;
  logic [7:0] in_addr;
  cplx_t      in_data;
  logic       out_valid, out_ready, out_last;
  logic [7:0] out_addr;
  cplx_t      out_s;

  ifft256 dut (.*);

  int checks = 0, failures = 0;
  int fin [NF][N][2];
  int got [NF][N][2];
  int fi = 0, nready = 0, fo = 0, oc = 0;
  int cyc = 0, first_rd = -1, first_out = -1;
  int run = 0, max_run = 0, drains = 0;
  always @(posedge clk) if (draining) drains++;

  always @(posedge clk) cyc <= cyc + 1;

  assign in_avail = (fi < nready);

  always @(posedge clk) begin
    if (in_rd) begin
      in_data.re <= sample_t'(fin[fi][in_addr][0]);
      in_data.im <= sample_t'(fin[fi][in_addr][1]);
      if (first_rd < 0) first_rd <= cyc;
    end
    if (in_done) fi <= fi + 1;
    if (out_valid && out_ready) begin
      if (first_out < 0) first_out <= cyc;
      got[fo][out_addr][0] <= int'(out_s.re);
      got[fo][out_addr][1] <= int'(out_s.im);
      oc <= oc + 1;
      if (out_last) fo <= fo + 1;
      run <= run + 1;
      if (run + 1 > max_run) max_run <= run + 1;
    end else begin
      run <= 0;
    end
  end

  task automatic check_frame(int f);
    real xr, xi, a;
    int  bad;
    bad = 0;
    for (int n = 0; n < N; n++) begin
      xr = 0.0; xi = 0.0;
      for (int k = 0; k < N; k++) begin
        a  = 2.0 * 3.14159265358979 * real'((k * n) % N) / real'(N);
        xr += real'(fin[f][k][0]) * $cos(a) - real'(fin[f][k][1]) * $sin(a);
        xi += real'(fin[f][k][0]) * $sin(a) + real'(fin[f][k][1]) * $cos(a);
      end
      xr /= real'(N); xi /= real'(N);
      checks++;
      if ((real'(got[f][n][0]) - xr > 3.0) || (xr - real'(got[f][n][0]) > 3.0) ||
          (real'(got[f][n][1]) - xi > 3.0) || (xi - real'(got[f][n][1]) > 3.0)) begin
        failures++;
        bad++;
        if (bad < 4) $display("frame %0d n=%0d got (%0d,%0d) want (%f,%f)", f, n,
                              got[f][n][0], got[f][n][1], xr, xi);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < N; k++) begin
        // frame 0: one tone at bin 3; others random
        if (f == 0) begin
          fin[f][k][0] = (k == 3) ? 16384 : 0;
          fin[f][k][1] = 0;
        end else begin
          fin[f][k][0] = int'($urandom_range(32000)) - 16000;
          fin[f][k][1] = int'($urandom_range(32000)) - 16000;
        end
      end
    rst_n = 1'b0;
    out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    nready = 3;
    wait (fo == 3);
    checks++;
    if (max_run < 3 * N) begin
      failures++;
      $display("frames not back to back: longest run %0d", max_run);
    end
    checks++;
    if (first_out - first_rd != 265) begin
      failures++;
      $display("latency %0d, expected 265", first_out - first_rd);
    end
    repeat (600) @(posedge clk);
    nready = 6;
    fork
      begin
        while (fo < NF) begin
          @(posedge clk);
          out_ready <= ($urandom_range(3) != 0);
        end
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (oc != NF * N) begin
      failures++;
      $display("output count %0d", oc);
    end
    checks++;
    if (drains == 0) begin
      failures++;
      $display("pipeline never drained");
    end
    for (int f = 0; f < NF; f++) check_frame(f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
