// One radix-2 decimation-in-frequency stage of the pipelined IFFT, in
// single-path delay-feedback form.
//
// The stage pairs samples L apart inside blocks of 2L. The first L samples
// of a block (a) are stored in an L-deep delay memory. With each of the
// second L samples (b) it forms (a+b)/2, which leaves at once, and
// (a-b)/2 * W^(j*N/2L), which is written back in place of a and becomes
// "pending". W = exp(+j*2*pi/N) is the inverse-transform twiddle, stored
// as Q2.14 constants computed at elaboration. Halving every butterfly makes
// the eight stages together divide by N and keeps every value in range.
//
// Pending differences leave one per cycle from a separate read position:
// alongside the first half of the next block when one follows at once (the
// classic delay-feedback schedule), or on their own as soon as the input
// goes idle. A new block may start at any point of that drain, because its
// write position always trails the read position, so a finished symbol
// never waits for the next one to push it out.
//
// The stage moves only on a valid input or a pending output while en is
// high; with en low everything holds. The architecture is this design's
// choice; the published design only names the IFFT.
module ifft_sdf_stage
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 256,
  parameter int unsigned L = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_vld,
  input  cplx_t in_s,
  output logic  out_vld,
  output cplx_t out_s,
  output logic  draining   // a pending difference leaves with no input
);
  localparam int unsigned PW   = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned CW   = $clog2(2 * L);
  localparam int unsigned STEP = N / (2 * L);

  typedef logic signed [15:0] tw_t;

  function automatic tw_t tw_cos(int e);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
    return tw_t'($rtoi($cos(a) * 16384.0 + (($cos(a) >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic tw_t tw_sin(int e);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
    return tw_t'($rtoi($sin(a) * 16384.0 + (($sin(a) >= 0.0) ? 0.5 : -0.5)));
  endfunction

  tw_t tw_re [L];
  tw_t tw_im [L];
  for (genvar g = 0; g < L; g++) begin : g_tw
    localparam tw_t C = tw_cos(g * STEP);
    localparam tw_t S = tw_sin(g * STEP);
    assign tw_re[g] = C;
    assign tw_im[g] = S;
  end

  function automatic sample_t sat(input logic signed [35:0] v);
    if (v > 36'sd32767)       return 16'sh7fff;
    else if (v < -36'sd32768) return 16'sh8000;
    else                      return sample_t'(v);
  endfunction

  cplx_t          dly [L];
  logic [CW-1:0]  cnt;      // input position in the block of 2L
  logic [PW-1:0]  rd;       // next pending difference to send
  logic           pending;

  logic           second;
  logic [PW-1:0]  j;
  logic           emit_pend;
  cplx_t          a, dp;
  logic signed [SW:0]   sr, si, dr, di;
  logic signed [35:0]   pr, pi;
  cplx_t          fb;

  always_comb begin
    second    = cnt[CW-1];
    j         = (L > 1) ? PW'(cnt) : '0;   // position inside the half block
    a         = dly[j];
    dp        = dly[rd];
    emit_pend = pending && !(in_vld && second);
    draining  = en && emit_pend && !in_vld;
    sr = ($signed({a.re[SW-1], a.re}) + $signed({in_s.re[SW-1], in_s.re})) >>> 1;
    si = ($signed({a.im[SW-1], a.im}) + $signed({in_s.im[SW-1], in_s.im})) >>> 1;
    dr = ($signed({a.re[SW-1], a.re}) - $signed({in_s.re[SW-1], in_s.re})) >>> 1;
    di = ($signed({a.im[SW-1], a.im}) - $signed({in_s.im[SW-1], in_s.im})) >>> 1;
    pr = (dr * tw_re[j] - di * tw_im[j] + 36'sd8192) >>> 14;
    pi = (dr * tw_im[j] + di * tw_re[j] + 36'sd8192) >>> 14;
    fb = cplx_t'{re: sat(pr), im: sat(pi)};
  end

  always_ff @(posedge clk) begin
    if (en && in_vld) dly[j] <= second ? fb : in_s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      rd      <= '0;
      pending <= 1'b0;
      out_vld <= 1'b0;
      out_s   <= '0;
    end else if (en) begin
      if (in_vld) cnt <= cnt + 1'b1;
      if (in_vld && second) begin
        out_s   <= cplx_t'{re: sample_t'(sr), im: sample_t'(si)};
        out_vld <= 1'b1;
        if (cnt == CW'(2 * L - 1)) begin
          pending <= 1'b1;
          rd      <= '0;
        end
      end else if (emit_pend) begin
        out_s   <= dp;
        out_vld <= 1'b1;
        rd      <= (rd == PW'(L - 1)) ? '0 : rd + 1'b1;
        if (rd == PW'(L - 1)) pending <= 1'b0;
      end else begin
        out_vld <= 1'b0;
      end
    end
  end

  // A block's second half must not start before the previous block's
  // differences have all left.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 en && in_vld && second |-> !pending);
endmodule
