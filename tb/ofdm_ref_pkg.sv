// Reference models shared by the testbenches: constellation mapping
// written from the 802.11a Gray rules, and a floating-point inverse DFT.
// They are written independently of the RTL so they can check it.
package ofdm_ref_pkg;

  // Odd level for a group of 1..3 bits; first bit = sign.
  function automatic int level(int nb, bit b0, bit b1, bit b2);
    int m;
    if (nb == 1) m = 1;
    else if (nb == 2) m = b1 ? 1 : 3;
    else m = b1 ? (b2 ? 3 : 1) : (b2 ? 5 : 7);
    return b0 ? m : -m;
  endfunction

  // Constellation point for modulation m (0 BPSK .. 3 64-QAM), byte d.
  function automatic void map(int m, int d, output int re, output int im);
    int k;
    bit [7:0] b;
    b = 8'(d);
    case (m)
      0: begin k = $rtoi(16384.0 + 0.5);               re = level(1, b[0], 0, 0) * k; im = 0; end
      1: begin k = $rtoi(16384.0 / $sqrt(2.0) + 0.5);  re = level(1, b[0], 0, 0) * k; im = level(1, b[1], 0, 0) * k; end
      2: begin k = $rtoi(16384.0 / $sqrt(10.0) + 0.5); re = level(2, b[0], b[1], 0) * k; im = level(2, b[2], b[3], 0) * k; end
      default: begin k = $rtoi(16384.0 / $sqrt(42.0) + 0.5);
               re = level(3, b[0], b[1], b[2]) * k; im = level(3, b[3], b[4], b[5]) * k; end
    endcase
  endfunction

  // x[n] = 1/256 sum_k X[k] exp(+j 2 pi k n / 256), with a table of angles.
  function automatic void idft(input int xr_in[256], input int xi_in[256],
                               output real xr[256], output real xi[256]);
    real c[256], s[256];
    for (int i = 0; i < 256; i++) begin
      c[i] = $cos(2.0 * 3.14159265358979 * real'(i) / 256.0);
      s[i] = $sin(2.0 * 3.14159265358979 * real'(i) / 256.0);
    end
    for (int n = 0; n < 256; n++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < 256; k++) begin
        if (xr_in[k] != 0 || xi_in[k] != 0) begin
          int e;
          e = (k * n) % 256;
          ar += real'(xr_in[k]) * c[e] - real'(xi_in[k]) * s[e];
          ai += real'(xr_in[k]) * s[e] + real'(xi_in[k]) * c[e];
        end
      end
      xr[n] = ar / 256.0;
      xi[n] = ai / 256.0;
    end
  endfunction

endpackage
