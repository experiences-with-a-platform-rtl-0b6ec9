// Self-checking testbench for qam_mapper.
//
// Applies every byte value under every modulation and compares the point
// with levels computed here from the 802.11a Gray rules (first bit: sign,
// following bits: magnitude) and the normalisation 16384/sqrt(1, 2, 10, 42).
module tb_qam_mapper;
  import ofdm_pkg::*;
  mod_e       mod;
  logic [7:0] bits;
  sample_t    re, im;
  qam_mapper dut (.*);

  int checks = 0, failures = 0;

  // odd level for a group of 1..3 bits, first bit = sign
  function automatic int level(int nb, logic b0, logic b1, logic b2);
    int m;
    if (nb == 1) m = 1;
    else if (nb == 2) m = b1 ? 1 : 3;
    else m = b1 ? (b2 ? 3 : 1) : (b2 ? 5 : 7);
    return b0 ? m : -m;
  endfunction

  initial begin
    int er, ei, k;
    for (int m = 0; m < 4; m++) begin
      for (int v = 0; v < 256; v++) begin
        mod  = mod_e'(m);
        bits = 8'(v);
        #1;
        case (m)
          0: begin k = $rtoi(16384.0 + 0.5);               er = level(1, bits[0], 0, 0) * k; ei = 0; end
          1: begin k = $rtoi(16384.0 / $sqrt(2.0) + 0.5);  er = level(1, bits[0], 0, 0) * k; ei = level(1, bits[1], 0, 0) * k; end
          2: begin k = $rtoi(16384.0 / $sqrt(10.0) + 0.5); er = level(2, bits[0], bits[1], 0) * k; ei = level(2, bits[2], bits[3], 0) * k; end
          default: begin k = $rtoi(16384.0 / $sqrt(42.0) + 0.5);
                   er = level(3, bits[0], bits[1], bits[2]) * k; ei = level(3, bits[3], bits[4], bits[5]) * k; end
        endcase
        checks++;
        if (int'(re) != er || int'(im) != ei) begin
          failures++;
          if (failures < 5) $display("mod %0d bits %02h got (%0d,%0d) want (%0d,%0d)", m, v, re, im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
