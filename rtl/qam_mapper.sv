// Subcarrier modulator: one data byte to one complex constellation point.
//
// BPSK uses bit 0, QPSK bits 1:0, 16-QAM bits 3:0 and 64-QAM bits 5:0 of the
// byte; the remaining bits are ignored. The first half of the bits selects
// the in-phase level and the second half the quadrature level, each through
// the Gray code of IEEE 802.11a, so that the waveform can be received by
// standard 802.11a/g radios. Levels are scaled so every constellation has
// the same mean power (unit amplitude 16384, see ofdm_pkg).
// Purely combinational. The four modulation types come from the published design;
// the bit order, Gray code and amplitudes are this design's choice.
module qam_mapper
  import ofdm_pkg::*;
(
  input  mod_e       mod,
  input  logic [7:0] bits,
  output sample_t    re,
  output sample_t    im
);
  // Gray-coded odd level (+-1, +-3, ...) for a group of bits, LSB first.
  function automatic int lvl2(input logic b0, input logic b1);
    // 00 -3, 01 -1, 11 +1, 10 +3  (b0 is the first transmitted bit)
    case ({b0, b1})
      2'b00:   return -3;
      2'b01:   return -1;
      2'b11:   return 1;
      default: return 3;
    endcase
  endfunction

  function automatic int lvl3(input logic b0, input logic b1, input logic b2);
    case ({b0, b1, b2})
      3'b000:  return -7;
      3'b001:  return -5;
      3'b011:  return -3;
      3'b010:  return -1;
      3'b110:  return 1;
      3'b111:  return 3;
      3'b101:  return 5;
      default: return 7;
    endcase
  endfunction

  int ri, qi;

  always_comb begin
    unique case (mod)
      MOD_BPSK: begin
        ri = bits[0] ? K_BPSK : -K_BPSK;
        qi = 0;
      end
      MOD_QPSK: begin
        ri = bits[0] ? K_QPSK : -K_QPSK;
        qi = bits[1] ? K_QPSK : -K_QPSK;
      end
      MOD_QAM16: begin
        ri = lvl2(bits[0], bits[1]) * K_QAM16;
        qi = lvl2(bits[2], bits[3]) * K_QAM16;
      end
      default: begin
        ri = lvl3(bits[0], bits[1], bits[2]) * K_QAM64;
        qi = lvl3(bits[3], bits[4], bits[5]) * K_QAM64;
      end
    endcase
    re = sample_t'(ri);
    im = sample_t'(qi);
  end
endmodule
