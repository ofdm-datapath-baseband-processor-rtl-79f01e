// qam_mapper: Gray mapping of subcarrier bits onto BPSK, QPSK, 16-QAM or
// 64-QAM constellation points, four subcarriers per clock.
//
// Bit order and Gray code follow IEEE 802.11a (own choice; the document only
// lists the modulations): the first half of a subcarrier's bits selects the
// in-phase level, the second half the quadrature level.  Levels are the odd
// integers +-1..+-7 multiplied by a per-modulation scale that gives every
// constellation the same mean power (unit amplitude 2^11, ofdm_pkg::mod_scale).
// Pilots are BPSK +-2^11, zero bins give 0.  Combinational.
module qam_mapper
  import ofdm_pkg::*;
(
  input  logic [1:0] kind [LANES],   // 0 zero, 1 data, 2 pilot
  input  logic [5:0] bits [LANES],
  input  logic       pilot,
  input  mod_e       modu,
  output cplx_t      sym  [LANES]
);
  // Gray level of an n-bit group, first bit = sign (802.11a tables)
  function automatic int level(logic [2:0] b, int unsigned n);
    case (n)
      1: return b[0] ? 1 : -1;
      2: case ({b[0], b[1]}) 2'b00: return -3; 2'b01: return -1; 2'b11: return 1; default: return 3; endcase
      default:
         case ({b[0], b[1], b[2]})
           3'b000: return -7; 3'b001: return -5; 3'b011: return -3; 3'b010: return -1;
           3'b110: return  1; 3'b111: return  3; 3'b101: return  5; default: return 7;
         endcase
    endcase
  endfunction

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int i_l, q_l, sc;
      sc = mod_scale(modu);
      i_l = 0; q_l = 0;
      case (modu)
        MOD_BPSK:  begin i_l = level(3'(bits[l][0]), 1); q_l = 0; end
        MOD_QPSK:  begin i_l = level(3'(bits[l][0]), 1); q_l = level(3'(bits[l][1]), 1); end
        MOD_QAM16: begin i_l = level(3'(bits[l][1:0]), 2); q_l = level(3'(bits[l][3:2]), 2); end
        default:   begin i_l = level(bits[l][2:0], 3); q_l = level(bits[l][5:3], 3); end
      endcase
      if (kind[l] == 2'd1) begin
        sym[l].re = SAMPLE_W'(i_l * sc);
        sym[l].im = SAMPLE_W'(q_l * sc);
      end else if (kind[l] == 2'd2) begin
        sym[l].re = pilot ? SAMPLE_W'(-2048) : SAMPLE_W'(2048);
        sym[l].im = '0;
      end else begin
        sym[l].re = '0;
        sym[l].im = '0;
      end
    end
  end
endmodule
