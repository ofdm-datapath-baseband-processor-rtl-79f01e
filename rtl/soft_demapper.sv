// soft_demapper: simplified log-likelihood bit metrics for one equalized
// BPSK, QPSK, 16-QAM or 64-QAM subcarrier.
//
// The document computes simplified LLRs under a Gaussian-noise assumption;
// this unit uses the usual piecewise-linear (max-log) approximation for the
// Gray constellations of qam_mapper, with d the constellation's unit level:
//   bit 0: I             bit 1 (16-QAM): 2d - |I|
//   bit 1 (64-QAM): 4d - |I|          bit 2 (64-QAM): 2d - ||I| - 4d|
// and the same on Q for the second half of the bits.  A positive metric
// favours a one.  Combinational.
module soft_demapper
  import ofdm_pkg::*;
(
  input  cplx_t              sym,
  input  mod_e               modu,
  output logic signed [17:0] llr [6]
);
  always_comb begin
    logic signed [17:0] i_v, q_v, ai, aq, d;
    i_v = 18'(sym.re);
    q_v = 18'(sym.im);
    ai  = (i_v < 0) ? -i_v : i_v;
    aq  = (q_v < 0) ? -q_v : q_v;
    d   = 18'(mod_scale(modu));
    for (int b = 0; b < 6; b++) llr[b] = '0;
    case (modu)
      MOD_BPSK:  llr[0] = i_v;
      MOD_QPSK:  begin llr[0] = i_v; llr[1] = q_v; end
      MOD_QAM16: begin
        llr[0] = i_v; llr[1] = 2 * d - ai;
        llr[2] = q_v; llr[3] = 2 * d - aq;
      end
      default: begin
        llr[0] = i_v; llr[1] = 4 * d - ai;
        llr[2] = 2 * d - ((ai > 4 * d) ? ai - 4 * d : 4 * d - ai);
        llr[3] = q_v; llr[4] = 4 * d - aq;
        llr[5] = 2 * d - ((aq > 4 * d) ? aq - 4 * d : 4 * d - aq);
      end
    endcase
  end
endmodule
