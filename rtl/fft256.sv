// fft256: 256-point FFT/IFFT processing four samples per clock, built, as in
// the document, from four 64-point FFTs and a final 4-point FFT stage.
//
// Input sample n = 4*n1 + n2 arrives on lane n2 in clock n1, so each lane
// feeds its own fft64 (over n1).  The 64-point results Y_n2[k1] are rotated by
// the twiddle W256^(n2*k1) and combined by a 4-point DFT over n2, which gives
// X[k1 + 64*k2] on output lane k2 in output clock k1.  The output order is
// therefore "four quarter-symbols in parallel" rather than natural order;
// the preamble insertion unit restores time order.  INVERSE selects the
// inverse transform (used by the transmitter).  Scaling: fft64 divides by 8
// and the 4-point stage by 2, so X is the DFT divided by 16.  Timing: 64
// input clocks, 6 calculation clocks, 64 output clocks per symbol; at 100 MHz
// four lanes carry 400 MSPS as in the document, with the input stalled while a
// symbol is calculated and read out (single buffer, own simplification).
module fft256
  import ofdm_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_data [LANES],
  input  logic  in_valid,
  output logic  in_ready,
  output cplx_t out_data [LANES],
  output logic  out_valid,
  output logic  out_first,
  output logic  out_last,
  input  logic  out_ready
);
  localparam int N = 256;
  typedef logic signed [15:0] tw_t [N];
  function automatic tw_t tw_tab(bit im);
    tw_t t;
    for (int m = 0; m < N; m++) begin
      real a, v;
      a = 2.0 * 3.14159265358979323846 * m / N * (INVERSE ? 1.0 : -1.0);
      v = im ? $sin(a) : $cos(a);
      t[m] = 16'($rtoi(v * 16384.0 + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam tw_t TW_RE = tw_tab(1'b0);
  localparam tw_t TW_IM = tw_tab(1'b1);

  cplx_t      y   [LANES];
  logic       rdy [LANES];
  logic       vld [LANES];
  logic       lst [LANES];
  logic [5:0] k1;

  for (genvar l = 0; l < LANES; l++) begin : g_fft
    fft64 #(.INVERSE(INVERSE)) u_fft64 (
      .clk, .rst_n,
      .in_data(in_data[l]), .in_valid(in_valid), .in_ready(rdy[l]),
      .out_data(y[l]), .out_valid(vld[l]), .out_last(lst[l]), .out_ready(out_ready)
    );
  end

  assign in_ready  = rdy[0];
  assign out_valid = vld[0];
  assign out_last  = lst[0];
  assign out_first = vld[0] && (k1 == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) k1 <= '0;
    else if (vld[0] && out_ready) k1 <= k1 + 1'b1;
  end

  // twiddle rotation and 4-point DFT (W4 = -j forward, +j inverse), /2
  always_comb begin
    logic signed [17:0] zr [LANES];
    logic signed [17:0] zi [LANES];
    for (int l = 0; l < LANES; l++) begin
      int m;
      logic signed [31:0] pr, pi;
      m  = l * int'(k1);
      pr = (32'(y[l].re) * 32'(TW_RE[m]) - 32'(y[l].im) * 32'(TW_IM[m])) >>> 14;
      pi = (32'(y[l].re) * 32'(TW_IM[m]) + 32'(y[l].im) * 32'(TW_RE[m])) >>> 14;
      zr[l] = 18'(pr);
      zi[l] = 18'(pi);
    end
    for (int k2 = 0; k2 < LANES; k2++) begin
      logic signed [19:0] sr, si;
      sr = '0; si = '0;
      for (int n2 = 0; n2 < LANES; n2++) begin
        // multiply z[n2] by W4^(n2*k2): rotation by quarter turns
        case ((n2 * k2 * (INVERSE ? 3 : 1)) % 4)
          0: begin sr = sr + 20'(zr[n2]); si = si + 20'(zi[n2]); end
          1: begin sr = sr + 20'(zi[n2]); si = si - 20'(zr[n2]); end   // * -j
          2: begin sr = sr - 20'(zr[n2]); si = si - 20'(zi[n2]); end
          default: begin sr = sr - 20'(zi[n2]); si = si + 20'(zr[n2]); end  // * +j
        endcase
      end
      out_data[k2].re = 16'(sr >>> 1);
      out_data[k2].im = 16'(si >>> 1);
    end
  end
endmodule
