// fft64: 64-point radix-2 FFT/IFFT, one of the four parallel units of the
// 256-point FFT.
//
// The document builds its 256-point FFT from four 64-point FFTs that each
// take one of four parallel sample streams; their internal structure is not
// given.  This unit is the simplest that does the job: 64 samples are written
// one per clock in bit-reversed order into a register array (LOAD), the six
// radix-2 decimation-in-time stages are computed one stage per clock with 32
// butterflies in parallel (CALC), and the 64 results are read out one per
// clock in natural order (OUT).  Twiddles are Q14 constants computed at
// elaboration; INVERSE selects exp(+j2pi/64).  Stages 0, 2 and 4 halve their
// results (arithmetic shift), so the output is the DFT divided by 8.
// Timing: 64 input clocks, 6 calculation clocks, 64 output clocks; the input
// is stalled from CALC until the last output has been taken.
module fft64
  import ofdm_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  output cplx_t out_data,
  output logic  out_valid,
  output logic  out_last,
  input  logic  out_ready
);
  localparam int N = 64;
  typedef logic signed [15:0] tw_t [N/2];
  function automatic tw_t tw_tab(bit im);
    tw_t t;
    for (int m = 0; m < N/2; m++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * m / N * (INVERSE ? 1.0 : -1.0);
      t[m] = 16'($rtoi((im ? $sin(a) : $cos(a)) * 16384.0 + ((im ? $sin(a) : $cos(a)) >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam tw_t TW_RE = tw_tab(1'b0);
  localparam tw_t TW_IM = tw_tab(1'b1);

  typedef enum logic [1:0] {LOAD, CALC, OUT} state_e;
  state_e     st;
  logic [5:0] cnt;
  logic [2:0] stage;
  cplx_t      x  [N];
  cplx_t      xn [N];

  function automatic logic [5:0] bitrev(logic [5:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5]};
  endfunction

  // one radix-2 stage over the whole array
  always_comb begin
    int h;
    h = 1 << stage;
    for (int i = 0; i < N; i++) xn[i] = x[i];
    for (int j = 0; j < N/2; j++) begin
      int i0, i1, m;
      logic signed [31:0] pr, pi;
      logic signed [17:0] ar, ai, br, bi, sr, si, dr, di;
      i0 = (j / h) * 2 * h + (j % h);
      i1 = i0 + h;
      m  = (j % h) * (N / 2 / h);
      pr = (32'(x[i1].re) * 32'(TW_RE[m]) - 32'(x[i1].im) * 32'(TW_IM[m])) >>> 14;
      pi = (32'(x[i1].re) * 32'(TW_IM[m]) + 32'(x[i1].im) * 32'(TW_RE[m])) >>> 14;
      ar = 18'(x[i0].re); ai = 18'(x[i0].im);
      br = 18'(pr);       bi = 18'(pi);
      sr = ar + br; si = ai + bi; dr = ar - br; di = ai - bi;
      if (stage[0] == 1'b0) begin
        sr = sr >>> 1; si = si >>> 1; dr = dr >>> 1; di = di >>> 1;
      end
      xn[i0].re = 16'(sr); xn[i0].im = 16'(si);
      xn[i1].re = 16'(dr); xn[i1].im = 16'(di);
    end
  end

  assign in_ready  = (st == LOAD);
  assign out_valid = (st == OUT);
  assign out_data  = x[cnt];
  assign out_last  = (st == OUT) && (cnt == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= LOAD; cnt <= '0; stage <= '0;
      for (int i = 0; i < N; i++) x[i] <= '0;
    end else begin
      case (st)
        LOAD: if (in_valid) begin
          x[bitrev(cnt)] <= in_data;
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin st <= CALC; stage <= '0; end
        end
        CALC: begin
          for (int i = 0; i < N; i++) x[i] <= xn[i];
          stage <= stage + 1'b1;
          if (stage == 3'd5) begin st <= OUT; cnt <= '0; end
        end
        default: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) st <= LOAD;
        end
      endcase
    end
  end
endmodule
