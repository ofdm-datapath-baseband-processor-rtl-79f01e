// tb_qam_mapper: self-checking test of the constellation mapper.  Random
// subcarrier kinds, bits and modulations are applied (the unit is
// combinational) and every output is compared with the 802.11a Gray tables
// written out here level by level, times the modulation's scale (2048,
// 1448, 648, 316 for unit mean power), pilots +-2048 and zero bins 0.
module tb_qam_mapper;
  import ofdm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0] kind [LANES]; logic [5:0] bits [LANES]; logic pilot; mod_e modu; cplx_t sym [LANES];
  qam_mapper dut (.kind, .bits, .pilot, .modu, .sym);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gray levels indexed by the bit group read first-bit-first
  int L2 [4] = '{-3, -1, 3, 1};                  // b0b1 = 00,01,10,11
  int L3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};    // b0b1b2 = 000..111

  initial begin
    pilot = 1'b0; modu = MOD_BPSK;
    for (int l = 0; l < LANES; l++) begin kind[l] = '0; bits[l] = '0; end
    #2 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int sc;
      @(negedge clk);
      modu = mod_e'($urandom_range(0, 3));
      pilot = 1'($urandom);
      for (int l = 0; l < LANES; l++) begin kind[l] = 2'($urandom_range(0, 2)); bits[l] = 6'($urandom); end
      #1;
      sc = (modu == MOD_BPSK) ? 2048 : (modu == MOD_QPSK) ? 1448 : (modu == MOD_QAM16) ? 648 : 316;
      for (int l = 0; l < LANES; l++) begin
        int er, ei;
        logic [5:0] b;
        b = bits[l];
        case (modu)
          MOD_BPSK:  begin er = b[0] ? 1 : -1; ei = 0; end
          MOD_QPSK:  begin er = b[0] ? 1 : -1; ei = b[1] ? 1 : -1; end
          MOD_QAM16: begin er = L2[{b[0], b[1]}]; ei = L2[{b[2], b[3]}]; end
          default:   begin er = L3[{b[0], b[1], b[2]}]; ei = L3[{b[3], b[4], b[5]}]; end
        endcase
        er *= sc; ei *= sc;
        if (kind[l] == 2'd2) begin er = pilot ? -2048 : 2048; ei = 0; end
        if (kind[l] == 2'd0) begin er = 0; ei = 0; end
        checks++;
        if (int'(sym[l].re) != er || int'(sym[l].im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL mod %0d kind %0d bits %b got %0d,%0d exp %0d,%0d", modu, kind[l], b, sym[l].re, sym[l].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
