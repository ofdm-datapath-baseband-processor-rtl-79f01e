// tb_ofdm_baseband: end-to-end test of the baseband processor at its default
// size (12 encoders, 6 interleavers, 12 deinterleavers and decoders).
//
// Frames with different configurations are sent through the transmitter.
// The frequency-domain symbols at the IFFT input are collected, their 192
// data subcarriers (ascending frequency) are passed over an ideal channel
// with a little pseudo-random noise to the receiver, and the payload the
// receiver hands to the MAC is compared with what was sent.  The frame
// configuration decoded from the signal field, the number of time-domain
// clocks (880 preamble clocks + 80 per symbol), the cyclic prefix of every
// time-domain symbol and the pilot/zero bins are checked too.  The testbench also counts how often the mechanisms of the
// design occurred (reference symbols, terminations inside the frame and at
// its end, all twelve streams, all six interleavers, traceback flushes,
// receiver input stalls, partial last MAC word) and fails any that never did.
module tb_ofdm_baseband;
  import ofdm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  frame_cfg_t  tx_cfg;   logic tx_cfg_valid, tx_cfg_ready;
  logic [31:0] tx_data;  logic tx_data_valid, tx_data_ready;
  cplx_t       tx_samples [LANES]; logic tx_samples_valid, tx_preamble;
  cplx_t       tx_fd_data [LANES]; logic tx_fd_valid, tx_fd_first, tx_fd_ready;
  logic        rx_frame_start;
  cplx_t       rx_sym [LANES];
  logic [7:0]  rx_pow [LANES];
  logic        rx_first, rx_valid, rx_ready;
  logic [31:0] rx_data; logic [3:0] rx_be; logic rx_last, rx_data_valid;
  frame_cfg_t  rx_cfg;  logic rx_cfg_valid, rx_crc_error;

  ofdm_baseband dut (
    .clk, .rst_n,
    .tx_cfg, .tx_cfg_valid, .tx_cfg_ready, .tx_data, .tx_data_valid, .tx_data_ready,
    .tx_samples, .tx_samples_valid, .tx_preamble, .tx_samples_ready(1'b1),
    .tx_fd_data, .tx_fd_valid, .tx_fd_first, .tx_fd_ready,
    .rx_frame_start, .rx_sym, .rx_pow, .rx_first, .rx_valid, .rx_ready,
    .rx_data, .rx_be, .rx_last, .rx_data_valid, .rx_data_ready(1'b1),
    .rx_cfg, .rx_cfg_valid, .rx_crc_error
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- frame description ----------------
  localparam int NF = 3;
  frame_cfg_t cfgs [NF];
  initial begin
    // 16-QAM 1/2 data, QPSK 3/4 reference, 3 streams, 6 data symbols per group
    cfgs[0] = '{length: 16'd601, data_mod: MOD_QAM16, data_rate: RATE_1_2,
                ref_mod: MOD_QPSK, ref_rate: RATE_3_4, n_streams: 4'd3, n_data: 8'd6};
    // 64-QAM 3/4 data (the 1080 Mbit/s mode), BPSK 1/2 reference, 12 streams
    cfgs[1] = '{length: 16'd2600, data_mod: MOD_QAM64, data_rate: RATE_3_4,
                ref_mod: MOD_BPSK, ref_rate: RATE_1_2, n_streams: 4'd12, n_data: 8'd20};
    // QPSK 2/3, one stream, short groups
    cfgs[2] = '{length: 16'd150, data_mod: MOD_QPSK, data_rate: RATE_2_3,
                ref_mod: MOD_QPSK, ref_rate: RATE_1_2, n_streams: 4'd1, n_data: 8'd2};
  end

  byte unsigned sent [$];      // all payload bytes, all frames
  byte unsigned rcvd [$];
  cplx_t symq [$];             // data subcarriers of all symbols, in order
  int   frame_syms [NF];       // symbols incl. signal symbol, from the transmitter
  int   fd_frames_done = 0;
  int   td_clocks = 0, pre_clocks = 0;
  int   rx_frames = 0, rx_words = 0;

  // ---------------- mechanism counters ----------------
  int n_ref = 0, n_term_ref = 0, n_term_eof = 0, n_stall = 0, n_flush = 0, n_window = 0;
  int n_partial_word = 0, n_pilot_checked = 0;
  cplx_t tdb [NFFT + N_CP];    // one time-domain symbol with its prefix
  int tdn = 0, n_cp_sym = 0;
  bit [MAX_STREAMS-1:0] streams_seen = '0;
  bit [N_ILV-1:0]       ilv_seen = '0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_tx.sm_valid && dut.u_tx.sm_ready && dut.u_tx.sm_first && !dut.u_tx.sm_info.is_sig) begin
      streams_seen[dut.u_tx.sm_info.stream] = 1'b1;
      if (dut.u_tx.sm_info.is_ref) n_ref++;
      if (dut.u_tx.sm_info.term && dut.u_tx.sm_info.is_ref) n_term_ref++;
      if (dut.u_tx.sm_info.term && !dut.u_tx.sm_info.is_ref) n_term_eof++;
    end
    for (int k = 0; k < N_ILV; k++) if (dut.u_tx.il_valid[k] && dut.u_tx.il_ready[k]) ilv_seen[k] = 1'b1;
    if (rx_valid && !rx_ready) n_stall++;
    if (dut.u_rx.g_dec[0].u_vit.issue) begin
      if (dut.u_rx.g_dec[0].u_vit.issue_flush && dut.u_rx.g_dec[0].u_vit.avail < 16'd96) n_flush++;
      else n_window++;
    end
    if (tx_samples_valid) begin
      td_clocks++;
      if (tx_preamble) pre_clocks++;
      else begin
        // cyclic prefix: the first 64 samples repeat the last 64 of the symbol
        for (int l = 0; l < LANES; l++) tdb[tdn * LANES + l] = tx_samples[l];
        tdn++;
        if (tdn == (NFFT + N_CP) / LANES) begin
          tdn = 0;
          n_cp_sym++;
          for (int t = 0; t < N_CP; t++) begin
            checks++;
            if (tdb[t] !== tdb[t + NFFT]) begin
              failures++;
              if (failures < 20) $display("FAIL cyclic prefix sample %0d", t);
            end
          end
        end
      end
    end
  end

  // ---------------- collect frequency-domain symbols ----------------
  initial begin
    cplx_t fbin [NFFT];
    int    beat = 0;
    forever begin
      @(negedge clk);   // sample the stable values of the coming rising edge
      if (rst_n && tx_fd_valid && tx_fd_ready) begin
        for (int l = 0; l < LANES; l++) fbin[beat * LANES + l] = tx_fd_data[l];
        beat++;
        if (beat == NFFT / LANES) begin
          int   j, b;
          j = 0;
          beat = 0;
          for (int f = -128; f < 128; f++) begin
            b = (f < 0) ? f + NFFT : f;
            case (bin_kind(b))
              2'd1: begin symq.push_back(fbin[b]); j++; end
              2'd2: begin
                n_pilot_checked++;
                check((fbin[b].re == 16'sd2048 || fbin[b].re == -16'sd2048) && fbin[b].im == 0, "pilot value");
              end
              default: check(fbin[b].re == 0 && fbin[b].im == 0, "zero bin");
            endcase
          end
          check(j == N_DATA_SC, "data bin count");
        end
      end
    end
  end

  // ---------------- transmitter side ----------------
  initial begin
    tx_cfg_valid = 0; tx_data_valid = 0; tx_cfg = '0; tx_data = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      int nw;
      byte unsigned w [4];
      // inputs change at the falling edge, handshakes complete at the rising edge
      @(negedge clk);
      tx_cfg = cfgs[f]; tx_cfg_valid = 1'b1;
      while (!tx_cfg_ready) @(negedge clk);
      @(negedge clk);
      tx_cfg_valid = 1'b0;
      nw = (int'(cfgs[f].length) + 3) / 4;
      for (int i = 0; i < nw; i++) begin
        for (int k = 0; k < 4; k++) begin
          w[k] = byte'($urandom);
          if (4 * i + k < int'(cfgs[f].length)) sent.push_back(w[k]);
        end
        tx_data = {w[3], w[2], w[1], w[0]}; tx_data_valid = 1'b1;
        while (!tx_data_ready) @(negedge clk);
        @(negedge clk);
      end
      tx_data_valid = 1'b0;
      // wait until the transmitter has emitted this frame's symbols
      wait (dut.u_tx.frame_done && dut.u_tx.u_sm.st == 2'd0);
      frame_syms[f] = int'(dut.u_tx.n_sym) + 1;
      repeat (3000) @(posedge clk);
    end
  end

  // ---------------- receiver side ----------------
  int rx_sym_cnt = 0;
  initial begin
    rx_frame_start = 0; rx_valid = 0; rx_first = 0;
    for (int l = 0; l < LANES; l++) begin rx_sym[l] = '0; rx_pow[l] = 8'd64; end
    wait (rst_n);
    for (int f = 0; f < NF; f++) begin
      int nsym;
      // wait for the signal symbol, then announce the frame
      wait (symq.size() >= N_DATA_SC);
      @(negedge clk);
      rx_frame_start = 1'b1;
      @(negedge clk);
      rx_frame_start = 1'b0;
      nsym = -1;
      for (int s = 0; nsym < 0 || s < nsym; s++) begin
        while (symq.size() < N_DATA_SC) @(negedge clk);
        for (int b = 0; b < N_DATA_SC / LANES; b++) begin
          for (int l = 0; l < LANES; l++) begin
            int nr, ni;
            cplx_t cv;
            nr = int'($urandom_range(0, 200)) - 100;   // small noise
            ni = int'($urandom_range(0, 200)) - 100;
            cv = symq.pop_front();
            rx_sym[l].re = cv.re + 16'(nr);
            rx_sym[l].im = cv.im + 16'(ni);
          end
          rx_first = (b == 0);
          rx_valid = 1'b1;
          while (!rx_ready) @(negedge clk);
          @(negedge clk);
        end
        rx_valid = 1'b0;
        rx_sym_cnt++;
        if (s == 0) begin
          // frame length known to the testbench only after the transmitter finished
          while (frame_syms[f] == 0) @(negedge clk);
          nsym = frame_syms[f];
        end
      end
      wait (rx_frames == f + 1);
    end
  end

  // ---------------- MAC side ----------------
  always @(posedge clk) if (rst_n && rx_data_valid) begin
    rx_words++;
    for (int k = 0; k < 4; k++) if (rx_be[k]) rcvd.push_back(rx_data[8*k +: 8]);
    if (rx_be != 4'hF) begin
      n_partial_word++;
      check(rx_last, "partial word only at frame end");
    end
    if (rx_last) begin
      check(rx_cfg == cfgs[rx_frames], "decoded signal field");
      rx_frames++;
    end
  end
  always @(posedge clk) if (rst_n && rx_crc_error) check(1'b0, "signal field CRC");

  initial begin
    wait (rst_n);
    wait (rx_frames == NF);
    repeat (20) @(posedge clk);
    check(rcvd.size() == sent.size(), $sformatf("payload size %0d vs %0d", rcvd.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < rcvd.size(); i++)
      check(rcvd[i] == sent[i], $sformatf("payload byte %0d: %02h vs %02h", i, rcvd[i], sent[i]));
    begin
      int expect_clk = 0;
      for (int f = 0; f < NF; f++) expect_clk += N_PREAMBLE * 80 + frame_syms[f] * 80;
      check(pre_clocks == NF * N_PREAMBLE * 80, $sformatf("preamble clocks %0d", pre_clocks));
      check(td_clocks == expect_clk, $sformatf("time-domain clocks %0d vs %0d", td_clocks, expect_clk));
    end
    $display("mechanisms: ref=%0d term_ref=%0d term_eof=%0d streams=%b ilv=%b stall=%0d window_tb=%0d flush_tb=%0d partial_word=%0d pilots=%0d",
             n_ref, n_term_ref, n_term_eof, streams_seen, ilv_seen, n_stall, n_window, n_flush, n_partial_word, n_pilot_checked);
    check(n_ref > 0, "reference symbols occurred");
    check(n_term_ref > 0, "termination in reference group occurred");
    check(n_term_eof > 0, "end-of-frame termination occurred");
    check(&streams_seen, "all twelve streams used");
    check(&ilv_seen, "all six interleavers used");
    check(n_stall > 0, "receiver input stall occurred");
    check(n_window > 0, "sliding-window traceback occurred");
    check(n_flush > 0, "termination flush traceback occurred");
    check(n_partial_word > 0, "partial last MAC word occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: frames received %0d, rx symbols %0d", rx_frames, rx_sym_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
