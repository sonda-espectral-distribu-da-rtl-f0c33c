// tb_spectral_probe_top: end-to-end test of the probe fabric at its full
// size (8112-byte payloads, 200-tap filter, 2048-word FIFOs), with the
// fronthaul closed by a fibre-loopback model that copies tx_* to rx_* and can
// drop or corrupt chosen frames. Runs, in order:
//   1. Standard mode, ten frames (a 20280-sample capture): ADC samples packed
//      two per beat, framed, looped back, deframed and played to the DAC;
//      frame payloads and DAC words are compared with the samples sent; one
//      frame per 2028 samples.
//   2. Loopback mode with the internal loopback selected (5 converter clocks
//      from sample to DAC word): the DAC and the frame payloads carry the
//      interpolated stream, compared with a reference filter; one frame per
//      1014 samples.
//   3. Data-generator mode: the checker must see the pattern intact, except
//      for one dropped frame (SEQ_ID gap) and one frame with a corrupted
//      EtherType (rejected by the deframer). Then 250 more frames, so that
//      SEQ_ID wraps from 255 to 0 with no error reported.
//   4. Transmit FIFO overflow: the MAC holds off while data keeps coming.
// Random tx_tready stalls run throughout. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
`timescale 1ps/1ps
module tb_spectral_probe_top;
  localparam int PB    = 8112;
  localparam int BEATS = PB / 8;
  localparam int T     = 200;

  logic adc_clk = 0, eth_clk = 0, adc_rst_n = 0, eth_rst_n = 0;
  logic [1:0] mode = 2'd0;
  logic dac_sel = 0;
  logic [47:0] dst_mac = 48'h02_00_00_00_00_01, src_mac = 48'h02_00_00_00_00_02;
  logic [15:0] pc_id = 16'h0007;
  logic adc_valid = 0;
  logic [15:0] adc_i = '0, adc_q = '0;
  logic dac_valid;
  logic [63:0] dac_data;
  logic tx_tvalid, tx_tready = 1, tx_tlast;
  logic [63:0] tx_tdata;
  logic [7:0] tx_tkeep;
  logic rx_tvalid = 0, rx_tlast = 0;
  logic [63:0] rx_tdata = '0;
  logic [7:0] rx_tkeep = '0;
  logic sink_clear = 0, sink_locked;
  logic [31:0] sink_beats, sink_errors, tx_overflows, rx_overflows;
  logic [31:0] tx_frames, rx_frames_ok, rx_frames_bad, rx_seq_errors;
  logic [7:0] tx_seq_id;
  logic [15:0] rx_pc_id;

  int checks = 0, failures = 0;

  spectral_probe_top dut (.*);

  always #4069 adc_clk = ~adc_clk;   // 122.88 MHz
  always #3200 eth_clk = ~eth_clk;   // 156.25 MHz

  int acyc = 0;
  always @(posedge adc_clk) acyc++;

  // ---------------- reference models ----------------
  longint h [T];
  longint xi [$], xq [$];
  logic [31:0] gen_state = 32'h1234_5678;
  logic [31:0] pend;
  bit          have_pend = 0;

  logic [63:0] txq [$];      // expected frame payload words
  logic [63:0] dacq [$];     // expected DAC words
  int          dac_t [$];    // cycle each expected DAC word was caused
  bit          cmp_tx = 1;

  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin t = t * (x*x/4.0) / (k*k); s += t; end
    return s;
  endfunction

  function automatic longint rnd_sat(input longint acc);
    longint r;
    r = (acc + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic logic [31:0] lfsr(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  initial begin
    real hr [T], sum, wc, m, u;
    wc = 100.0 / 245.76;
    sum = 0;
    for (int n = 0; n < T; n++) begin
      m = n - (T-1)/2.0;
      u = 2.0*n/(T-1) - 1.0;
      hr[n] = (m == 0.0 ? wc : $sin(3.141592653589793*wc*m)/(3.141592653589793*m))
            * i0(3.5*$sqrt(1.0-u*u)) / i0(3.5);
      sum += hr[n];
    end
    for (int n = 0; n < T; n++) h[n] = longint'($rtoi(hr[n]*2.0/sum*65536.0 + (hr[n] >= 0 ? 0.5 : -0.5)));
    for (int k = 0; k < T; k++) begin xi.push_back(0); xq.push_back(0); end
  end

  function automatic logic [63:0] fir_step(input logic [15:0] si, input logic [15:0] sq);
    logic [63:0] e;
    for (int p = 0; p < 2; p++) begin
      longint ai = 0, aq = 0;
      xi.push_back(p == 0 ? longint'($signed(si)) : 0);
      xq.push_back(p == 0 ? longint'($signed(sq)) : 0);
      void'(xi.pop_front());
      void'(xq.pop_front());
      for (int k = 0; k < T; k++) begin
        ai += h[k] * xi[T-1-k];
        aq += h[k] * xq[T-1-k];
      end
      e[32*p +: 16]      = 16'(rnd_sat(ai));
      e[32*p + 16 +: 16] = 16'(rnd_sat(aq));
    end
    return e;
  endfunction

  // drive n ADC samples, one per clock, and predict every output
  task automatic adc_samples(input int n);
    for (int k = 0; k < n; k++) begin
      logic [15:0] si, sq;
      logic [63:0] f;
      si = 16'($urandom);
      sq = 16'($urandom);
      @(negedge adc_clk);
      adc_valid = 1;
      adc_i = si;
      adc_q = sq;
      f = fir_step(si, sq);
      if (dac_sel) begin dacq.push_back(f); dac_t.push_back(acyc); end
      case (mode)
        2'd0: begin
          if (have_pend) begin
            txq.push_back({sq, si, pend});
            dacq.push_back({sq, si, pend});
            dac_t.push_back(-1);
            have_pend = 0;
          end else begin
            pend = {sq, si};
            have_pend = 1;
          end
        end
        2'd1: txq.push_back(f);
        default: begin
          txq.push_back({lfsr(gen_state), gen_state});
          gen_state = lfsr(lfsr(gen_state));
        end
      endcase
    end
    @(negedge adc_clk) adc_valid = 0;
  endtask

  // ---------------- fibre loopback model ----------------
  int tx_frame_idx = 0;          // index of the frame on the wire
  bit in_frame = 0;
  int drop_idx = -1, corrupt_idx = -1;
  int tx_beat = 0;
  always @(posedge eth_clk) begin
    rx_tvalid <= 1'b0;
    rx_tlast  <= 1'b0;
    if (tx_tvalid && tx_tready) begin
      if (tx_frame_idx != drop_idx) begin
        rx_tvalid <= 1'b1;
        rx_tdata  <= (tx_frame_idx == corrupt_idx && tx_beat == 1) ? (tx_tdata ^ 64'h0000_00FF_0000_0000) : tx_tdata;
        rx_tkeep  <= tx_tkeep;
        rx_tlast  <= tx_tlast;
      end
      tx_beat = tx_tlast ? 0 : tx_beat + 1;
      if (tx_tlast) tx_frame_idx++;
    end
  end

  // ---------------- transmit monitor ----------------
  byte unsigned fr [$];
  int n_frames [3] = '{0, 0, 0};
  int last_start = -1, gap_min [3], gap_max [3];
  int n_stall = 0;
  int n_wrap = 0;
  initial for (int k = 0; k < 3; k++) begin gap_min[k] = 1 << 30; gap_max[k] = 0; end

  always @(posedge eth_clk) if (eth_rst_n) begin
    if (tx_tvalid && !tx_tready) n_stall++;
    if (tx_tvalid && tx_tready) begin
      if (fr.size() == 0) begin
        if (last_start >= 0 && n_frames[mode] > 0 && cmp_tx) begin
          int g;
          g = acyc - last_start;
          if (g < gap_min[mode]) gap_min[mode] = g;
          if (g > gap_max[mode]) gap_max[mode] = g;
        end
        last_start = acyc;
      end
      for (int b = 0; b < 8; b++) if (tx_tkeep[b]) fr.push_back(tx_tdata[8*b +: 8]);
      if (tx_tlast) begin
        checks++;
        if (fr.size() != PB + 22 || fr[12] != 8'hAE || fr[13] != 8'hFE || fr[15] != 8'h00
            || {fr[18], fr[19]} != pc_id || {fr[16], fr[17]} != 16'(PB + 4)) begin
          failures++;
          $display("bad frame header/length (%0d bytes)", fr.size());
        end
        checks++;
        if (fr[20] == 8'd0 && tx_frame_idx > 0) n_wrap++;
        if (fr[20] != 8'(tx_frame_idx)) begin failures++; $display("SEQ_ID %0d on frame %0d", fr[20], tx_frame_idx); end
        if (cmp_tx && fr.size() == PB + 22) begin
          int bad = 0;
          for (int w = 0; w < BEATS; w++) begin
            logic [63:0] g, e;
            for (int s = 0; s < 2; s++) begin
              g[32*s +: 16]      = {fr[22 + 8*w + 4*s],     fr[22 + 8*w + 4*s + 1]};
              g[32*s + 16 +: 16] = {fr[22 + 8*w + 4*s + 2], fr[22 + 8*w + 4*s + 3]};
            end
            e = (txq.size() > 0) ? txq.pop_front() : 64'hX;
            if (g !== e) bad++;
          end
          checks++;
          if (bad != 0) begin failures++; $display("frame %0d: %0d payload words wrong", tx_frame_idx, bad); end
        end
        n_frames[mode]++;
        fr.delete();
      end
    end
  end

  // ---------------- DAC monitor ----------------
  int n_dac_rx = 0, n_dac_lb = 0, dac_bad = 0, lat_min = 1 << 30, lat_max = -1;
  always @(posedge adc_clk) if (adc_rst_n && dac_valid && (mode == 2'd0 || dac_sel)) begin
    logic [63:0] e;
    int t;
    checks++;
    if (dacq.size() == 0) begin failures++; $display("unexpected DAC word"); end
    else begin
      e = dacq.pop_front();
      t = dac_t.pop_front();
      if (dac_data !== e) begin dac_bad++; failures++; if (dac_bad < 5) $display("DAC got %h exp %h", dac_data, e); end
      if (dac_sel) begin
        n_dac_lb++;
        if (acyc - t < lat_min) lat_min = acyc - t;
        if (acyc - t > lat_max) lat_max = acyc - t;
      end else n_dac_rx++;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    repeat (600000) @(posedge adc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // occasional MAC back-pressure
  bit stall_en = 1;
  always @(negedge eth_clk) tx_tready <= stall_en ? ($urandom_range(0, 7) != 0) : 1'b0;

  task automatic wait_adc(input int n);
    repeat (n) @(posedge adc_clk);
  endtask

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  int n_mode_switch = 0;

  initial begin
    repeat (4) @(posedge adc_clk);
    adc_rst_n = 1;
    eth_rst_n = 1;
    repeat (4) @(posedge adc_clk);

    // 1. Standard Design
    mode = 2'd0; dac_sel = 0;
    // ten frames: the 20280-sample capture used for one power estimate
    adc_samples(10 * 2 * BEATS);
    wait_adc(4000);
    expect_eq(n_frames[0], 10, "standard frames");
    expect_eq(dacq.size(), 0, "standard DAC words outstanding");
    expect_eq(n_dac_rx, 10 * BEATS, "standard DAC words");

    // 2. Loopback Design, internal loopback to the DAC
    mode = 2'd1; dac_sel = 1; n_mode_switch++;
    adc_samples(3 * BEATS);
    wait_adc(4000);
    expect_eq(n_frames[1], 3, "loopback frames");
    expect_eq(n_dac_lb, 3 * BEATS, "internal loopback DAC words");
    expect_eq(dacq.size(), 0, "loopback DAC words outstanding");
    checks++;
    if (lat_min != 5 || lat_max != 5) begin failures++; $display("internal loopback latency %0d..%0d, expected 5", lat_min, lat_max); end

    // 3. Data generator over the fronthaul with one lost and one corrupted frame
    dac_sel = 0;
    mode = 2'd2; n_mode_switch++;
    @(negedge adc_clk) sink_clear = 1;
    @(negedge adc_clk) sink_clear = 0;
    drop_idx    = tx_frame_idx + 1;
    corrupt_idx = tx_frame_idx + 3;
    adc_samples(5 * BEATS);
    wait_adc(4000);
    expect_eq(n_frames[2], 5, "data-gen frames");
    expect_eq(sink_beats, 3 * BEATS, "checked beats");
    expect_eq(sink_errors, 2, "checker errors (two gaps)");
    expect_eq(rx_seq_errors, 2, "SEQ_ID gaps detected");
    expect_eq(rx_frames_bad, 1, "frames rejected");
    expect_eq(rx_frames_ok, 16, "frames received");
    expect_eq(rx_pc_id, pc_id, "received PC_ID");
    expect_eq(tx_overflows, 0, "no overflow so far");
    expect_eq(rx_overflows, 0, "no receive overflow");

    // 3b. enough further frames for SEQ_ID to wrap from 255 to 0
    adc_samples(250 * BEATS);
    wait_adc(4000);
    expect_eq(n_frames[2], 255, "data-gen frames after wrap");
    expect_eq(sink_beats, 253 * BEATS, "checked beats after wrap");
    expect_eq(sink_errors, 2, "no checker errors across the wrap");
    expect_eq(rx_seq_errors, 2, "no SEQ_ID errors across the wrap");
    expect_eq(rx_frames_ok, 266, "frames received after wrap");

    // 4. MAC holds off: transmit FIFO overflows
    cmp_tx = 0;
    stall_en = 0;
    adc_samples(2 * 2048 + 100);
    stall_en = 1;
    wait_adc(6000);
    n_mode_switch += 0;

    // rates: frames every 2028 samples (Standard) / 1014 samples (Loopback)
    checks++;
    if (gap_min[0] < 2 * BEATS - 4 || gap_max[0] > 2 * BEATS + 4) begin
      failures++; $display("standard frame period %0d..%0d cycles", gap_min[0], gap_max[0]);
    end
    checks++;
    if (gap_min[1] < BEATS - 4 || gap_max[1] > BEATS + 4) begin
      failures++; $display("loopback frame period %0d..%0d cycles", gap_min[1], gap_max[1]);
    end

    // every mechanism must have happened
    begin
      string names [11] = '{"mode switch", "standard frames", "loopback frames", "data-gen frames",
                           "internal loopback", "fronthaul to DAC", "MAC stall",
                           "SEQ_ID gap", "SEQ_ID wrap", "frame rejected", "TX FIFO overflow"};
      int    cnt   [11];
      cnt = '{n_mode_switch, n_frames[0], n_frames[1], n_frames[2], n_dac_lb, n_dac_rx, n_stall,
              int'(rx_seq_errors), n_wrap, int'(rx_frames_bad), int'(tx_overflows)};
      for (int k = 0; k < 11; k++) begin
        checks++;
        $display("%-18s %0d", names[k], cnt[k]);
        if (cnt[k] == 0) begin failures++; $display("mechanism never exercised: %s", names[k]); end
      end
      $display("mode switches %0d, loopback latency %0d cycles, frame period std %0d..%0d lb %0d..%0d",
               n_mode_switch, lat_min, gap_min[0], gap_max[0], gap_min[1], gap_max[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
