// tb_ecpri_framer: feeds the framer a stream of known IQ words and parses
// every frame it emits byte by byte: length 8134 bytes, Ethernet addresses,
// EtherType 0xAEFE, eCPRI revision, message type, payload size, PC_ID,
// incrementing SEQ_ID and the payload in network byte order against the
// words sent. Also checks that a frame waits for a full payload, that an
// unstalled frame occupies exactly 1017 consecutive cycles, and that random
// m_tready stalls lose nothing.
`timescale 1ps/1ps
module tb_ecpri_framer;
  localparam int PB    = 8112;
  localparam int BEATS = PB / 8;
  logic clk = 0, rst_n = 0;
  logic [47:0] dst_mac = 48'h02_11_22_33_44_55, src_mac = 48'h02_AA_BB_CC_DD_EE;
  logic [15:0] pc_id = 16'h0A5C;
  logic s_tvalid, s_tready;
  logic [63:0] s_tdata;
  logic [11:0] s_level;
  logic m_tvalid, m_tready = 1;
  logic [63:0] m_tdata;
  logic [7:0] m_tkeep;
  logic m_tlast;
  logic [31:0] frames_sent;
  logic [7:0] seq_id;
  int checks = 0, failures = 0;

  ecpri_framer #(.PAYLOAD_BYTES(PB), .LEVEL_W(12)) dut (.*);
  always #3200 clk = ~clk;

  logic [63:0] srcq [$];     // words offered to the framer
  logic [63:0] sentq [$];    // words the framer took, in order
  always_comb begin
    s_tvalid = srcq.size() > 0;
    s_tdata  = s_tvalid ? srcq[0] : 64'h0;
    s_level  = (srcq.size() > 4095) ? 12'd4095 : 12'(srcq.size());
  end

  byte unsigned fr [$];
  int frames = 0, cyc = 0, first_cyc = 0, stalls = 0;
  int exp_seq = 0;

  task automatic check_frame();
    int n;
    n = fr.size();
    checks++;
    if (n != PB + 22) begin failures++; $display("frame length %0d", n); return; end
    for (int b = 0; b < 6; b++) begin
      checks++;
      if (fr[b] != dst_mac[8*(5-b) +: 8] || fr[6+b] != src_mac[8*(5-b) +: 8]) begin failures++; $display("MAC byte %0d", b); end
    end
    checks++;
    if (fr[12] != 8'hAE || fr[13] != 8'hFE) begin failures++; $display("ethertype %h%h", fr[12], fr[13]); end
    checks++;
    if (fr[14] != 8'h10 || fr[15] != 8'h00) begin failures++; $display("ecpri rev/type %h %h", fr[14], fr[15]); end
    checks++;
    if ({fr[16], fr[17]} != 16'(PB + 4)) begin failures++; $display("payload size %0d", {fr[16], fr[17]}); end
    checks++;
    if ({fr[18], fr[19]} != pc_id) begin failures++; $display("pc_id"); end
    checks++;
    if (fr[20] != 8'(exp_seq)) begin failures++; $display("seq %0d exp %0d", fr[20], exp_seq); end
    exp_seq++;
    for (int w = 0; w < BEATS; w++) begin
      logic [63:0] e, g;
      e = sentq.pop_front();
      // samples: I then Q, each MSB first; earlier sample first
      for (int s = 0; s < 2; s++) begin
        g[32*s +: 16]      = {fr[22 + 8*w + 4*s],     fr[22 + 8*w + 4*s + 1]};
        g[32*s + 16 +: 16] = {fr[22 + 8*w + 4*s + 2], fr[22 + 8*w + 4*s + 3]};
      end
      checks++;
      if (g !== e) begin failures++; if (failures < 10) $display("word %0d got %h exp %h", w, g, e); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (m_tvalid && !m_tready) stalls++;
    if (s_tvalid && s_tready) sentq.push_back(srcq.pop_front());
    if (m_tvalid && m_tready) begin
      if (fr.size() == 0) first_cyc = cyc;
      for (int b = 0; b < 8; b++) if (m_tkeep[b]) fr.push_back(m_tdata[8*b +: 8]);
      if (m_tlast) begin
        checks++;
        if (m_tkeep != 8'h3F) begin failures++; $display("last tkeep %h", m_tkeep); end
        if (frames < 2) begin
          checks++;
          if (cyc - first_cyc != BEATS + 2) begin failures++; $display("frame took %0d cycles", cyc - first_cyc + 1); end
        end
        check_frame();
        fr.delete();
        frames++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_words(input int n);
    for (int k = 0; k < n; k++) srcq.push_back({$urandom, $urandom});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // less than a payload: no frame may start
    @(negedge clk) add_words(BEATS - 1);
    repeat (200) @(posedge clk);
    checks++;
    if (m_tvalid || frames_sent != 0) begin failures++; $display("frame started early"); end
    // two frames back to back, no stalls
    @(negedge clk) add_words(BEATS + 1 + BEATS);
    wait (frames == 2);
    // three more with random back-pressure
    @(negedge clk) add_words(3 * BEATS - 10);
    while (frames < 5) begin
      @(negedge clk) m_tready = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk) m_tready = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (frames_sent != 5 || seq_id != 5 || srcq.size() != BEATS - 10) begin
      failures++; $display("frames_sent %0d seq %0d left %0d", frames_sent, seq_id, srcq.size());
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("frames %0d stalls %0d", frames, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
