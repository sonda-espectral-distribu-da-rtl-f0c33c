// tb_ecpri_deframer: builds eCPRI frames in the testbench (8134 bytes, header
// and big-endian payload written out byte by byte) and sends them with random
// idle gaps. Checks the recovered IQ words, the good-frame count, that a
// skipped SEQ_ID is flagged once, that a frame with a foreign EtherType is
// dropped without output, and that a truncated frame is counted bad.
`timescale 1ps/1ps
module tb_ecpri_deframer;
  localparam int PB    = 8112;
  localparam int BEATS = PB / 8;
  logic clk = 0, rst_n = 0;
  logic s_tvalid = 0, s_tlast = 0;
  logic [63:0] s_tdata = '0;
  logic [7:0] s_tkeep = '0;
  logic m_valid;
  logic [63:0] m_data;
  logic [31:0] frames_ok, frames_bad, seq_errors;
  logic [15:0] last_pc_id;
  logic [7:0] last_seq_id;
  int checks = 0, failures = 0;

  ecpri_deframer #(.PAYLOAD_BYTES(PB)) dut (.*);
  always #3200 clk = ~clk;

  logic [63:0] expq [$];
  int n_out = 0;

  always @(posedge clk) if (rst_n && m_valid) begin
    n_out++;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output word"); end
    else begin
      logic [63:0] e;
      e = expq.pop_front();
      if (m_data !== e) begin failures++; if (failures < 10) $display("word got %h exp %h", m_data, e); end
    end
  end

  task automatic send_frame(input logic [15:0] ethertype, input logic [7:0] seq,
                            input logic [15:0] pcid, input int truncate_bytes, input bit expect_out);
    byte unsigned f [$];
    logic [63:0] words [BEATS];
    int total;
    for (int b = 0; b < 12; b++) f.push_back(8'(b * 17 + 3));
    f.push_back(ethertype[15:8]); f.push_back(ethertype[7:0]);
    f.push_back(8'h10); f.push_back(8'h00);
    f.push_back(8'((PB + 4) >> 8)); f.push_back(8'(PB + 4));
    f.push_back(pcid[15:8]); f.push_back(pcid[7:0]);
    f.push_back(seq); f.push_back(8'h80);
    for (int w = 0; w < BEATS; w++) begin
      words[w] = {$urandom, $urandom};
      for (int s = 0; s < 2; s++) begin
        f.push_back(words[w][32*s + 8 +: 8]);  f.push_back(words[w][32*s +: 8]);
        f.push_back(words[w][32*s + 24 +: 8]); f.push_back(words[w][32*s + 16 +: 8]);
      end
      if (expect_out) expq.push_back(words[w]);
    end
    total = f.size() - truncate_bytes;
    for (int p = 0; p < total; p += 8) begin
      while ($urandom_range(0, 5) == 0) begin @(negedge clk) s_tvalid = 0; end
      @(negedge clk);
      s_tvalid = 1;
      s_tdata  = '0;
      s_tkeep  = '0;
      for (int b = 0; b < 8; b++) if (p + b < total) begin s_tdata[8*b +: 8] = f[p + b]; s_tkeep[b] = 1; end
      s_tlast = (p + 8 >= total);
    end
    @(negedge clk) begin s_tvalid = 0; s_tlast = 0; end
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_status(input int ok, input int bad, input int serr, input string what);
    checks++;
    if (frames_ok != 32'(ok) || frames_bad != 32'(bad) || seq_errors != 32'(serr)) begin
      failures++;
      $display("%s: ok %0d bad %0d seq_err %0d", what, frames_ok, frames_bad, seq_errors);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 3; k++) send_frame(16'hAEFE, 8'(k), 16'h0123, 0, 1);
    expect_status(3, 0, 0, "good frames");
    checks++;
    if (last_pc_id != 16'h0123 || last_seq_id != 8'd2) begin failures++; $display("pc_id/seq capture"); end
    send_frame(16'hAEFE, 8'd4, 16'h0123, 0, 1);           // SEQ_ID 3 lost
    expect_status(4, 0, 1, "sequence gap");
    send_frame(16'h0800, 8'd5, 16'h0123, 0, 0);           // not eCPRI: dropped
    expect_status(4, 1, 1, "foreign EtherType");
    checks++;
    if (expq.size() != 0) begin failures++; $display("output missing"); end
    send_frame(16'hAEFE, 8'd5, 16'h0456, 40, 1);          // truncated by 40 bytes
    expq.delete();                                          // its payload is partly forwarded
    expect_status(4, 2, 1, "truncated frame");
    send_frame(16'hAEFE, 8'd6, 16'h0789, 0, 1);
    expect_status(5, 2, 1, "recovery");
    checks++;
    if (expq.size() != 0 || last_pc_id != 16'h0789) begin failures++; $display("final frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
