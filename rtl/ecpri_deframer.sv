// ecpri_deframer: Radio-over-Ethernet deframer for the fronthaul receive path.
//
// Parses the 64-bit AXI4-Stream frames delivered by the Ethernet MAC (the
// layout written by ecpri_framer) and returns the IQ payload as 64-bit beats
// of two samples in fabric byte order. The two header beats are checked as
// they pass: EtherType 0xAEFE, eCPRI revision 1 and message type 0 (IQ data).
// A frame that fails is dropped whole and counted in frames_bad; the third
// beat additionally carries the payload size, PC_ID and SEQ_ID. A frame whose
// size field, length or last-beat tkeep differ from PAYLOAD_BYTES is counted
// bad at its end; its payload has by then been forwarded.
//
// SEQ_ID continuity is tracked as the document describes the field's purpose:
// after the first good frame, every frame whose SEQ_ID is not one more than
// the previous one (modulo 256) increments seq_errors, which flags lost and
// reordered packets. No reordering is attempted.
//
// The payload lies 6 bytes off the beat grid (22-byte header): payload word j
// is the upper two bytes of beat j+2 followed by the lower six bytes of beat
// j+3. The MAC receive stream has no back-pressure, so neither has this block.
//
// Timing: each payload word is output one clock after the beat completing it.
`timescale 1ps/1ps
module ecpri_deframer
  import probe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 8112
) (
  input  logic        clk,
  input  logic        rst_n,
  // frames from the MAC
  input  logic        s_tvalid,
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tlast,
  // recovered IQ beats
  output logic        m_valid,
  output logic [63:0] m_data,
  // status
  output logic [31:0] frames_ok,
  output logic [31:0] frames_bad,
  output logic [31:0] seq_errors,
  output logic [15:0] last_pc_id,
  output logic [7:0]  last_seq_id
);

  localparam int unsigned PAYLOAD_BEATS = PAYLOAD_BYTES / BEAT_BYTES;
  localparam int unsigned FRAME_BEATS   = PAYLOAD_BEATS + 3;
  localparam logic [15:0] ECPRI_SIZE    = 16'(PAYLOAD_BYTES + 4);
  localparam int unsigned CNT_W         = $clog2(FRAME_BEATS + 1);

  logic [CNT_W-1:0] beat;        // beat index within the current frame
  logic             drop;        // header rejected: ignore to tlast
  logic             size_ok;
  logic [15:0]      resid;       // payload bytes 0..1 of the next word (wire order)
  logic             seq_valid;
  logic [7:0]       seq_exp;

  // header fields in the beat where they arrive
  logic hdr1_ok;
  assign hdr1_ok = ({s_tdata[39:32], s_tdata[47:40]} == ETHERTYPE_ECPRI)
                && (s_tdata[55:52] == ECPRI_REVISION)
                && (s_tdata[63:56] == ECPRI_MSG_IQ);

  logic [15:0] f_size, f_pc_id;
  logic [7:0]  f_seq;
  assign f_size  = {s_tdata[7:0],   s_tdata[15:8]};
  assign f_pc_id = {s_tdata[23:16], s_tdata[31:24]};
  assign f_seq   = s_tdata[39:32];

  logic end_ok;
  assign end_ok = size_ok && (beat == CNT_W'(FRAME_BEATS - 1)) && (s_tkeep == 8'h3F);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat        <= '0;
      drop        <= 1'b0;
      size_ok     <= 1'b0;
      resid       <= '0;
      seq_valid   <= 1'b0;
      seq_exp     <= '0;
      m_valid     <= 1'b0;
      m_data      <= '0;
      frames_ok   <= '0;
      frames_bad  <= '0;
      seq_errors  <= '0;
      last_pc_id  <= '0;
      last_seq_id <= '0;
    end else begin
      m_valid <= 1'b0;
      if (s_tvalid) begin
        beat <= s_tlast ? '0 : beat + 1'b1;
        if (beat == CNT_W'(1) && !drop && !hdr1_ok) drop <= 1'b1;
        if (beat == CNT_W'(2) && !drop) begin
          size_ok     <= (f_size == ECPRI_SIZE);
          last_pc_id  <= f_pc_id;
          last_seq_id <= f_seq;
          if (seq_valid && f_seq != seq_exp) seq_errors <= seq_errors + 32'd1;
          seq_valid <= 1'b1;
          seq_exp   <= f_seq + 8'd1;
        end
        if (beat >= CNT_W'(2) && !drop) begin
          resid <= s_tdata[63:48];
          if (beat >= CNT_W'(3) && beat < CNT_W'(PAYLOAD_BEATS + 3)) begin
            m_valid <= 1'b1;
            m_data  <= swap16_lanes({s_tdata[47:0], resid});
          end
        end
        if (s_tlast) begin
          drop <= 1'b0;
          if (!drop && !(beat == CNT_W'(1) && !hdr1_ok) && end_ok)
            frames_ok <= frames_ok + 32'd1;
          else
            frames_bad <= frames_bad + 32'd1;
        end
      end
    end
  end

endmodule
