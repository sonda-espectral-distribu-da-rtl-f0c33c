// ecpri_framer: Radio-over-Ethernet framer for the fronthaul transmit path.
//
// Takes 64-bit beats of IQ data (two samples per beat) from a FIFO and sends
// each PAYLOAD_BYTES of them as one Ethernet frame carrying an eCPRI IQ-data
// message, on a 64-bit AXI4-Stream towards the Ethernet MAC. The frame is
//   bytes  0..5   destination address      bytes  6..11  source address
//   bytes 12..13  EtherType 0xAEFE         byte  14      revision 1, C = 0
//   byte  15      message type 0 (IQ)      bytes 16..17  eCPRI payload size
//   bytes 18..19  PC_ID                    bytes 20..21  SEQ_ID, E/sub-seq
//   bytes 22..    IQ payload, each 16-bit component most significant byte first
// With the document's 8112-byte payload (2028 IQ pairs) the frame is 8134
// bytes: 1016 full beats and a last beat of six bytes (tkeep = 8'h3F). The
// payload size field counts PC_ID, SEQ_ID and the payload (PAYLOAD_BYTES+4).
// SEQ_ID's first byte counts frames modulo 256. Payload size, PC_ID, SEQ_ID
// and the 22-byte header come from the document and the eCPRI format; the
// field values, the byte-lane order and the start rule are this design's.
//
// Because the header is 22 bytes, the payload sits 6 bytes off the beat
// grid: each output beat holds the last six bytes of the previous payload
// word (or of the header) in lanes 0..5 and the first two bytes of the next
// payload word in lanes 6..7.
//
// A frame starts only when s_level shows a whole payload waiting, so the
// frame is never starved once begun (a MAC would otherwise abort it). The
// input handshake is AXI4-Stream (s_tvalid/s_tready, first-word-fall-through
// FIFO), and m_tready back-pressure stalls the frame at any beat.
//
// Timing: PAYLOAD_BEATS + 3 beats per frame at one beat per clock when not
// stalled, plus one idle cycle between frames.
`timescale 1ps/1ps
module ecpri_framer
  import probe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 8112,
  parameter int unsigned LEVEL_W       = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // header fields
  input  logic [47:0]        dst_mac,
  input  logic [47:0]        src_mac,
  input  logic [15:0]        pc_id,
  // payload source
  input  logic               s_tvalid,
  output logic               s_tready,
  input  logic [63:0]        s_tdata,
  input  logic [LEVEL_W-1:0] s_level,
  // frames to the MAC
  output logic               m_tvalid,
  input  logic               m_tready,
  output logic [63:0]        m_tdata,
  output logic [7:0]         m_tkeep,
  output logic               m_tlast,
  // status
  output logic [31:0]        frames_sent,
  output logic [7:0]         seq_id
);

  localparam int unsigned PAYLOAD_BEATS = PAYLOAD_BYTES / BEAT_BYTES;
  localparam logic [15:0] ECPRI_SIZE    = 16'(PAYLOAD_BYTES + 4);
  localparam int unsigned CNT_W         = $clog2(PAYLOAD_BEATS + 1);

  typedef enum logic [1:0] {S_IDLE, S_HDR0, S_HDR1, S_BODY} state_e;
  state_e state;

  logic [CNT_W-1:0] beat;      // payload word index within S_BODY
  logic [47:0]      resid;     // six bytes carried to the next beat
  logic [7:0]       hdr [HDR_BYTES];
  logic [63:0]      s_wire;

  // Header bytes in transmission order.
  always_comb begin
    for (int b = 0; b < 6; b++) begin
      hdr[b]     = dst_mac[8*(5-b) +: 8];
      hdr[6 + b] = src_mac[8*(5-b) +: 8];
    end
    hdr[12] = ETHERTYPE_ECPRI[15:8];
    hdr[13] = ETHERTYPE_ECPRI[7:0];
    hdr[14] = {ECPRI_REVISION, 3'b000, 1'b0};
    hdr[15] = ECPRI_MSG_IQ;
    hdr[16] = ECPRI_SIZE[15:8];
    hdr[17] = ECPRI_SIZE[7:0];
    hdr[18] = pc_id[15:8];
    hdr[19] = pc_id[7:0];
    hdr[20] = seq_id;
    hdr[21] = SEQ_ID_SUBSEQ;
  end

  assign s_wire = swap16_lanes(s_tdata);

  logic last_beat;
  assign last_beat = (state == S_BODY) && (beat == CNT_W'(PAYLOAD_BEATS));

  always_comb begin
    m_tvalid = 1'b0;
    m_tdata  = '0;
    m_tkeep  = 8'hFF;
    m_tlast  = 1'b0;
    s_tready = 1'b0;
    unique case (state)
      S_HDR0: begin
        m_tvalid = 1'b1;
        for (int b = 0; b < 8; b++) m_tdata[8*b +: 8] = hdr[b];
      end
      S_HDR1: begin
        m_tvalid = 1'b1;
        for (int b = 0; b < 8; b++) m_tdata[8*b +: 8] = hdr[8 + b];
      end
      S_BODY: begin
        if (last_beat) begin
          m_tvalid = 1'b1;
          m_tdata  = {16'h0, resid};
          m_tkeep  = 8'h3F;
          m_tlast  = 1'b1;
        end else begin
          m_tvalid = s_tvalid;
          m_tdata  = {s_wire[15:0], resid};
          s_tready = m_tready;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      beat        <= '0;
      resid       <= '0;
      seq_id      <= '0;
      frames_sent <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (s_level >= LEVEL_W'(PAYLOAD_BEATS)) state <= S_HDR0;
        S_HDR0:
          if (m_tready) state <= S_HDR1;
        S_HDR1:
          if (m_tready) begin
            state <= S_BODY;
            beat  <= '0;
            for (int b = 0; b < 6; b++) resid[8*b +: 8] <= hdr[16 + b];
          end
        S_BODY:
          if (m_tvalid && m_tready) begin
            if (last_beat) begin
              state       <= S_IDLE;
              seq_id      <= seq_id + 8'd1;
              frames_sent <= frames_sent + 32'd1;
            end else begin
              resid <= s_wire[63:16];
              beat  <= beat + 1'b1;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI4-Stream: once offered, a beat holds until it is taken.
  property p_stable;
    @(posedge clk) disable iff (!rst_n)
      (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata) && $stable(m_tlast));
  endproperty
  a_stable: assert property (p_stable) else $error("framer output changed while stalled");

endmodule
