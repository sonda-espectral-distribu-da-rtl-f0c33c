// spectral_probe_top: FPGA fabric of the real-time spectral probe.
//
// The probe digitises up to 100 MHz of spectrum with an RF transceiver
// (122.88 Msps, 16-bit I and Q) and streams the raw IQ samples over a 10 Gbit
// optical link to a central server as eCPRI messages in Ethernet frames
// (Radio over Ethernet). This module is the logic between the transceiver's
// sample interface and the Ethernet subsystem's AXI4-Stream ports; the
// transceiver, the Ethernet MAC/PCS and the SFP+ optics are outside it.
//
// Transmit path (converter clock adc_clk, 122.88 MHz, then eth_clk, 156.25 MHz):
//   mode 0, Standard:  iq_pack joins two samples per 64-bit beat, 3.93 Gbit/s,
//                      one 8134-byte frame every 2028 samples (16.5 us).
//   mode 1, Loopback:  upsample2 + fir_interp (200 taps) produce two samples
//                      at 245.76 Msps per beat, 7.86 Gbit/s, one frame every
//                      1014 samples (8.25 us).
//   mode 2, Data Gen:  data_gen supplies a known pseudo-random pattern.
// The selected beats cross to eth_clk through tx_fifo and ecpri_framer emits
// frames on tx_*. Beats arriving while tx_fifo is full are dropped and counted
// in tx_overflows.
//
// Receive path: frames on rx_* (from the MAC, e.g. over a fibre loopback) are
// checked and unpacked by ecpri_deframer, cross back to adc_clk through
// rx_fifo, and are popped as soon as they are available to the DAC output and
// to data_sink, which checks the Data Gen pattern. With dac_sel = 1 the DAC is
// fed straight from the interpolation filter instead (the internal loopback).
//
// The Standard and Loopback datapaths are the document's two FPGA designs;
// carrying both in one module under a run-time mode input, the data-gen
// source select, the FIFO depths and the pop-when-available DAC feed are this
// design's choices. mode and dac_sel are quasi-static configuration inputs,
// changed while the stream is idle, and are used without synchronisers.
//
// Lint reports txf_wcount, rxf_wcount and rxf_rcount as unused. They are the
// FIFOs' occupancy outputs that this top does not need: the framer's start
// rule reads only the transmit FIFO's read-side count, and the receive FIFO
// is drained whenever it holds data, so its level is never consulted.
`timescale 1ps/1ps
module spectral_probe_top
  import probe_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 8112,
  parameter int unsigned FIR_TAPS      = 200,
  parameter int unsigned TX_FIFO_DEPTH = 2048,
  parameter int unsigned RX_FIFO_DEPTH = 2048
) (
  input  logic        adc_clk,
  input  logic        adc_rst_n,
  input  logic        eth_clk,
  input  logic        eth_rst_n,
  // configuration
  input  logic [1:0]  mode,
  input  logic        dac_sel,
  input  logic [47:0] dst_mac,
  input  logic [47:0] src_mac,
  input  logic [15:0] pc_id,
  // transceiver receive samples (adc_clk)
  input  logic        adc_valid,
  input  logic [15:0] adc_i,
  input  logic [15:0] adc_q,
  // transceiver transmit samples (adc_clk), two per beat
  output logic        dac_valid,
  output logic [63:0] dac_data,
  // frames to the Ethernet MAC (eth_clk)
  output logic        tx_tvalid,
  input  logic        tx_tready,
  output logic [63:0] tx_tdata,
  output logic [7:0]  tx_tkeep,
  output logic        tx_tlast,
  // frames from the Ethernet MAC (eth_clk)
  input  logic        rx_tvalid,
  input  logic [63:0] rx_tdata,
  input  logic [7:0]  rx_tkeep,
  input  logic        rx_tlast,
  // data checker control and status (adc_clk)
  input  logic        sink_clear,
  output logic        sink_locked,
  output logic [31:0] sink_beats,
  output logic [31:0] sink_errors,
  output logic [31:0] tx_overflows,
  output logic [31:0] rx_overflows,
  // fronthaul status (eth_clk)
  output logic [31:0] tx_frames,
  output logic [7:0]  tx_seq_id,
  output logic [31:0] rx_frames_ok,
  output logic [31:0] rx_frames_bad,
  output logic [31:0] rx_seq_errors,
  output logic [15:0] rx_pc_id
);

  localparam int unsigned TXC_W = $clog2(TX_FIFO_DEPTH) + 1;
  localparam int unsigned RXC_W = $clog2(RX_FIFO_DEPTH) + 1;

  src_mode_e src_mode;
  assign src_mode = src_mode_e'(mode);

  // ---------------- converter domain: sources ----------------
  iq_t adc_iq;
  assign adc_iq = '{q: adc_q, i: adc_i};

  logic        pack_valid, up_valid, fir_valid, gen_valid;
  logic [63:0] pack_data,  up_data,  fir_data,  gen_data;

  iq_pack u_pack (
    .clk(adc_clk), .rst_n(adc_rst_n),
    .in_valid(adc_valid), .in_iq(adc_iq),
    .out_valid(pack_valid), .out_data(pack_data)
  );

  upsample2 #(.L(2)) u_up (
    .clk(adc_clk), .rst_n(adc_rst_n),
    .in_valid(adc_valid), .in_iq(adc_iq),
    .out_valid(up_valid), .out_data(up_data)
  );

  fir_interp #(.TAPS(FIR_TAPS)) u_fir (
    .clk(adc_clk), .rst_n(adc_rst_n),
    .in_valid(up_valid), .in_data(up_data),
    .out_valid(fir_valid), .out_data(fir_data)
  );

  data_gen u_gen (
    .clk(adc_clk), .rst_n(adc_rst_n),
    .en(adc_valid && src_mode == MODE_DATAGEN),
    .out_valid(gen_valid), .out_data(gen_data)
  );

  logic        src_valid;
  logic [63:0] src_data;
  always_comb begin
    unique case (src_mode)
      MODE_LOOPBACK: begin src_valid = fir_valid;  src_data = fir_data;  end
      MODE_DATAGEN:  begin src_valid = gen_valid;  src_data = gen_data;  end
      default:       begin src_valid = pack_valid; src_data = pack_data; end
    endcase
  end

  // ---------------- transmit crossing and framer ----------------
  logic             txf_full, txf_empty, txf_rd;
  logic [63:0]      txf_data;
  logic [TXC_W-1:0] txf_wcount, txf_rcount;

  async_fifo #(.WIDTH(64), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .wr_clk(adc_clk), .wr_rst_n(adc_rst_n),
    .wr_en(src_valid), .wr_data(src_data), .full(txf_full), .wr_count(txf_wcount),
    .rd_clk(eth_clk), .rd_rst_n(eth_rst_n),
    .rd_en(txf_rd), .rd_data(txf_data), .empty(txf_empty), .rd_count(txf_rcount)
  );

  always_ff @(posedge adc_clk) begin
    if (!adc_rst_n)                tx_overflows <= '0;
    else if (src_valid && txf_full) tx_overflows <= tx_overflows + 32'd1;
  end

  ecpri_framer #(.PAYLOAD_BYTES(PAYLOAD_BYTES), .LEVEL_W(TXC_W)) u_framer (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .dst_mac(dst_mac), .src_mac(src_mac), .pc_id(pc_id),
    .s_tvalid(!txf_empty), .s_tready(txf_rd), .s_tdata(txf_data), .s_level(txf_rcount),
    .m_tvalid(tx_tvalid), .m_tready(tx_tready), .m_tdata(tx_tdata),
    .m_tkeep(tx_tkeep), .m_tlast(tx_tlast),
    .frames_sent(tx_frames), .seq_id(tx_seq_id)
  );

  // ---------------- receive path ----------------
  logic        dfr_valid;
  logic [63:0] dfr_data;
  logic [7:0]  rx_seq_id_unused;

  ecpri_deframer #(.PAYLOAD_BYTES(PAYLOAD_BYTES)) u_deframer (
    .clk(eth_clk), .rst_n(eth_rst_n),
    .s_tvalid(rx_tvalid), .s_tdata(rx_tdata), .s_tkeep(rx_tkeep), .s_tlast(rx_tlast),
    .m_valid(dfr_valid), .m_data(dfr_data),
    .frames_ok(rx_frames_ok), .frames_bad(rx_frames_bad), .seq_errors(rx_seq_errors),
    .last_pc_id(rx_pc_id), .last_seq_id(rx_seq_id_unused)
  );

  logic             rxf_full, rxf_empty;
  logic [63:0]      rxf_data;
  logic [RXC_W-1:0] rxf_wcount, rxf_rcount;

  async_fifo #(.WIDTH(64), .DEPTH(RX_FIFO_DEPTH)) u_rx_fifo (
    .wr_clk(eth_clk), .wr_rst_n(eth_rst_n),
    .wr_en(dfr_valid), .wr_data(dfr_data), .full(rxf_full), .wr_count(rxf_wcount),
    .rd_clk(adc_clk), .rd_rst_n(adc_rst_n),
    .rd_en(!rxf_empty), .rd_data(rxf_data), .empty(rxf_empty), .rd_count(rxf_rcount)
  );

  // counted in the write domain, reported in the converter domain's status
  // group; it only grows while the receive stream outruns the DAC side
  logic [31:0] rx_ovf_eth;
  always_ff @(posedge eth_clk) begin
    if (!eth_rst_n)                rx_ovf_eth <= '0;
    else if (dfr_valid && rxf_full) rx_ovf_eth <= rx_ovf_eth + 32'd1;
  end
  assign rx_overflows = rx_ovf_eth;

  // ---------------- converter domain: DAC feed and checker ----------------
  always_ff @(posedge adc_clk) begin
    if (!adc_rst_n) begin
      dac_valid <= 1'b0;
      dac_data  <= '0;
    end else if (dac_sel) begin
      dac_valid <= fir_valid;
      dac_data  <= fir_data;
    end else begin
      dac_valid <= !rxf_empty;
      dac_data  <= rxf_data;
    end
  end

  data_sink u_sink (
    .clk(adc_clk), .rst_n(adc_rst_n), .clear(sink_clear),
    .in_valid(!rxf_empty && src_mode == MODE_DATAGEN), .in_data(rxf_data),
    .locked(sink_locked), .beats_checked(sink_beats), .errors(sink_errors)
  );

endmodule
