// iq_pack: sample concatenator of the Standard Design.
//
// The transceiver receive path delivers one 32-bit IQ sample per valid strobe
// at 122.88 Msps. The framer takes 64-bit AXI4-Stream beats, so two
// consecutive samples are joined into one beat, the earlier sample in bits
// [31:0]. A beat therefore appears every second ADC sample (61.44 M beats/s,
// 3.93 Gbit/s). Joining two samples per beat is the document's; the lane
// order and the registered output are this design's choice.
//
// Timing: out_valid pulses for one cycle, one clock after the second sample
// of a pair is accepted. There is no back-pressure: the ADC stream cannot
// stall, and the downstream FIFO absorbs the rate.
`timescale 1ps/1ps
module iq_pack (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_iq,
  output logic        out_valid,
  output logic [63:0] out_data
);

  logic        have_first;
  logic [31:0] first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      first      <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have_first) begin
          first      <= in_iq;
          have_first <= 1'b1;
        end else begin
          out_data   <= {in_iq, first};
          out_valid  <= 1'b1;
          have_first <= 1'b0;
        end
      end
    end
  end

endmodule
