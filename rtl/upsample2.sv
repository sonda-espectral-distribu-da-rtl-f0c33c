// upsample2: upsampling by two (zero insertion) of the Loopback Design.
//
// The DAC of the transceiver runs at twice the ADC rate (245.76 against
// 122.88 Msps), so the received stream is upsampled by L = 2 before the
// interpolation filter. Each input sample x[n] becomes the L output samples
// x[n], 0, ..., 0, packed into one (32*L)-bit beat with x[n] in the lowest
// lane. With L = 2 this is the 64-bit beat the rest of the datapath uses,
// and the output bit rate doubles to 7.86 Gbit/s. The factor of two is the
// document's; zero insertion (rather than sample repetition) and the
// registered output are this design's choice.
//
// Timing: one beat per input sample, one clock of latency.
`timescale 1ps/1ps
module upsample2 #(
  parameter int unsigned L = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       in_iq,
  output logic              out_valid,
  output logic [32*L-1:0]   out_data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < int'(L); k++)
          out_data[32*k +: 32] <= (k == 0) ? in_iq : 32'h0;
      end
    end
  end

endmodule
