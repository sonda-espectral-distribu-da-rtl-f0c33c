// data_gen: synthetic data source of the Loopback Design ("Data Gen").
//
// Used to validate framing, the fibre loopback and deframing with known
// content: every enabled cycle it emits one 64-bit beat holding the next two
// 32-bit words of a pseudo-random sequence, the earlier word in bits [31:0].
// The sequence is the state of a 32-bit Galois LFSR (x^32+x^22+x^2+x+1),
// stepped once per word, so data_sink can predict every word from the one
// before it. The document names the block and its purpose; the LFSR pattern
// and the seed are this design's choice.
//
// Timing: out_valid follows en by one clock; one beat per enabled cycle,
// which matches the 7.86 Gbit/s rate of the upsampled loopback stream when
// en is the ADC sample strobe.
`timescale 1ps/1ps
module data_gen
  import probe_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        out_valid,
  output logic [63:0] out_data
);

  logic [31:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= SEED;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        out_data <= {lfsr_next(state), state};
        state    <= lfsr_next(lfsr_next(state));
      end
    end
  end

endmodule
