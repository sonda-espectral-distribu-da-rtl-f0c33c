// data_sink: checker of the Loopback Design ("Data Sink").
//
// Receives the 64-bit beats that come back from the deframer and verifies
// they continue the data_gen LFSR sequence. The first beat after reset (or
// after clear) locks the checker: its low word seeds the prediction. Every
// later word must equal the LFSR successor of the word before it; each beat
// with a wrong word counts one error. Because the prediction is reseeded from
// the received data, a lost packet shows as a single error and checking
// resumes afterwards. The document names the block and its purpose; the
// self-synchronising check is this design's choice.
//
// Timing: counters update one clock after each input beat.
`timescale 1ps/1ps
module data_sink
  import probe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        locked,
  output logic [31:0] beats_checked,
  output logic [31:0] errors
);

  logic [31:0] expect_next;   // predicted low word of the next beat
  logic        bad;

  always_comb begin
    bad = (in_data[63:32] != lfsr_next(in_data[31:0]));
    if (locked && in_data[31:0] != expect_next) bad = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      locked        <= 1'b0;
      expect_next   <= '0;
      beats_checked <= '0;
      errors        <= '0;
    end else if (in_valid) begin
      locked        <= 1'b1;
      expect_next   <= lfsr_next(in_data[63:32]);
      beats_checked <= beats_checked + 32'd1;
      if (bad) errors <= errors + 32'd1;
    end
  end

endmodule
