// probe_pkg: types and constants shared by the spectral-probe FPGA datapath.
//
// IQ samples are 16-bit two's-complement I and Q components (the transceiver
// delivers 14-bit samples sign-extended to 16 bits). Inside the fabric a sample
// is a packed 32-bit word with I in the low half; a 64-bit AXI4-Stream beat
// carries two samples, the earlier one in bits [31:0].
//
// On the fronthaul the eCPRI payload follows network (big-endian) byte order:
// each 16-bit component is sent most significant byte first, and byte n of the
// stream occupies byte lane n mod 8 of tdata (lane 0 = bits [7:0]). The header
// is 22 bytes: Ethernet destination and source addresses and EtherType (14),
// eCPRI common header (4), PC_ID (2) and SEQ_ID (2). With the 8112-byte payload
// this gives the 8134-byte frame of the design.
//
// The header constants are used only by the framer and deframer, so a lint
// run of the package together with any other single module reports them as
// unused parameters.
`timescale 1ps/1ps
package probe_pkg;

  typedef struct packed {
    logic signed [15:0] q;
    logic signed [15:0] i;
  } iq_t;

  // Source feeding the fronthaul framer.
  typedef enum logic [1:0] {
    MODE_STANDARD = 2'd0,   // two ADC samples packed per beat (3.93 Gbit/s)
    MODE_LOOPBACK = 2'd1,   // ADC upsampled by 2 and interpolated (7.86 Gbit/s)
    MODE_DATAGEN  = 2'd2    // synthetic pattern from the data generator
  } src_mode_e;

  localparam int unsigned BEAT_BYTES      = 8;
  localparam int unsigned HDR_BYTES       = 22;
  localparam logic [15:0] ETHERTYPE_ECPRI = 16'hAEFE;
  localparam logic [3:0]  ECPRI_REVISION  = 4'h1;
  localparam logic [7:0]  ECPRI_MSG_IQ    = 8'h00;  // message type 0: IQ data
  localparam logic [7:0]  SEQ_ID_SUBSEQ   = 8'h80;  // E bit set, sub-sequence 0

  // Swaps the two bytes of every 16-bit component of a 64-bit beat. Applied
  // on the way to the wire (fabric order -> network order) and back.
  function automatic logic [63:0] swap16_lanes(input logic [63:0] d);
    logic [63:0] r;
    for (int h = 0; h < 4; h++) begin
      r[16*h +: 8]     = d[16*h + 8 +: 8];
      r[16*h + 8 +: 8] = d[16*h +: 8];
    end
    return r;
  endfunction

  // Next state of the 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1) used by
  // the synthetic data generator and its checker.
  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    return {1'b0, s[31:1]} ^ (s[0] ? 32'h8020_0003 : 32'h0);
  endfunction

endpackage
