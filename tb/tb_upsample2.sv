// tb_upsample2: checks zero insertion by two: each input sample leaves as a
// 64-bit beat {zero, sample} exactly one clock later.
`timescale 1ps/1ps
module tb_upsample2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] in_iq = '0;
  logic out_valid;
  logic [63:0] out_data;
  int checks = 0, failures = 0, beats = 0;

  upsample2 #(.L(2)) dut (.*);
  always #4069 clk = ~clk;

  bit          prev_valid = 0;
  logic [31:0] prev_iq;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== prev_valid) begin failures++; $display("valid latency wrong"); end
    if (out_valid && prev_valid) begin
      beats++;
      checks++;
      if (out_data[31:0] !== prev_iq || out_data[63:32] !== 32'h0) begin
        failures++; $display("beat %h for sample %h", out_data, prev_iq);
      end
    end
    prev_valid = in_valid;
    prev_iq    = in_iq;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_iq    = $urandom;
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (beats < 2000) begin failures++; $display("too few beats %0d", beats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
