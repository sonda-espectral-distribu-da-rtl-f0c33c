// tb_data_gen: checks the generator's pseudo-random words against an
// independent bit-serial model of the x^32+x^22+x^2+x+1 Galois LFSR, and that
// one beat follows each enable by one clock.
`timescale 1ps/1ps
module tb_data_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic out_valid;
  logic [63:0] out_data;
  int checks = 0, failures = 0, beats = 0;

  data_gen #(.SEED(32'hACE1_2024)) dut (.*);
  always #4069 clk = ~clk;

  logic [31:0] model = 32'hACE1_2024;
  bit prev_en = 0;

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] r;
    logic fb;
    fb = s[0];
    for (int b = 0; b < 31; b++) r[b] = s[b+1];
    r[31] = fb;
    r[21] = s[22] ^ fb;   // tap x^22
    r[1]  = s[2]  ^ fb;   // tap x^2
    r[0]  = s[1]  ^ fb;   // tap x^1
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== prev_en) begin failures++; $display("valid timing"); end
    if (out_valid) begin
      logic [63:0] e;
      e = {step(model), model};
      model = step(step(model));
      beats++;
      checks++;
      if (out_data !== e) begin failures++; if (failures < 10) $display("got %h exp %h", out_data, e); end
    end
    prev_en = en;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk) en = ($urandom_range(0, 4) != 0);
    end
    @(negedge clk) en = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (beats < 3000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
