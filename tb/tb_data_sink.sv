// tb_data_sink: feeds the checker a correct LFSR stream, then one corrupted
// beat, then a stream with a gap (a lost packet); expects exactly one error
// for each fault and none otherwise. A random phase follows: rounds of random
// length with idle cycles between beats, each with no fault, a flipped bit in
// the low word (one error), a flipped bit in the high word (two errors: that
// beat and the prediction it seeds) or a gap of 1..60 words (one error).
`timescale 1ps/1ps
module tb_data_sink;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [63:0] in_data = '0;
  logic locked;
  logic [31:0] beats_checked, errors;
  int checks = 0, failures = 0;

  data_sink dut (.*);
  always #4069 clk = ~clk;

  function automatic logic [31:0] step(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  logic [31:0] st = 32'h0BAD_F00D;

  // fault: 0 none, 1 flip low-word bit `bitpos` of the first beat,
  //        2 flip high-word bit `bitpos` of the first beat
  int fault = 0, bitpos = 8;
  bit idle_gaps = 0;

  task automatic send(input int n, input bit corrupt_first);
    for (int k = 0; k < n; k++) begin
      if (idle_gaps) while ($urandom_range(0, 3) == 0) begin
        @(negedge clk) in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_data  = {step(st), st};
      if (corrupt_first && k == 0) begin
        if (fault == 2) in_data[32 + bitpos] = ~in_data[32 + bitpos];
        else            in_data[bitpos]      = ~in_data[bitpos];
      end
      st = step(step(st));
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk);
    #1;
  endtask

  task automatic expect_errors(input int e, input int b, input string what);
    checks++;
    if (errors != 32'(e) || beats_checked != 32'(b) || !locked) begin
      failures++;
      $display("%s: errors=%0d beats=%0d locked=%0b (expected %0d, %0d)", what, errors, beats_checked, locked, e, b);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++;
    if (locked) failures++;
    send(500, 0);
    expect_errors(0, 500, "clean stream");
    send(300, 1);
    expect_errors(1, 800, "corrupted beat");
    for (int k = 0; k < 37; k++) st = step(st);   // lose 37 words
    send(200, 0);
    expect_errors(2, 1000, "gap");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    if (locked || errors != 0 || beats_checked != 0) begin failures++; $display("clear failed"); end
    send(100, 0);
    expect_errors(0, 100, "after clear");

    begin
      int e = 0, b = 100, n, kind;
      idle_gaps = 1;
      for (int r = 0; r < 200; r++) begin
        n      = $urandom_range(2, 60);
        kind   = $urandom_range(0, 3);
        bitpos = $urandom_range(0, 31);
        fault  = (kind == 1 || kind == 2) ? kind : 0;
        if (kind == 3) begin
          for (int k = $urandom_range(1, 60); k > 0; k--) st = step(st);
          e += 1;
        end else e += kind;
        send(n, kind == 1 || kind == 2);
        b += n;
        expect_errors(e, b, $sformatf("random round %0d kind %0d", r, kind));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
