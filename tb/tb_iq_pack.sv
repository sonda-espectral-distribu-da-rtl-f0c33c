// tb_iq_pack: checks that pairs of consecutive samples are joined into one
// 64-bit beat (earlier sample low) one clock after the second sample, with
// random gaps in the input strobe.
`timescale 1ps/1ps
module tb_iq_pack;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] in_iq = '0;
  logic out_valid;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  iq_pack dut (.*);
  always #4069 clk = ~clk;

  logic [31:0] pending [$];
  logic [63:0] expq [$];
  int n_in = 0, n_out = 0;
  bit  exp_valid_next = 0;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_valid_next) begin
      failures++;
      $display("valid timing mismatch at n_in=%0d", n_in);
    end
    if (out_valid) begin
      n_out++;
      if (expq.size() == 0) begin failures++; $display("unexpected beat"); end
      else begin
        logic [63:0] e;
        e = expq.pop_front();
        checks++;
        if (out_data !== e) begin failures++; $display("data %h != %h", out_data, e); end
      end
    end
    exp_valid_next = 0;
    if (in_valid) begin
      pending.push_back(in_iq);
      n_in++;
      if (pending.size() == 2) begin
        expq.push_back({pending[1], pending[0]});
        pending.delete();
        exp_valid_next = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      in_valid = (k < 2000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_iq    = $urandom;
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != n_in / 2) begin failures++; $display("beats %0d for %0d samples", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
