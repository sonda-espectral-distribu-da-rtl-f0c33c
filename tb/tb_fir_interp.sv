// tb_fir_interp: compares the interpolation filter, beat by beat, with a
// reference model that designs the same windowed-sinc filter using the
// simulator's own $sin/$sqrt and convolves in 64-bit integers. Then checks
// the filter's job directly: a DC input passes with unit gain per output
// sample, and a tone at 61.44 MHz (outside the 50 MHz passband) is strongly
// attenuated. Input beats carry a sample and an inserted zero, as produced by
// upsample2. out_valid must follow in_valid by exactly two clocks.
`timescale 1ps/1ps
module tb_fir_interp;
  localparam int T = 200;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0] in_data = '0;
  logic out_valid;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  fir_interp #(.TAPS(T)) dut (.*);
  always #2034 clk = ~clk;

  longint h [T];
  longint xi [$], xq [$];        // upsampled history, newest at the back
  logic [63:0] expq [$];

  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin t = t * (x*x/4.0) / (k*k); s += t; end
    return s;
  endfunction

  function automatic longint rnd_sat(input longint acc);
    longint r;
    r = (acc + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    real hr [T], sum, wc, m, u;
    wc = 100.0 / 245.76;
    sum = 0;
    for (int n = 0; n < T; n++) begin
      m = n - (T-1)/2.0;
      u = 2.0*n/(T-1) - 1.0;
      hr[n] = (m == 0.0 ? wc : $sin(3.141592653589793*wc*m)/(3.141592653589793*m))
            * i0(3.5*$sqrt(1.0-u*u)) / i0(3.5);
      sum += hr[n];
    end
    for (int n = 0; n < T; n++) h[n] = longint'($rtoi(hr[n]*2.0/sum*65536.0 + (hr[n] >= 0 ? 0.5 : -0.5)));
    for (int k = 0; k < T+2; k++) begin xi.push_back(0); xq.push_back(0); end
  end

  // model: push the two upsampled samples, compute both outputs
  task automatic model_push(input logic [63:0] d);
    logic [63:0] e;
    for (int p = 0; p < 2; p++) begin
      longint ai = 0, aq = 0;
      xi.push_back(longint'($signed(d[32*p +: 16])));
      xq.push_back(longint'($signed(d[32*p + 16 +: 16])));
      void'(xi.pop_front());
      void'(xq.pop_front());
      for (int k = 0; k < T; k++) begin
        ai += h[k] * xi[xi.size()-1-k];
        aq += h[k] * xq[xq.size()-1-k];
      end
      e[32*p +: 16]      = 16'(rnd_sat(ai));
      e[32*p + 16 +: 16] = 16'(rnd_sat(aq));
    end
    expq.push_back(e);
  endtask

  // latency: out_valid must repeat in_valid exactly two clocks later
  logic [1:0] vhist = '0;
  int lat_bad = 0;
  always @(posedge clk) begin
    if (rst_n && vhist[1] != out_valid) lat_bad++;
    vhist <= {vhist[0], in_valid && rst_n};
  end

  int n_out = 0;
  int peak_i_dc_err = 0, peak_tone = 0;
  int phase = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    n_out++;
    checks++;
    if (expq.size() == 0) begin failures++; end
    else begin
      e = expq.pop_front();
      if (out_data !== e) begin
        failures++;
        if (failures < 10) $display("beat %0d: got %h exp %h", n_out, out_data, e);
      end
    end
    for (int p = 0; p < 2; p++) begin
      int v;
      v = int'($signed(out_data[32*p +: 16]));
      if (phase == 1 && (v - 8000 > peak_i_dc_err || 8000 - v > peak_i_dc_err)) peak_i_dc_err = (v > 8000) ? v - 8000 : 8000 - v;
      if (phase == 2 && (v > peak_tone || -v > peak_tone)) peak_tone = (v > 0) ? v : -v;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic [31:0] s, input bit valid);
    @(negedge clk);
    in_valid = valid;
    in_data  = {32'h0, s};
    if (valid) model_push(in_data);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // random samples, random gaps
    for (int k = 0; k < 600; k++) drive($urandom, $urandom_range(0, 4) != 0);
    // impulse
    drive({16'sd0, 16'sd20000}, 1);
    for (int k = 0; k < 120; k++) drive(32'h0, 1);
    // near full scale, both signs
    for (int k = 0; k < 300; k++) drive((k % 2) ? {16'sh8000, 16'sh7fff} : {16'sh7fff, 16'sh8000}, 1);
    // DC: output must settle to the input value in both phases
    for (int k = 0; k < 150; k++) drive({16'sd0, 16'sd8000}, 1);
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    phase = 1;
    for (int k = 0; k < 50; k++) drive({16'sd0, 16'sd8000}, 1);
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    phase = 0;
    // tone at half the input rate: image region after upsampling
    for (int k = 0; k < 150; k++) drive({16'sd0, (k % 2) ? 16'sd8000 : -16'sd8000}, 1);
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    phase = 2;
    for (int k = 0; k < 50; k++) drive({16'sd0, (k % 2) ? 16'sd8000 : -16'sd8000}, 1);
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d beats missing", expq.size()); end
    checks++;
    if (lat_bad != 0) begin failures++; $display("%0d cycles where out_valid did not follow in_valid by 2", lat_bad); end
    checks++;
    if (peak_i_dc_err > 40) begin failures++; $display("DC gain error %0d", peak_i_dc_err); end
    checks++;
    if (peak_tone > 800) begin failures++; $display("61.44 MHz tone not rejected: %0d", peak_tone); end
    $display("DC error %0d, tone residue %0d of 8000", peak_i_dc_err, peak_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
