// tb_pdm2pcm_tone: a 1 kHz tone through the converter, measuring its SNR.
//
// The tone (amplitude 0.3) is PDM-encoded by a second-order sigma-delta
// modulator at 2.048 MHz, and 2,000 PCM samples (0.125 s, one window of
// 256,000 PDM bits) are produced. The parameters are a simple hand-made
// low-pass, not trained ones:
//   CONV1: 64 equal taps of 2/128, bias 0 (a moving average of the PDM
//          density, scaled so that tanh works in its near-linear range);
//   CONV2: 23-tap Hamming-windowed sinc with cut-off at a quarter of the
//          32 kHz rate, quantized to Q1.7, bias 0.
// Every PCM sample is compared with the bit-true model. A 1 kHz sine plus
// offset is then fitted to the steady-state part of the output (outside the
// padded edges) and the SNR (tone power over everything else, harmonics
// included) must exceed 25 dB. These weights give about 29 dB: a 64-tap
// moving average lets much of the modulator's shaped noise alias into the
// audio band. The reference design reports 41.56 dB at 1 kHz with its
// trained weights, which are not available here.
module tb_pdm2pcm_tone;
  import pdm_ref_pkg::*;

  localparam int WIN = 64 * 4000;   // 256,000 PDM bits -> 2,000 PCM samples
  localparam int N2  = WIN / 128;
  localparam real PI = 3.141592653589793;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       cfg_valid = 1'b0;
  logic [7:0] cfg_data = '0;
  logic       cfg_done;
  logic       pdm_valid = 1'b0;
  logic       pdm_bit = 1'b0;
  logic       pcm_valid;
  logic [7:0] pcm_data;
  logic       pcm_last;
  logic       overrun;

  pdm2pcm_top #(.WIN_BITS(WIN)) u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit x[];
  int w1[], w2[], y[], sat_hits = 0;
  int got[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pcm_valid) got.push_back(s8(pcm_data));
    if (overrun) check(1'b0, "overrun");
  end

  initial begin
    real hsum, h[23], sa, sc, sd, a, b, dc, ps, pn, e, snr;
    int  n0, n;
    w1 = new[K1];
    w2 = new[K2];
    foreach (w1[k]) w1[k] = 2;
    hsum = 0.0;
    for (int k = 0; k < K2; k++) begin
      real m, sinc;
      m = real'(k - 11);
      sinc = (k == 11) ? 0.5 : $sin(0.5 * PI * m) / (PI * m);
      h[k] = sinc * (0.54 + 0.46 * $cos(2.0 * PI * m / 22.0));
      hsum += h[k];
    end
    foreach (w2[k]) w2[k] = int'($floor(h[k] / hsum * 128.0 + 0.5));
    make_pdm_tone(x, WIN, 1000.0 / 2.048e6, 0.3);
    network(x, 0, WIN, 0, w1, 0, w2, y, sat_hits);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < K1 + K2 + 2; i++) begin
      cfg_valid <= 1'b1;
      if (i == 0)           cfg_data <= 8'd0;
      else if (i <= K1)     cfg_data <= 8'(w1[i-1]);
      else if (i == K1 + 1) cfg_data <= 8'd0;
      else                  cfg_data <= 8'(w2[i-K1-2]);
      @(posedge clk);
    end
    cfg_valid <= 1'b0;
    for (int t = 0; t < WIN; t++) begin
      pdm_valid <= 1'b1;
      pdm_bit   <= x[t];
      @(posedge clk);
      pdm_valid <= 1'b0;
      repeat (4) @(posedge clk);
    end
    repeat (400) @(posedge clk);

    check(got.size() == N2, $sformatf("%0d PCM samples, expected %0d", got.size(), N2));
    for (int j = 0; j < N2 && j < got.size(); j++)
      check(got[j] == y[j], $sformatf("sample %0d: %0d expected %0d", j, got[j], y[j]));

    // least-squares fit of offset + 1 kHz sine over whole periods (16 samples)
    n0 = 32;
    n  = ((N2 - 64) / 16) * 16;
    sa = 0.0; sc = 0.0; sd = 0.0;
    for (int j = n0; j < n0 + n; j++) begin
      sa += real'(got[j]) * $sin(2.0 * PI * j / 16.0);
      sc += real'(got[j]) * $cos(2.0 * PI * j / 16.0);
      sd += real'(got[j]);
    end
    a  = 2.0 * sa / n;
    b  = 2.0 * sc / n;
    dc = sd / n;
    ps = (a * a + b * b) / 2.0;
    pn = 0.0;
    for (int j = n0; j < n0 + n; j++) begin
      e = real'(got[j]) - dc - a * $sin(2.0 * PI * j / 16.0) - b * $cos(2.0 * PI * j / 16.0);
      pn += e * e;
    end
    pn  = pn / n;
    snr = 10.0 * $log10(ps / pn);
    $display("1 kHz tone: amplitude %0.1f LSB, SNR %0.2f dB over %0d samples", $sqrt(2.0 * ps), snr, n);
    check(snr > 25.0, $sformatf("SNR %0.2f dB below 25 dB", snr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WIN * 5 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
