// tb_pdm2pcm_top: end-to-end test of the converter on short windows.
//
// Loads 89 random parameter bytes, feeds N_WIN windows of a sigma-delta
// modulated two-tone signal with random gaps between PDM samples (4..45
// cycles; 40.7 is the real 2.048 MHz rate at 83.33 MHz), and compares every
// PCM sample with the bit-true model of pdm_ref_pkg. It also checks:
//   - 91 cycles from the completing PDM bit to a PCM sample,
//   - 28 cycles between right-padded samples at the end of a window
//     (93 for the first one, which needs one CONV1 output and one pad),
//   - pcm_last on the last sample of every window,
// and that each mechanism occurs: parameter load, left and right padding,
// window change, accumulator saturation, tanh saturation and, in a final
// phase with back-to-back PDM samples, overrun.
module tb_pdm2pcm_top;
  import pdm_ref_pkg::*;

  localparam int WIN   = 64 * 40;   // 40 CONV1 / 20 CONV2 outputs per window
  localparam int N_WIN = 3;
  localparam int N1    = WIN / K1;
  localparam int N2    = (N1 + S2 - 1) / S2;
  localparam int LAT_NORMAL = 91;
  localparam int LAT_PAD    = 28;

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
  int cyc = 0;
  bit x[];
  int w1[], w2[], b1, b2;
  int y[N_WIN][];
  int bit_cyc[];
  int n_in = 0;                 // PDM bits captured
  int n_out = 0;                // PCM samples seen
  int last_out_cyc = 0;
  bit checking = 1'b1;
  int sat_hits = 0;
  int cnt_left = 0, cnt_right = 0, cnt_last = 0, cnt_tsat = 0, cnt_ovr = 0, cnt_cfg = 0;
  int pl;
  int gap;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // cycle counter, input capture times and output monitor
  // monitors start once reset is released (registers are random before)
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (pdm_valid && cfg_done) begin
      if (n_in < bit_cyc.size()) bit_cyc[n_in] = cyc;
      n_in++;
    end
    if (overrun) begin
      cnt_ovr++;
      if (checking) check(1'b0, "overrun during regular input");
    end
    if (pcm_valid && checking) begin
      int w, j, c1_trig, lat;
      w = n_out / N2;
      j = n_out % N2;
      check(s8(pcm_data) == y[w][j],
            $sformatf("window %0d sample %0d: got %0d expected %0d", w, j, s8(pcm_data), y[w][j]));
      check(pcm_last == (j == N2 - 1), $sformatf("pcm_last at sample %0d", j));
      if (pcm_last) cnt_last++;
      if (s8(pcm_data) == 127 || s8(pcm_data) == -127) cnt_tsat++;
      if (S2 * j - pl < 0) cnt_left++;
      c1_trig = (K2 - pl) - 1 + S2 * j;
      if (c1_trig <= N1 - 1) begin
        lat = cyc - 1 - bit_cyc[w * WIN + K1 * c1_trig + K1 - 1];
        check(lat == LAT_NORMAL, $sformatf("latency %0d, expected %0d", lat, LAT_NORMAL));
      end else if (c1_trig - S2 < N1 - 1) begin
        cnt_right++;
        lat = cyc - 1 - bit_cyc[w * WIN + WIN - 1];
        check(lat == 92 + (c1_trig - (N1 - 1)),
              $sformatf("first padded sample latency %0d", lat));
      end else begin
        cnt_right++;
        check(cyc - last_out_cyc == LAT_PAD,
              $sformatf("padded sample interval %0d, expected %0d", cyc - last_out_cyc, LAT_PAD));
      end
      last_out_cyc = cyc;
      n_out++;
    end
  end

  initial begin
    // parameters: CONV1 mostly positive (low-pass like), CONV2 random sign
    w1 = new[K1];
    w2 = new[K2];
    b1 = int'($urandom_range(40)) - 20;
    b2 = int'($urandom_range(40)) - 20;
    foreach (w1[k]) w1[k] = int'($urandom_range(70)) + 10;
    foreach (w2[k]) w2[k] = int'($urandom_range(254)) - 127;
    make_pdm(x, N_WIN * WIN + 400, 1.0 / 997.0, 1.0 / 211.0, 0.9);
    bit_cyc = new[N_WIN * WIN];
    pl = pad_left(N1);
    for (int w = 0; w < N_WIN; w++) network(x, w * WIN, WIN, b1, w1, b2, w2, y[w], sat_hits);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // parameter load: bias1, w1[0..63], bias2, w2[0..22]
    for (int i = 0; i < K1 + K2 + 2; i++) begin
      cfg_valid <= 1'b1;
      if (i == 0)           cfg_data <= 8'(b1);
      else if (i <= K1)     cfg_data <= 8'(w1[i-1]);
      else if (i == K1 + 1) cfg_data <= 8'(b2);
      else                  cfg_data <= 8'(w2[i-K1-2]);
      @(posedge clk);
      gap = int'($urandom_range(2));
      if (gap > 0 || i == K1 + K2 + 1) begin
        cfg_valid <= 1'b0;
        repeat (gap) @(posedge clk);
      end
    end
    @(posedge clk);
    check(cfg_done, "cfg_done after 89 bytes");
    if (cfg_done) cnt_cfg++;

    for (int t = 0; t < N_WIN * WIN; t++) begin
      pdm_valid <= 1'b1;
      pdm_bit   <= x[t];
      @(posedge clk);
      pdm_valid <= 1'b0;
      repeat ($urandom_range(45, 4) - 1) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    check(n_out == N_WIN * N2, $sformatf("%0d PCM samples, expected %0d", n_out, N_WIN * N2));

    // overrun phase: PDM samples on consecutive cycles
    checking = 1'b0;
    for (int t = 0; t < 400; t++) begin
      pdm_valid <= 1'b1;
      pdm_bit   <= x[N_WIN * WIN + t];
      @(posedge clk);
    end
    pdm_valid <= 1'b0;
    repeat (300) @(posedge clk);

    $display("mechanisms: cfg_load=%0d left_pad=%0d right_pad=%0d window_end=%0d acc_sat=%0d tanh_sat=%0d overrun=%0d",
             cnt_cfg, cnt_left, cnt_right, cnt_last, sat_hits, cnt_tsat, cnt_ovr);
    check(cnt_cfg > 0, "parameter load never happened");
    check(cnt_left > 0, "left padding never happened");
    check(cnt_right > 0, "right padding never happened");
    check(cnt_last >= 2, "window change never happened");
    check(sat_hits > 0, "accumulator saturation never happened");
    check(cnt_tsat > 0, "tanh saturation never happened");
    check(cnt_ovr > 0, "overrun never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_WIN * WIN * 50 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
