// tb_sipo_in: feeds random PDM bits with random gaps. At every win_full it
// records the 64-bit window, then reads all taps oldest-first, one per
// cycle, while further bits keep arriving (at most one per cycle after the
// first, as in operation), and compares each tap with the recorded window.
// Also checks that win_full comes exactly every 64 bits and that clr
// restarts the count.
module tb_sipo_in;
  localparam int LEN = 64;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clr = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic [5:0] rd_idx = '0;
  logic       rd_bit, win_full;

  sipo_in #(.LEN(LEN)) u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit stream[$];
  int n_bits = 0, n_full = 0;
  int win_start = 0;
  bit reading = 0;
  int tap = 0;
  int gap_left = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // tap reader: starts on the cycle after win_full, one tap per cycle
  // monitors start once reset is released (registers are random before)
  always @(posedge clk) if (rst_n) begin
    if (reading) begin
      check(rd_bit == stream[win_start + tap],
            $sformatf("window %0d tap %0d", n_full, tap));
      if (tap == LEN - 1) reading <= 1'b0;
      tap    <= tap + 1;
      rd_idx <= 6'(tap + 1);
    end
    if (win_full) begin
      check(n_bits % LEN == LEN - 1, $sformatf("win_full after %0d bits", n_bits + 1));
      n_full  <= n_full + 1;
      reading <= 1'b1;
      tap     <= 0;
      rd_idx  <= '0;
      win_start <= n_bits + 1 - LEN;
    end
    if (in_valid) begin
      stream.push_back(in_bit);
      n_bits <= n_bits + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 64 * 60; i++) begin
      in_valid <= 1'b1;
      in_bit   <= 1'($urandom);
      @(posedge clk);
      // gaps of 1..3 cycles: reading a 64-tap window overlaps new bits
      gap_left = int'($urandom_range(2));
      if (gap_left > 0) begin
        in_valid <= 1'b0;
        repeat (gap_left) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (80) @(posedge clk);
    check(n_full == 60, $sformatf("%0d windows, expected 60", n_full));
    // clr restarts the count: 10 bits, clear, then 64 more bits give one window
    for (int i = 0; i < 10; i++) begin
      in_valid <= 1'b1; in_bit <= 1'($urandom); @(posedge clk);
    end
    in_valid <= 1'b0; clr <= 1'b1; @(posedge clk); clr <= 1'b0;
    stream.delete();
    n_bits = 0;
    for (int i = 0; i < LEN; i++) begin
      in_valid <= 1'b1; in_bit <= 1'($urandom); @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (80) @(posedge clk);
    check(n_full == 61, "window after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
