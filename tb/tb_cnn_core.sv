// tb_cnn_core: drives the Core's control word directly, with a schedule
// written out in this testbench, and checks the datapath end to end on two
// short windows (20 CONV1 outputs, 10 PCM samples each): parameter loading
// into FIFO1/FIFO2, CONV1 from SIPO_IN through the PE and tanh into BFIFO1,
// CONV2 from BFIFO1 and FIFO2 into the PCM register, zero pushes for the
// right padding and the BFIFO1 clear between windows. PDM bits arrive every
// 5 cycles from a separate process, so CONV1 reads SIPO_IN while it fills.
// Every PCM sample is compared with the pdm_ref_pkg model; win_full must
// come once per 64 bits.
module tb_cnn_core;
  import pdm_cnn_pkg::*;
  import pdm_ref_pkg::*;

  localparam int WIN = 64 * 20;
  localparam int RN1 = WIN / 64;
  localparam int RN2 = RN1 / 2;
  localparam int NW  = 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  ctrl_t       ctrl;
  logic [7:0]  cfg_data = '0;
  logic        pdm_valid = 1'b0, pdm_bit = 1'b0;
  logic        win_full, pcm_valid, pcm_last;
  data_t       pcm_data;

  cnn_core u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit x[];
  int w1[], w2[], b1, b2, y[NW][], sat_hits;
  int fed = 0;
  int n_full = 0, n_pcm = 0;

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic ctrl_t idle_ctrl();
    ctrl_t c;
    c       = '0;
    c.pe_op = PE_HOLD;
    c.align = ALIGN_INT;
    c.a_sel = A_ONE;
    c.w_sel = W_F1;
    return c;
  endfunction

  // monitors start once reset is released (registers are random before)
  always @(posedge clk) if (rst_n) begin
    if (win_full) n_full++;
    if (pcm_valid) begin
      int w, j;
      w = n_pcm / RN2;
      j = n_pcm % RN2;
      check(int'(pcm_data) == y[w][j],
            $sformatf("sample %0d: %0d expected %0d", n_pcm, pcm_data, y[w][j]));
      check(pcm_last == (j == RN2 - 1), "pcm_last");
      n_pcm++;
    end
  end

  task automatic conv1();
    ctrl = idle_ctrl(); ctrl.pe_op = PE_LOAD; ctrl.f1_rot = 1'b1; tick();
    for (int k = 0; k < K1; k++) begin
      ctrl = idle_ctrl(); ctrl.pe_op = PE_MAC; ctrl.a_sel = A_PDM; ctrl.f1_rot = 1'b1;
      ctrl.bit_idx = K1_W'(k);
      tick();
    end
    ctrl = idle_ctrl(); ctrl.bf_push = 1'b1; tick();
    ctrl = idle_ctrl();
  endtask

  task automatic conv2(bit last);
    ctrl = idle_ctrl(); ctrl.pe_op = PE_LOAD; ctrl.w_sel = W_F2; ctrl.f2_rot = 1'b1; tick();
    for (int k = 0; k < K2; k++) begin
      ctrl = idle_ctrl(); ctrl.pe_op = PE_MAC; ctrl.align = ALIGN_FRC; ctrl.a_sel = A_BF;
      ctrl.w_sel = W_F2; ctrl.f2_rot = 1'b1; ctrl.bf_rot = 1'b1;
      tick();
    end
    ctrl = idle_ctrl(); ctrl.out_we = 1'b1; ctrl.out_last = last; ctrl.bf_clear = last; tick();
    ctrl = idle_ctrl();
  endtask

  task automatic pad_zero();
    ctrl = idle_ctrl(); ctrl.bf_push = 1'b1; ctrl.bf_zero = 1'b1; tick();
    ctrl = idle_ctrl();
  endtask

  initial begin
    int pushes, outs;
    ctrl = idle_ctrl();
    ctrl.sipo_clr = 1'b1;
    w1 = new[K1];
    w2 = new[K2];
    b1 = int'($urandom_range(60)) - 30;
    b2 = int'($urandom_range(60)) - 30;
    foreach (w1[k]) w1[k] = int'($urandom_range(120)) - 40;
    foreach (w2[k]) w2[k] = int'($urandom_range(254)) - 127;
    make_pdm(x, NW * WIN, 1.0 / 331.0, 1.0 / 97.0, 0.8);
    for (int w = 0; w < NW; w++) network(x, w * WIN, WIN, b1, w1, b2, w2, y[w], sat_hits);

    repeat (2) tick();
    rst_n = 1'b1;
    tick();
    for (int i = 0; i < K1 + 1; i++) begin
      ctrl.f1_load = 1'b1; cfg_data = 8'(i == 0 ? b1 : w1[i-1]); tick();
    end
    ctrl.f1_load = 1'b0;
    for (int i = 0; i < K2 + 1; i++) begin
      ctrl.f2_load = 1'b1; cfg_data = 8'(i == 0 ? b2 : w2[i-1]); tick();
    end
    ctrl = idle_ctrl();

    fork
      // PDM source: one bit every 5 cycles, independent of the schedule
      for (int t = 0; t < NW * WIN; t++) begin
        pdm_valid = 1'b1; pdm_bit = x[t]; tick();
        pdm_valid = 1'b0; repeat (4) tick();
        fed++;
      end
    join_none
    for (int w = 0; w < NW; w++) begin
      pushes = 0;
      outs   = 0;
      for (int i = 0; i < RN1; i++) begin
        while (n_full <= w * RN1 + i) tick();
        conv1();
        pushes++;
        if (pushes == 13 || (pushes > 13 && pushes % 2 == 1)) begin
          conv2(outs == RN2 - 1);
          outs++;
        end
      end
      while (outs < RN2) begin
        pad_zero();
        pushes++;
        if (pushes > 13 && pushes % 2 == 1) begin
          conv2(outs == RN2 - 1);
          outs++;
        end
      end
    end
    wait (fed == NW * WIN);
    repeat (3) tick();
    check(n_full == NW * RN1, $sformatf("%0d win_full pulses, expected %0d", n_full, NW * RN1));
    check(n_pcm == NW * RN2, $sformatf("%0d PCM samples, expected %0d", n_pcm, NW * RN2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
