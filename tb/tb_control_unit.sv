// tb_control_unit: checks the control word sequence of the FSM on a short
// window (40 CONV1 / 20 CONV2 outputs per window, two windows).
//   - loading: exactly 65 FIFO1 loads, then 24 FIFO2 loads, then cfg_done;
//   - every CONV1: bias load, 64 MACs on PDM taps 0..63 with FIFO1
//     rotating, then one BFIFO1 push of a real value;
//   - every CONV2: bias load, 23 MACs on BFIFO1 with FIFO2 and BFIFO1
//     rotating, then out_we;
//   - per window: 40 real pushes, 11 padding zeros (right pad of 21-10),
//     20 outputs, the first after 13 pushes, out_last on the last one and
//     BFIFO1 cleared with it;
//   - out_we 91 cycles after the win_full that completes a receptive field,
//     28 cycles between padded outputs;
//   - a win_full while busy gives overrun.
module tb_control_unit;
  import pdm_cnn_pkg::*;

  localparam int WIN = 64 * 40;
  localparam int N1  = 40;
  localparam int N2  = 20;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  cfg_valid = 1'b0, cfg_done, win_full = 1'b0, overrun;
  ctrl_t ctrl;

  control_unit #(.WIN_BITS(WIN)) u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_f1load = 0, n_f2load = 0;
  int n_push = 0, n_zero = 0, n_out = 0, n_ovr = 0, n_clear = 0;
  int seq = 0;             // 0: none, 1: in CONV1 MACs, 2: in CONV2 MACs
  int tap = 0;
  int full_cyc[$];
  int last_out = 0;
  bit checking = 1'b1;

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // monitors start once reset is released (registers are random before)
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ctrl.f1_load) begin check(n_f2load == 0, "FIFO1 load after FIFO2 load"); n_f1load++; end
    if (ctrl.f2_load) n_f2load++;
    if (overrun) n_ovr++;
    if (win_full && checking) full_cyc.push_back(cyc);
    if (checking && cfg_done) begin
      // sequence checker
      if (seq == 1) begin
        if (tap < K1) begin
          check(ctrl.pe_op == PE_MAC && ctrl.a_sel == A_PDM && ctrl.w_sel == W_F1 &&
                ctrl.f1_rot && ctrl.align == ALIGN_INT && ctrl.bit_idx == K1_W'(tap),
                $sformatf("CONV1 tap %0d", tap));
          tap++;
        end else begin
          check(ctrl.bf_push && !ctrl.bf_zero && ctrl.pe_op == PE_HOLD, "CONV1 write-back");
          seq = 0;
        end
      end else if (seq == 2) begin
        if (tap < K2) begin
          check(ctrl.pe_op == PE_MAC && ctrl.a_sel == A_BF && ctrl.w_sel == W_F2 &&
                ctrl.f2_rot && ctrl.bf_rot && ctrl.align == ALIGN_FRC && !ctrl.f1_rot,
                $sformatf("CONV2 tap %0d", tap));
          tap++;
        end else begin
          check(ctrl.out_we, "CONV2 output");
          seq = 0;
        end
      end else if (ctrl.pe_op == PE_LOAD) begin
        check(ctrl.a_sel == A_ONE && ctrl.align == ALIGN_INT, "bias cycle operand");
        seq = (ctrl.w_sel == W_F1) ? 1 : 2;
        check(seq == 1 ? ctrl.f1_rot : ctrl.f2_rot, "bias cycle rotation");
        tap = 0;
      end else begin
        check(!ctrl.f1_rot && !ctrl.f2_rot && !ctrl.bf_rot && ctrl.pe_op == PE_HOLD,
              "stray datapath activity");
      end
      if (ctrl.bf_push && !ctrl.bf_zero) n_push++;
      if (ctrl.bf_push && ctrl.bf_zero) n_zero++;
      if (ctrl.bf_clear) n_clear++;
      if (ctrl.out_we) begin
        int j, pushes_needed, lat;
        j = n_out % N2;
        pushes_needed = 13 + 2 * j;
        check(ctrl.out_last == (j == N2 - 1), "out_last");
        check(ctrl.bf_clear == (j == N2 - 1), "BFIFO1 clear at window end");
        if (pushes_needed <= N1) begin
          lat = cyc - full_cyc[(n_out / N2) * N1 + pushes_needed - 1];
          check(lat == 91, $sformatf("output %0d latency %0d, expected 91", j, lat));
        end else if (pushes_needed - 2 >= N1) begin
          check(cyc - last_out == 28, $sformatf("padded output interval %0d", cyc - last_out));
        end
        last_out = cyc;
        n_out++;
      end
    end
  end

  initial begin
    repeat (2) tick();
    rst_n = 1'b1;
    tick();
    for (int i = 0; i < 89; i++) begin
      check(!cfg_done, "cfg_done early");
      cfg_valid = 1'b1; tick();
      cfg_valid = 1'b0; if ($urandom_range(1) == 1) tick();
    end
    cfg_valid = 1'b0;
    tick();
    check(cfg_done, "cfg_done after 89 bytes");
    check(n_f1load == 65 && n_f2load == 24, $sformatf("loads %0d/%0d", n_f1load, n_f2load));
    for (int w = 0; w < 2 * N1; w++) begin
      repeat ($urandom_range(400, 260)) tick();
      win_full = 1'b1; tick(); win_full = 1'b0;
    end
    repeat (600) tick();
    check(n_push == 2 * N1, $sformatf("%0d CONV1 pushes", n_push));
    check(n_zero == 2 * 11, $sformatf("%0d padding pushes", n_zero));
    check(n_out == 2 * N2, $sformatf("%0d outputs", n_out));
    check(n_clear == 2, "BFIFO1 clears");
    check(n_ovr == 0, "no overrun at regular input");
    // overrun: a second window completes during CONV1
    checking = 1'b0;
    win_full = 1'b1; tick(); win_full = 1'b0;
    repeat (10) tick();
    win_full = 1'b1; tick(); win_full = 1'b0;
    repeat (3) tick();
    check(n_ovr == 1, $sformatf("%0d overrun pulses, expected 1", n_ovr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
