// control_unit: the CU, a finite state machine that sequences the Core.
//
// After reset it is in LOAD: it writes the first K1+1 (65) configuration
// bytes into FIFO1 and the next K2+1 (24) into FIFO2, 89 bytes in all, and
// holds SIPO_IN's window counter cleared. Then it runs the network on
// consecutive windows of WIN_BITS PDM bits (2,048,000 = 1 s at 2.048 MHz):
//
//   CONV1 (kernel 64, stride 64), started by win_full of SIPO_IN:
//     C1_BIAS  1 cycle   acc <= bias1               (FIFO1 rotates)
//     C1_MAC  64 cycles  acc += w1[k] * pdm[k]      (FIFO1 rotates)
//     C1_WB    1 cycle   BFIFO1 <= tanh(acc)        (shift-register write)
//   CONV2 (kernel 23, stride 2, "same" padding), when BFIFO1 holds a new
//   receptive field:
//     C2_BIAS  1 cycle   acc <= bias2               (FIFO2 rotates)
//     C2_MAC  23 cycles  acc += w2[k] * bfifo1[k]   (FIFO2, BFIFO1 rotate)
//     C2_OUT   1 cycle   PCM <= tanh(acc)
//
// "same" padding of CONV2: total padding (N2-1)*S2 + K2 - N1 (21 for the
// default window), left part PAD_L (10). BFIFO1 is cleared at the start of
// every window, so the first PCM sample is computed after K2-PAD_L (13)
// CONV1 outputs and each further one after S2 (2) more. After the last CONV1
// output of a window the CU enters the tail: it pushes padding zeros
// (PAD state) instead of CONV1 outputs until the remaining samples are done.
//
// Latency (clock edges from the edge that captures the last PDM bit of a
// CONV1 window to the edge that raises pcm_valid): 91 when that window
// completes a CONV2 receptive field; in the tail a padded sample follows the
// previous one after 28 cycles. These are the figures given for the source
// design; the state split that produces them is this implementation's.
//
// A window that completes while the CU is still busy is remembered and
// processed next, and overrun pulses: its taps are only intact if CONV1
// starts within one PDM sample period. With the default window no overrun
// occurs if PDM samples are at least 4 clock cycles apart.
module control_unit
  import pdm_cnn_pkg::*;
#(
  parameter int unsigned WIN_BITS = 2_048_000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cfg_valid,
  output logic  cfg_done,
  input  logic  win_full,
  output ctrl_t ctrl,
  output logic  overrun
);
  // network geometry
  localparam int unsigned N1      = WIN_BITS / K1;              // CONV1 outputs per window
  localparam int unsigned N2      = (N1 + S2 - 1) / S2;         // CONV2 outputs per window
  localparam int          PAD_RAW = int'((N2 - 1) * S2 + K2) - int'(N1);
  localparam int unsigned PAD_TOT = (PAD_RAW > 0) ? PAD_RAW : 0;
  localparam int unsigned PAD_L   = PAD_TOT / 2;
  localparam int unsigned NEED_FIRST = K2 - PAD_L;              // pushes before the first CONV2
  localparam int unsigned NCFG1   = K1 + 1;
  localparam int unsigned NCFG    = K1 + 1 + K2 + 1;            // 89 parameter bytes

  localparam int unsigned C1W = $clog2(N1 + 1);
  localparam int unsigned C2W = $clog2(N2 + 1);
  localparam int unsigned CW  = $clog2(NCFG + 1);
  localparam int unsigned NW  = $clog2(K2 + 1);

  typedef enum logic [3:0] {
    S_LOAD, S_IDLE, S_C1_BIAS, S_C1_MAC, S_C1_WB,
    S_C2_BIAS, S_C2_MAC, S_C2_OUT, S_PAD
  } state_e;

  state_e         state, state_n;
  logic [CW-1:0]  cnt;     // configuration byte / tap counter
  logic [C1W-1:0] c1_idx;  // CONV1 outputs produced in this window
  logic [C2W-1:0] c2_idx;  // CONV2 outputs produced in this window
  logic [NW-1:0]  need;    // BFIFO1 pushes still missing for the next CONV2
  logic           tail;    // all CONV1 outputs of the window are done
  logic           pend;    // a complete SIPO_IN window waits for CONV1

  logic c1_last, c2_last, start_c1;

  assign c1_last  = (c1_idx == C1W'(N1 - 1));
  assign c2_last  = (c2_idx == C2W'(N2 - 1));
  assign cfg_done = (state != S_LOAD);
  assign start_c1 = (state == S_IDLE) && !tail && (pend || win_full);

  // next state
  always_comb begin
    state_n = state;
    unique case (state)
      S_LOAD:    if (cfg_valid && cnt == CW'(NCFG - 1)) state_n = S_IDLE;
      S_IDLE: begin
        if (tail)          state_n = (need == '0) ? S_C2_BIAS : S_PAD;
        else if (start_c1) state_n = S_C1_BIAS;
      end
      S_C1_BIAS: state_n = S_C1_MAC;
      S_C1_MAC:  if (cnt == CW'(K1 - 1)) state_n = S_C1_WB;
      S_C1_WB:   state_n = (need == NW'(1)) ? S_C2_BIAS : S_IDLE;
      S_C2_BIAS: state_n = S_C2_MAC;
      S_C2_MAC:  if (cnt == CW'(K2 - 1)) state_n = S_C2_OUT;
      S_C2_OUT:  state_n = S_IDLE;
      S_PAD:     if (need == NW'(1)) state_n = S_C2_BIAS;
      default:   state_n = S_IDLE;
    endcase
  end

  // control word (Moore outputs)
  always_comb begin
    ctrl          = '0;
    ctrl.pe_op    = PE_HOLD;
    ctrl.align    = ALIGN_INT;
    ctrl.a_sel    = A_ONE;
    ctrl.w_sel    = W_F1;
    ctrl.bit_idx  = cnt[K1_W-1:0];
    ctrl.out_last = c2_last;
    unique case (state)
      S_LOAD: begin
        ctrl.sipo_clr = 1'b1;
        ctrl.f1_load  = cfg_valid && (cnt <  CW'(NCFG1));
        ctrl.f2_load  = cfg_valid && (cnt >= CW'(NCFG1));
      end
      S_C1_BIAS: begin
        ctrl.pe_op  = PE_LOAD;
        ctrl.f1_rot = 1'b1;
      end
      S_C1_MAC: begin
        ctrl.pe_op  = PE_MAC;
        ctrl.a_sel  = A_PDM;
        ctrl.f1_rot = 1'b1;
      end
      S_C1_WB:  ctrl.bf_push = 1'b1;
      S_C2_BIAS: begin
        ctrl.pe_op  = PE_LOAD;
        ctrl.w_sel  = W_F2;
        ctrl.f2_rot = 1'b1;
      end
      S_C2_MAC: begin
        ctrl.pe_op  = PE_MAC;
        ctrl.align  = ALIGN_FRC;
        ctrl.a_sel  = A_BF;
        ctrl.w_sel  = W_F2;
        ctrl.f2_rot = 1'b1;
        ctrl.bf_rot = 1'b1;
      end
      S_C2_OUT: begin
        ctrl.out_we   = 1'b1;
        ctrl.bf_clear = c2_last;  // left padding of the next window
      end
      S_PAD: begin
        ctrl.bf_push = 1'b1;
        ctrl.bf_zero = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      cnt     <= '0;
      c1_idx  <= '0;
      c2_idx  <= '0;
      need    <= NW'(NEED_FIRST);
      tail    <= 1'b0;
      pend    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      state   <= state_n;
      overrun <= win_full && (state != S_LOAD) && !start_c1;
      if (state == S_LOAD) pend <= 1'b0;
      else if (start_c1)   pend <= 1'b0;
      else if (win_full)   pend <= 1'b1;

      unique case (state)
        S_LOAD:    if (cfg_valid) cnt <= (cnt == CW'(NCFG - 1)) ? '0 : cnt + 1'b1;
        S_C1_BIAS, S_C2_BIAS: cnt <= '0;
        S_C1_MAC, S_C2_MAC:   cnt <= cnt + 1'b1;
        S_C1_WB: begin
          cnt    <= '0;
          need   <= need - 1'b1;
          c1_idx <= c1_idx + 1'b1;
          if (c1_last) tail <= 1'b1;
        end
        S_PAD:     need <= need - 1'b1;
        S_C2_OUT: begin
          if (c2_last) begin  // window finished
            c1_idx <= '0;
            c2_idx <= '0;
            need   <= NW'(NEED_FIRST);
            tail   <= 1'b0;
          end else begin
            c2_idx <= c2_idx + 1'b1;
            need   <= NW'(S2);
          end
        end
        default: ;
      endcase
    end
  end

  initial begin
    assert (WIN_BITS % K1 == 0) else $error("control_unit: WIN_BITS must be a multiple of %0d", K1);
    assert (N1 >= 2) else $error("control_unit: window too short");
  end
  a_need_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == S_C1_WB || state == S_PAD) |-> need != '0);
endmodule
