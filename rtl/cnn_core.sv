// cnn_core: the Core of the converter, all datapath and storage.
//
// Holds the processing element (one multiply-accumulate per cycle), the
// tanh activation, the memory elements SIPO_IN (64 PDM bits), FIFO1
// (65 CONV1 parameter bytes), FIFO2 (24 CONV2 parameter bytes) and BFIFO1
// (23 CONV1 activations), and the glue logic that routes them:
//   operand A: +1 (bias cycles), the PDM tap from SIPO_IN mapped to +1/-1,
//              or the BFIFO1 head;
//   operand W: FIFO1 head or FIFO2 head;
//   BFIFO1 input: tanh of the accumulator (or zero for padding);
//   PCM output register: tanh of the accumulator.
// Both convolution layers are computed on the same PE, one after the other,
// under the control word ctrl from the control unit. The block partition
// follows the source design; the operand routing is this implementation's.
//
// Configuration bytes arrive on cfg_data and are written into FIFO1 or
// FIFO2 when ctrl.f1_load / ctrl.f2_load is set. win_full is combinational
// from pdm_valid. pcm_valid is a one-cycle pulse one clock after ctrl.out_we.
module cnn_core
  import pdm_cnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  logic  [DATA_W-1:0] cfg_data,
  input  logic  pdm_valid,
  input  logic  pdm_bit,
  output logic  win_full,
  output logic  pcm_valid,
  output data_t pcm_data,
  output logic  pcm_last
);
  logic  pdm_tap;
  data_t f1_head, f2_head, bf_head;
  data_t op_a, op_w, act;
  acc_t  acc;

  sipo_in #(.LEN(K1)) u_sipo_in (
    .clk, .rst_n,
    .clr      (ctrl.sipo_clr),
    .in_valid (pdm_valid),
    .in_bit   (pdm_bit),
    .rd_idx   (ctrl.bit_idx),
    .rd_bit   (pdm_tap),
    .win_full (win_full)
  );

  weight_fifo #(.DEPTH(K1 + 1), .W(DATA_W)) u_fifo1 (
    .clk, .rst_n,
    .load      (ctrl.f1_load),
    .load_data (cfg_data),
    .rot       (ctrl.f1_rot),
    .head      (f1_head)
  );

  weight_fifo #(.DEPTH(K2 + 1), .W(DATA_W)) u_fifo2 (
    .clk, .rst_n,
    .load      (ctrl.f2_load),
    .load_data (cfg_data),
    .rot       (ctrl.f2_rot),
    .head      (f2_head)
  );

  bfifo1 #(.DEPTH(K2), .W(DATA_W)) u_bfifo1 (
    .clk, .rst_n,
    .clear (ctrl.bf_clear),
    .push  (ctrl.bf_push),
    .zero  (ctrl.bf_zero),
    .din   (act),
    .rot   (ctrl.bf_rot),
    .head  (bf_head)
  );

  // glue logic: operand routing
  always_comb begin
    unique case (ctrl.a_sel)
      A_ONE:   op_a = data_t'(1);
      A_PDM:   op_a = pdm_tap ? data_t'(1) : data_t'(-1);
      A_BF:    op_a = bf_head;
      default: op_a = '0;
    endcase
    op_w = (ctrl.w_sel == W_F1) ? f1_head : f2_head;
  end

  processing_element u_pe (
    .clk, .rst_n,
    .op    (ctrl.pe_op),
    .align (ctrl.align),
    .a     (op_a),
    .w     (op_w),
    .acc   (acc)
  );

  tanh_act u_tanh (
    .x (acc),
    .y (act)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcm_valid <= 1'b0;
      pcm_data  <= '0;
      pcm_last  <= 1'b0;
    end else begin
      pcm_valid <= ctrl.out_we;
      pcm_last  <= ctrl.out_we && ctrl.out_last;
      if (ctrl.out_we) pcm_data <= act;
    end
  end
endmodule
