// pdm2pcm_top: PDM-to-PCM converter built on a quantized two-layer 1D-CNN.
//
// A 1-bit PDM stream (2.048 MHz from a digital MEMS microphone) is turned
// into 8-bit PCM at 16 kHz, a decimation by 128, by a 1D convolutional
// network used as decimation filter: CONV1 (kernel 64, stride 64) and CONV2
// (kernel 23, stride 2, "same" padding), each followed by tanh, with 8-bit
// weights, biases and activations and a 15-bit Q4.11 accumulator. One
// processing element computes both layers in turn (iterative architecture).
// The design is split, as in the source design, into a Control Unit (FSM)
// and a Core (PE, glue logic, SIPO_IN, FIFO1, FIFO2, BFIFO1).
//
// Interface (all synchronous to clk, 83.33 MHz in the reference setup):
//   cfg_valid/cfg_data : 89 parameter bytes after reset: bias1, w1[0..63],
//                        bias2, w2[0..22]; cfg_done rises when all are in.
//   pdm_valid/pdm_bit  : one PDM sample per pdm_valid pulse; bit 1 = +1.
//                        The input is cut into consecutive windows of
//                        WIN_BITS samples (1 s), each padded on its own.
//   pcm_valid/pcm_data : one signed Q1.7 sample per pulse, WIN_BITS/128 per
//                        window; pcm_last marks the last one of a window.
//   overrun            : pulses if a 64-bit window completes while the Core
//                        is still busy (PDM samples closer than ~4 cycles).
// Latency: 91 cycles from the PDM bit that completes a CONV2 receptive field
// to its PCM sample; 28 cycles between the right-padded samples at the end
// of a window.
module pdm2pcm_top
  import pdm_cnn_pkg::*;
#(
  parameter int unsigned WIN_BITS = 2_048_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  logic [DATA_W-1:0] cfg_data,
  output logic              cfg_done,
  input  logic              pdm_valid,
  input  logic              pdm_bit,
  output logic              pcm_valid,
  output logic [DATA_W-1:0] pcm_data,
  output logic              pcm_last,
  output logic              overrun
);
  ctrl_t ctrl;
  logic  win_full;
  data_t pcm_s;

  control_unit #(.WIN_BITS(WIN_BITS)) u_cu (
    .clk, .rst_n,
    .cfg_valid,
    .cfg_done,
    .win_full,
    .ctrl,
    .overrun
  );

  cnn_core u_core (
    .clk, .rst_n,
    .ctrl,
    .cfg_data,
    .pdm_valid,
    .pdm_bit,
    .win_full,
    .pcm_valid,
    .pcm_data (pcm_s),
    .pcm_last
  );

  assign pcm_data = pcm_s;
endmodule
