// pdm_cnn_pkg: types and constants shared by the PDM-to-PCM 1D-CNN converter.
//
// Number formats (all signed, two's complement):
//   weights, biases, activations : 8-bit Q1.7  (range [-1, 1), step 1/128)
//   accumulator                  : 15-bit Q4.11 (range [-16, 16), step 1/2048)
//   PDM input sample             : bit 1 -> +1, bit 0 -> -1
// The 8-bit quantisation and the 15-bit Q4.11 accumulator follow the source
// design; the Q1.7 split of the 8-bit words and the PDM bit mapping are this
// implementation's choices.
//
// The control word ctrl_t is produced by the control unit every cycle and
// consumed by the core; it carries all mode selects of the datapath.
package pdm_cnn_pkg;

  localparam int unsigned DATA_W = 8;   // weights, biases, activations
  localparam int unsigned ACC_W  = 15;  // Q4.11 accumulator
  localparam int unsigned ACC_FRAC = 11;
  localparam int unsigned DATA_FRAC = 7;

  // Network shape (fixed by the architecture: buffer sizes derive from it)
  localparam int unsigned K1 = 64;  // CONV1 kernel size (= stride, = SIPO_IN bits)
  localparam int unsigned K2 = 23;  // CONV2 kernel size (= BFIFO1 depth)
  localparam int unsigned S2 = 2;   // CONV2 stride
  localparam int unsigned K1_W = $clog2(K1);

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // PE operation
  typedef enum logic [1:0] {
    PE_HOLD = 2'd0,  // keep the accumulator
    PE_LOAD = 2'd1,  // acc <= product (first term, normally the bias)
    PE_MAC  = 2'd2   // acc <= sat(acc + product)
  } pe_op_e;

  // Alignment of the 16-bit product to Q4.11
  typedef enum logic {
    ALIGN_INT = 1'b0,  // operand A is an integer (+1/-1): product is Q1.7, shift left 4
    ALIGN_FRC = 1'b1   // operand A is Q1.7: product is Q2.14, shift right 3
  } align_e;

  // Source of PE operand A (glue logic multiplexer)
  typedef enum logic [1:0] {
    A_ONE = 2'd0,  // constant +1 (bias cycle)
    A_PDM = 2'd1,  // PDM bit from SIPO_IN mapped to +1/-1
    A_BF  = 2'd2   // CONV1 activation from BFIFO1
  } a_sel_e;

  // Source of PE operand W
  typedef enum logic {
    W_F1 = 1'b0,  // FIFO1 (CONV1 parameters)
    W_F2 = 1'b1   // FIFO2 (CONV2 parameters)
  } w_sel_e;

  typedef struct packed {
    logic   f1_load;   // FIFO1: shift in one configuration byte
    logic   f1_rot;    // FIFO1: circular advance
    logic   f2_load;   // FIFO2: shift in one configuration byte
    logic   f2_rot;    // FIFO2: circular advance
    logic   bf_push;   // BFIFO1: shift in a new CONV1 output
    logic   bf_zero;   // BFIFO1: the value pushed is a padding zero
    logic   bf_rot;    // BFIFO1: circular advance
    logic   bf_clear;  // BFIFO1: fill with zeros (left padding of a new window)
    logic   sipo_clr;  // SIPO_IN: restart window bit counting
    pe_op_e pe_op;
    align_e align;
    a_sel_e a_sel;
    w_sel_e w_sel;
    logic [K1_W-1:0] bit_idx;  // CONV1 tap index into the SIPO_IN window (0 = oldest)
    logic   out_we;    // register tanh(acc) as a PCM output sample
    logic   out_last;  // that sample is the last one of the 1 s window
  } ctrl_t;

endpackage
