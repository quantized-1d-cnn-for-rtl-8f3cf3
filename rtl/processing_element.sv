// processing_element: the PE, one multiplier, one adder and the output register.
//
// Each cycle it forms the product of operand a and weight w (both 8-bit
// signed), aligns it to the 15-bit Q4.11 accumulator format and either loads
// it (PE_LOAD, used for the bias with a = +1) or adds it to the accumulator
// (PE_MAC). The structure and the Q4.11 format follow the source design.
// Alignment (this implementation's choice):
//   ALIGN_INT: a is an integer (+1/-1), w is Q1.7 -> product Q1.7, shifted left 4
//   ALIGN_FRC: a and w are Q1.7                -> product Q2.14, arithmetic
//              shift right 3 (truncation towards minus infinity)
// The sum saturates to the Q4.11 range instead of wrapping.
// Timing: acc is registered; one MAC per clock, result visible next cycle.
module processing_element
  import pdm_cnn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pe_op_e op,
  input  align_e align,
  input  data_t  a,
  input  data_t  w,
  output acc_t   acc
);
  localparam int unsigned PW = 2 * DATA_W;  // product width
  localparam int unsigned SW = PW + ACC_FRAC - DATA_FRAC + 1;  // sum width, no overflow

  localparam logic signed [SW-1:0] ACC_MAX = SW'(signed'((1 <<< (ACC_W - 1)) - 1));
  localparam logic signed [SW-1:0] ACC_MIN = -SW'(signed'(1 <<< (ACC_W - 1)));

  logic signed [PW-1:0] prod;
  logic signed [SW-1:0] term, sum;
  acc_t                 sat;

  assign prod = a * w;

  always_comb begin
    if (align == ALIGN_INT) term = SW'(prod) <<< (ACC_FRAC - DATA_FRAC);
    else                    term = SW'(prod >>> (2 * DATA_FRAC - ACC_FRAC));
    sum = (op == PE_MAC) ? SW'(acc) + term : term;
    if (sum > ACC_MAX)      sat = ACC_W'(ACC_MAX);
    else if (sum < ACC_MIN) sat = ACC_W'(ACC_MIN);
    else                    sat = ACC_W'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              acc <= '0;
    else if (op != PE_HOLD)  acc <= sat;
  end
endmodule
