// tanh_act: tanh activation from the Q4.11 accumulator to an 8-bit Q1.7 output.
//
// y = sign(x) * min(127, round(128 * tanh(t))), where t is |x| truncated to
// 8 fractional bits (|x| >> 3 in Q4.11 units). tanh(t) rounds to 127 for
// every t >= 2.77, so the magnitude table covers 0 <= t < 4 (1024 entries of
// 7 bits) and larger inputs saturate to 127. The table is computed at
// elaboration from $tanh, so it needs no data file. The output is symmetric
// (-127..127). The source design only names tanh as the activation and
// quantises activations to 8 bits; the table size, the input truncation and
// the rounding are this implementation's choices.
// Purely combinational.
module tanh_act
  import pdm_cnn_pkg::*;
(
  input  acc_t  x,
  output data_t y
);
  localparam int unsigned TBL_N   = 1024;  // entries, step 1/256
  localparam int unsigned IDX_SH  = ACC_FRAC - 8;

  typedef logic [DATA_W-2:0] mag_t;
  typedef mag_t tbl_t [TBL_N];

  function automatic tbl_t gen_table();
    tbl_t t;
    for (int i = 0; i < TBL_N; i++) begin
      real v;
      int  q;
      v = $tanh(real'(i) / 256.0) * 128.0;
      q = int'($floor(v + 0.5));
      if (q > 127) q = 127;
      t[i] = mag_t'(q);
    end
    return t;
  endfunction

  localparam tbl_t TBL = gen_table();

  logic [ACC_W:0]         mag;  // |x|, one extra bit for -16.0
  logic [IDX_SH-1:0]      unused_frac;  // fraction bits below the table step
  logic [ACC_W-IDX_SH:0]  idx;
  mag_t                   ym;

  always_comb begin
    mag = x[ACC_W-1] ? (ACC_W+1)'(-signed'({x[ACC_W-1], x})) : {1'b0, x};
    {idx, unused_frac} = mag;
    if (idx >= (ACC_W-IDX_SH+1)'(TBL_N)) ym = mag_t'(127);
    else                                 ym = TBL[idx[$clog2(TBL_N)-1:0]];
    y = x[ACC_W-1] ? -data_t'({1'b0, ym}) : data_t'({1'b0, ym});
  end
endmodule
