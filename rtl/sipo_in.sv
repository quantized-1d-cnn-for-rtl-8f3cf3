// sipo_in: SIPO_IN, the serial-in parallel-out buffer of the PDM input.
//
// Holds the last LEN (64) PDM bits, exactly one CONV1 receptive field
// (8 bytes, as in the source design). Every in_valid shifts one bit in.
// A counter of the bits received since the last full window raises win_full
// on the cycle that the LEN-th bit of a window is shifted in.
//
// The CONV1 computation reads the window one tap per cycle through rd_idx
// (0 = oldest bit of the window) while new bits may keep arriving: the read
// address adds the number of bits shifted in since the window was complete,
// so the window is read in place and no second copy is needed. A tap is valid
// until it falls out of the register, i.e. tap j may be read as long as fewer
// than j+1 new bits have arrived. The in-place read with shift compensation
// is this implementation's choice; the source only gives the buffer size.
//
// clr restarts the window counter (used while the parameters are loaded).
// Timing: win_full is combinational from in_valid; rd_bit is combinational.
module sipo_in #(
  parameter int unsigned LEN = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   in_valid,
  input  logic                   in_bit,
  input  logic [$clog2(LEN)-1:0] rd_idx,
  output logic                   rd_bit,
  output logic                   win_full
);
  localparam int unsigned IW = $clog2(LEN);

  logic [LEN-1:0] sr;   // sr[0] is the newest bit
  logic [IW-1:0]  cnt;  // bits received since the last complete window
  logic [IW-1:0]  pos;

  assign win_full = in_valid && !clr && (cnt == IW'(LEN - 1));

  // window tap j sits at LEN-1-j+cnt (modulo LEN, LEN is a power of two)
  assign pos    = IW'(LEN - 1) - rd_idx + cnt;
  assign rd_bit = sr[pos];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      cnt <= '0;
    end else begin
      if (in_valid) sr <= {sr[LEN-2:0], in_bit};
      if (clr)           cnt <= '0;
      else if (in_valid) cnt <= cnt + 1'b1;  // wraps to 0 after a full window
    end
  end

  initial assert (LEN == (1 << IW)) else $error("sipo_in: LEN must be a power of two");
endmodule
