// weight_fifo: FIFO1 / FIFO2, the parameter memories of CONV1 and CONV2.
//
// A DEPTH x 8-bit shift FIFO. During start-up the network parameters are
// written one byte per load pulse; after DEPTH loads the first byte written
// is at the head. From then on the control unit uses it as a circular buffer:
// each rot pulse moves the head byte to the tail, so after DEPTH rotations
// the content is back where it started. FIFO1 holds 65 bytes (bias + 64 CONV1
// weights), FIFO2 24 bytes (bias + 23 CONV2 weights), as in the source design.
// The byte order (bias first, then taps 0..K-1) is this implementation's choice.
//
// head is the current head byte, combinational from the register.
// load and rot must not be asserted together.
module weight_fifo #(
  parameter int unsigned DEPTH = 65,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_data,
  input  logic         rot,
  output logic [W-1:0] head
);
  logic [W-1:0] mem [DEPTH];

  assign head = mem[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (load || rot) begin
      for (int i = 0; i < DEPTH - 1; i++) mem[i] <= mem[i+1];
      mem[DEPTH-1] <= load ? load_data : mem[0];
    end
  end

  a_load_rot_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(load && rot));
endmodule
