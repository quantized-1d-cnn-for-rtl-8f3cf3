// bfifo1: BFIFO1, the buffer of CONV1 outputs feeding CONV2.
//
// DEPTH (23) 8-bit entries, one CONV2 receptive field. When written it is a
// shift register: push drops the oldest entry and appends the new CONV1
// activation (or a padding zero when zero is set) at the tail. When read it
// is a circular buffer: rot moves the head (oldest entry) to the tail, so
// CONV2 reads taps oldest-first and after DEPTH rotations the buffer is
// unchanged. clear fills it with zeros, which provides the left "same"
// padding of a new 1 s window. Modes and size follow the source design; the
// clear used for padding is this implementation's choice.
//
// head is combinational from the register. At most one of clear, push, rot
// is asserted per cycle (clear wins).
module bfifo1 #(
  parameter int unsigned DEPTH = 23,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         push,
  input  logic         zero,
  input  logic [W-1:0] din,
  input  logic         rot,
  output logic [W-1:0] head
);
  logic [W-1:0] mem [DEPTH];

  assign head = mem[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push || rot) begin
      for (int i = 0; i < DEPTH - 1; i++) mem[i] <= mem[i+1];
      if (push) mem[DEPTH-1] <= zero ? '0 : din;
      else      mem[DEPTH-1] <= mem[0];
    end
  end

  a_push_rot_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(push && rot));
endmodule
