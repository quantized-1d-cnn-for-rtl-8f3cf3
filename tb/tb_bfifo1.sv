// tb_bfifo1: writes random CONV1 activations and padding zeros into BFIFO1
// as a shift register, then reads it as a circular buffer for 23 cycles
// and checks that the taps come oldest-first and the buffer is unchanged
// afterwards. Repeats with stride-2 pushes between reads (as in CONV2),
// and checks clear.
module tb_bfifo1;
  localparam int DEPTH = 23;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear = 1'b0, push = 1'b0, zero = 1'b0, rot = 1'b0;
  logic [7:0] din = '0;
  logic [7:0] head;

  bfifo1 u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] model [$];   // model[0] = oldest

  // drive inputs one time unit after the clock edge
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic do_push(logic [7:0] v, bit z);
    push = 1'b1; din = v; zero = z;
    tick();
    push = 1'b0; zero = 1'b0;
    model.pop_front();
    model.push_back(z ? 8'h00 : v);
  endtask

  task automatic read_all();
    for (int k = 0; k < DEPTH; k++) begin
      check(head == model[k], $sformatf("tap %0d: %0d expected %0d", k, head, model[k]));
      rot = 1'b1;
      tick();
      rot = 1'b0;
    end
    check(head == model[0], "content unchanged after a full circle");
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model.push_back(8'h00);
    repeat (2) tick();
    rst_n = 1'b1;
    tick();
    read_all();   // reset content is all zero
    for (int i = 0; i < DEPTH; i++) do_push(8'($urandom), 1'b0);
    read_all();
    for (int r = 0; r < 30; r++) begin
      do_push(8'($urandom), ($urandom_range(3) == 0));
      do_push(8'($urandom), ($urandom_range(3) == 0));
      read_all();
    end
    clear = 1'b1;
    tick();
    clear = 1'b0;
    for (int i = 0; i < DEPTH; i++) model[i] = 8'h00;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
