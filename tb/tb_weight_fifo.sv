// tb_weight_fifo: loads DEPTH random bytes into the FIFO at its default
// depth (65, FIFO1) with random idle cycles, then rotates it through three
// full circles and checks that the head walks the bytes in load order and
// wraps around. Also checks that idle cycles hold the head and that a
// reload replaces the content.
module tb_weight_fifo;
  localparam int DEPTH = 65;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load = 1'b0, rot = 1'b0;
  logic [7:0] load_data = '0;
  logic [7:0] head;

  weight_fifo u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] ref_q [DEPTH];

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

  task automatic load_all();
    for (int i = 0; i < DEPTH; i++) begin
      ref_q[i] = 8'($urandom);
      load = 1'b1; load_data = ref_q[i];
      tick();
      load = 1'b0;
      if ($urandom_range(1) == 1) tick();
    end
    load = 1'b0;
    tick();
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1'b1;
    tick();
    for (int pass = 0; pass < 2; pass++) begin
      load_all();
      for (int i = 0; i < 3 * DEPTH; i++) begin
        check(head == ref_q[i % DEPTH], $sformatf("pass %0d rotation %0d: head %0d expected %0d",
                                                     pass, i, head, ref_q[i % DEPTH]));
        rot = 1'b1;
        tick();
        rot = 1'b0;
        if (i % 7 == 0) begin
          tick();
          check(head == ref_q[(i + 1) % DEPTH], "hold while idle");
        end
      end
    end
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
