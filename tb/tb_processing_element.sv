// tb_processing_element: random load / multiply-accumulate sequences on the
// PE, checked against an integer model of the Q4.11 saturating accumulator
// (integer operand: product * 16; fractional operand: floor(product / 8)).
// Covers both alignments, hold, and saturation at both ends.
module tb_processing_element;
  import pdm_cnn_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  pe_op_e op = PE_HOLD;
  align_e align = ALIGN_INT;
  data_t  a = '0, w = '0;
  acc_t   acc;

  processing_element u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model = 0, term, s;
  int n_satp = 0, n_satn = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = int'($urandom_range(99));
      op    <= (r < 5) ? PE_LOAD : (r < 10) ? PE_HOLD : PE_MAC;
      align <= ($urandom_range(1) == 1) ? ALIGN_FRC : ALIGN_INT;
      // bias towards same-sign runs so that saturation happens
      w     <= data_t'((i / 500) % 2 == 0 ? $urandom_range(127) : -$urandom_range(128));
      a     <= ($urandom_range(1) == 1) ? data_t'($urandom) : ($urandom_range(1) == 1 ? data_t'(1) : data_t'(-1));
      @(posedge clk);
      #1;
      term = (align == ALIGN_INT) ? int'(a) * int'(w) * 16 : (int'(a) * int'(w)) >>> 3;
      if (op == PE_LOAD)     s = term;
      else if (op == PE_MAC) s = model + term;
      else                   s = model;
      if (s > 16383)  begin s = 16383;  n_satp++; end
      if (s < -16384) begin s = -16384; n_satn++; end
      model = s;
      checks++;
      if (int'(acc) != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: acc=%0d expected %0d", i, acc, model);
      end
    end
    $display("saturations: +%0d -%0d", n_satp, n_satn);
    checks++;
    if (n_satp == 0 || n_satn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
