// Testbench for cell_a: all 16 input combinations, checked against the
// arithmetic sum si + ci + (a & b) = so + 2*co.
module tb_cell_a;
  logic a, b, si, ci, so, co;
  int checks = 0, failures = 0;

  cell_a dut (.a(a), .b(b), .si(si), .ci(ci), .so(so), .co(co));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, si, ci} = 4'(v);
      #1;
      checks++;
      if (int'(so) + 2 * int'(co) != int'(si) + int'(ci) + int'(a & b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b si=%0b ci=%0b -> so=%0b co=%0b", a, b, si, ci, so, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
