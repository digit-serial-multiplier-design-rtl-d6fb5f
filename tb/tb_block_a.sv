// Testbench for block_a, unsigned and signed variants at W = 16.
// Each row must conserve value: si + ci + b*A = p + 2*(ts + tc), read as
// unsigned numbers for the unsigned row and as two's complement numbers
// (sum and carry state sign-extended) for the signed row.
module tb_block_a;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic [W-1:0] a, ci;
  logic         b;
  logic [W-2:0] si_u, ts_u;
  logic [W-1:0] tc_u;
  logic         p_u;
  logic [W-1:0] si_s, ts_s, tc_s;
  logic         p_s;

  block_a #(.W(W), .SIGNED(1'b0)) dut_u (.a(a), .b(b), .si(si_u), .ci(ci),
                                         .ts_o(ts_u), .tc_o(tc_u), .p_o(p_u));
  block_a #(.W(W), .SIGNED(1'b1)) dut_s (.a(a), .b(b), .si(si_s), .ci(ci),
                                         .ts_o(ts_s), .tc_o(tc_s), .p_o(p_s));

  task automatic check_once();
    longint lhs, rhs;
    #1;
    lhs = longint'(si_u) + longint'(ci) + (b ? longint'(a) : 0);
    rhs = longint'(p_u) + 2 * (longint'(ts_u) + longint'(tc_u));
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL unsigned a=%h b=%0b si=%h ci=%h: %0d != %0d", a, b, si_u, ci, lhs, rhs);
    end
    lhs = longint'($signed(si_s)) + longint'($signed(ci)) + (b ? longint'($signed(a)) : 0);
    rhs = longint'(p_s) + 2 * (longint'($signed(ts_s)) + longint'($signed(tc_s)));
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL signed a=%h b=%0b si=%h ci=%h: %0d != %0d", a, b, si_s, ci, lhs, rhs);
    end
  endtask

  initial begin
    // corner values
    a = '1; b = 1; si_u = '1; si_s = '1; ci = '1; check_once();
    a = 16'h8000; b = 1; si_u = '0; si_s = 16'h8000; ci = 16'h8000; check_once();
    a = '0; b = 0; si_u = '0; si_s = '0; ci = '0; check_once();
    for (int i = 0; i < 2000; i++) begin
      a    = W'($urandom);
      b    = 1'($urandom);
      si_u = (W-1)'($urandom);
      si_s = W'($urandom);
      ci   = W'($urandom);
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
