// Testbench for block_b at W = 16.
// With con2 = 0 the row must act as the signed Block-A: si + ci + b*A =
// p + 2*(ts + tc) exactly, in two's complement. With con2 = 1 it adds b*(-A)
// instead; the sign cell's carry (weight 2^(W+1)) is dropped by design, so
// the identity is checked modulo 2^(W+1), which covers every bit that can
// reach the 2W-bit product. A = -2^(W-1), whose negation needs W+1 bits, is
// always included.
module tb_block_b;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic [W-1:0] a, si, ci, ts, tc;
  logic [W:0]   a_neg;
  logic         b, con2, p;

  block_b #(.W(W)) dut (.a(a), .a_neg(a_neg), .con2(con2), .b(b), .si(si), .ci(ci),
                        .ts_o(ts), .tc_o(tc), .p_o(p));

  task automatic check_once();
    longint lhs, rhs, av;
    a_neg = -{a[W-1], a};
    #1;
    av  = longint'($signed(a));
    lhs = longint'($signed(si)) + longint'($signed(ci)) + (b ? (con2 ? -av : av) : 0);
    rhs = longint'(p) + 2 * (longint'($signed(ts)) + longint'($signed(tc)));
    checks++;
    if (con2 ? ((lhs - rhs) % (longint'(1) << (W + 1)) != 0) : (lhs != rhs)) begin
      failures++;
      $display("FAIL con2=%0b a=%h b=%0b si=%h ci=%h: %0d vs %0d", con2, a, b, si, ci, lhs, rhs);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a    = (i % 25 == 1) ? 16'h8000 : W'($urandom);
      b    = (i % 3 != 0);
      con2 = i[0];
      si   = W'($urandom);
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
