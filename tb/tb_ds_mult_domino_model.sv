// Testbench for the domino timing model, with the row delays of the
// four-phase, 16-bit designs:
//  * unsigned, rows 700/400/290/210 ps at a 1.6 ns cycle: products correct,
//    no timing error, time borrowed by rows 1-4 = 300/300/190/0 ps;
//  * signed, rows 900/370/310/420 ps at a 2.0 ns cycle: products correct,
//    no timing error, borrowed 400/270/80/0 ps;
//  * unsigned at a 1.2 ns cycle: the first row cannot finish while its
//    phase is high, and the model must report timing errors.
module tb_ds_mult_domino_model;
  logic du, ds, df;
  int   cu, fu, cs, fs, cf, ff, bu, bs, bf;
  int   checks, failures;

  tb_domino_agent #(.SIGNED(1'b0), .TC_PS(1600), .ROW_DELAY_PS('{700, 400, 290, 210}),
                    .EXP_BORROW_PS('{300, 300, 190, 0}), .EXPECT_OK(1'b1)) ag_u (
    .done(du), .checks(cu), .failures(fu), .n_borrow_rows(bu));
  tb_domino_agent #(.SIGNED(1'b1), .TC_PS(2000), .ROW_DELAY_PS('{900, 370, 310, 420}),
                    .EXP_BORROW_PS('{400, 270, 80, 0}), .EXPECT_OK(1'b1)) ag_s (
    .done(ds), .checks(cs), .failures(fs), .n_borrow_rows(bs));
  tb_domino_agent #(.SIGNED(1'b0), .TC_PS(1200), .ROW_DELAY_PS('{700, 400, 290, 210}),
                    .EXP_BORROW_PS('{0, 0, 0, 0}), .EXPECT_OK(1'b0), .NPROD(4)) ag_f (
    .done(df), .checks(cf), .failures(ff), .n_borrow_rows(bf));

  initial begin
    #1ns;
    wait (du && ds && df);
    checks   = cu + cs + cf + 2;
    failures = fu + fs + ff;
    // time borrowing must have happened in both working designs
    if (bu == 0) begin failures++; $display("FAIL no time borrowing (unsigned)"); end
    if (bs == 0) begin failures++; $display("FAIL no time borrowing (signed)"); end
    $display("rows borrowing time: unsigned %0d, signed %0d", bu, bs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", cu + cs + cf, fu + fs + ff + 1);
    $finish;
  end
endmodule
