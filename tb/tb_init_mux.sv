// Testbench for init_mux: zeros when con = 1, the fed-back state otherwise.
module tb_init_mux;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic         con;
  logic [W-1:0] fb, y;

  init_mux #(.W(W)) dut (.con(con), .fb(fb), .y(y));

  initial begin
    for (int i = 0; i < 200; i++) begin
      con = 1'($urandom);
      fb  = W'($urandom) | W'(1);
      #1;
      checks++;
      if (y !== (con ? W'(0) : fb)) begin
        failures++;
        $display("FAIL con=%0b fb=%h y=%h", con, fb, y);
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
