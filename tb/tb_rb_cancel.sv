// tb_rb_cancel: checks the (1,1) -> (0,0) rewrite (W = 64).
//
// Random bit pairs, dense in (1,1) digits: the output must have the same
// value X+ - X- modulo 2^W as the input and contain no (1,1) pair, and
// every digit that was not (1,1) must pass unchanged.
module tb_rb_cancel;

  localparam int unsigned W = 64;

  logic [W-1:0] xp_i, xn_i, xp_o, xn_o;
  int checks = 0, failures = 0;

  rb_cancel dut (.xp_i(xp_i), .xn_i(xn_i), .xp_o(xp_o), .xn_o(xn_o));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      xp_i = {$urandom(), $urandom()};
      xn_i = {$urandom(), $urandom()};
      #1;
      checks += 3;
      if (xp_o - xn_o != xp_i - xn_i) failures++;
      if ((xp_o & xn_o) != '0) failures++;
      if (((xp_o ^ xp_i) | (xn_o ^ xn_i)) & ~(xp_i & xn_i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
