// tb_booth_encoder: checks the radix-4 Booth encoder (N = 32).
//
// For random and corner multipliers, each digit is compared with the value
// -2*b[2j+1] + b[2j] + b[2j-1] worked out here, the code is checked to be
// one-hot in magnitude, and the digits are summed with weights 4^j to
// reproduce b as a signed number. Combinational, checked 1 ns after each
// input.
module tb_booth_encoder;

  localparam int unsigned N = 32;

  logic [N-1:0]              b;
  mbe_pkg::booth_t [N/2-1:0] dig;
  int checks = 0, failures = 0;

  booth_encoder dut (.b(b), .dig(dig));

  task automatic check(input logic [N-1:0] bv);
    longint total;
    int     want;
    b = bv;
    #1;
    total = 0;
    for (int j = 0; j < N/2; j++) begin
      want = -2 * int'(bv[2*j+1]) + int'(bv[2*j]) + ((j == 0) ? 0 : int'(bv[2*j-1]));
      checks++;
      if (mbe_pkg::booth_value(dig[j]) != want || (dig[j].one && dig[j].two)) begin
        failures++;
        if (failures < 10) $display("digit %0d of %h: got %b want %0d", j, bv, dig[j], want);
      end
      total += longint'(mbe_pkg::booth_value(dig[j])) <<< (2*j);
    end
    checks++;
    if (total != longint'(signed'(bv))) begin
      failures++;
      $display("sum of digits %0d != %0d", total, signed'(bv));
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0); check('1); check(32'h8000_0000); check(32'h7FFF_FFFF);
    check(32'h5555_5555); check(32'hAAAA_AAAA); check(32'h6DB6_DB6D);
    for (int i = 0; i < 20000; i++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
