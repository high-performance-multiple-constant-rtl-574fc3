// tb_ling_adder: checks the parallel-prefix Ling adder at W = 64 (the size
// used in the multiplier), W = 128 and W = 5 (exhaustive).
//
// Sum and carry out are compared with a + b + cin computed one bit wider
// here. Random operands are mixed with complementary pairs (a, ~a), which
// make the carry-in ripple across the whole word.
module tb_ling_adder;

  logic [63:0]  a64, b64, s64;
  logic [127:0] a128, b128, s128;
  logic [4:0]   a5, b5, s5;
  logic         cin, c64, c128, c5;
  int checks = 0, failures = 0;

  ling_adder dut64 (.a(a64),  .b(b64),  .cin(cin), .sum(s64),  .cout(c64));
  ling_adder #(.W(128)) dut128 (.a(a128), .b(b128), .cin(cin), .sum(s128), .cout(c128));
  ling_adder #(.W(5))   dut5   (.a(a5),   .b(b5),   .cin(cin), .sum(s5),   .cout(c5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      logic [64:0]  w64;
      logic [128:0] w128;
      a64  = {$urandom(), $urandom()};
      b64  = (i % 4 == 0) ? ~a64 : {$urandom(), $urandom()};
      a128 = {$urandom(), $urandom(), $urandom(), $urandom()};
      b128 = (i % 4 == 1) ? ~a128 : {$urandom(), $urandom(), $urandom(), $urandom()};
      cin  = 1'($urandom());
      #1;
      w64  = {1'b0, a64} + {1'b0, b64} + 65'(cin);
      w128 = {1'b0, a128} + {1'b0, b128} + 129'(cin);
      checks += 2;
      if ({c64, s64} != w64) begin
        failures++;
        if (failures < 10) $display("W=64 %h+%h+%b got %b_%h", a64, b64, cin, c64, s64);
      end
      if ({c128, s128} != w128) failures++;
    end
    for (int i = 0; i < 2048; i++) begin
      {cin, a5, b5} = 11'(i);
      #1;
      checks++;
      if ({c5, s5} != 6'(a5) + 6'(b5) + 6'(cin)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
