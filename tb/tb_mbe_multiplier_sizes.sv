// tb_mbe_multiplier_sizes: the multiplier at operand widths other than the
// default 32 bits.
//
//   N = 8  : exhaustive, all 65536 operand pairs (2 RB rows, 1 RBA level)
//   N = 16 : 100000 random pairs plus corners     (4 RB rows, 2 levels)
//   N = 64 : 50000 random pairs plus corners      (16 RB rows, 4 levels)
// Each product is compared with a signed multiplication done here, twice
// as wide as the operands. Combinational, checked 1 ns after each input.
module tb_mbe_multiplier_sizes;

  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  logic [15:0]  a16, b16;
  logic [31:0]  p16;
  logic [63:0]  a64, b64;
  logic [127:0] p64;
  int checks = 0, failures = 0;

  mbe_multiplier #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  mbe_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  mbe_multiplier #(.N(64)) dut64 (.a(a64), .b(b64), .p(p64));

  task automatic check16(input logic [15:0] av, input logic [15:0] bv);
    a16 = av; b16 = bv;
    #1;
    checks++;
    if (signed'(p16) != 32'(signed'(av)) * 32'(signed'(bv))) begin
      failures++;
      if (failures < 10) $display("N=16 %0d*%0d got %0d", signed'(av), signed'(bv), signed'(p16));
    end
  endtask

  task automatic check64(input logic [63:0] av, input logic [63:0] bv);
    logic signed [127:0] want;
    a64 = av; b64 = bv;
    #1;
    want = 128'(signed'(av)) * 128'(signed'(bv));
    checks++;
    if (p64 != want) begin
      failures++;
      if (failures < 10) $display("N=64 %h*%h got %h want %h", av, bv, p64, want);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (signed'(p8) != 16'(signed'(a8)) * 16'(signed'(b8))) begin
        failures++;
        if (failures < 10) $display("N=8 %0d*%0d got %0d", signed'(a8), signed'(b8), signed'(p8));
      end
    end
    check16(16'h8000, 16'h8000); check16(16'h7FFF, 16'h8000); check16(16'hFFFF, 16'h0001);
    for (int i = 0; i < 100000; i++) check16(16'($urandom()), 16'($urandom()));
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check64(64'h7FFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000);
    check64('1, '1);
    for (int i = 0; i < 50000; i++) check64({$urandom(), $urandom()}, {$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
