// tb_booth_decoder: checks one Booth partial-product row (N = 32).
//
// For every digit code (all eight (neg, two, one) patterns except the
// unused two=one=1) and random plus corner multiplicands, the row value
// q + neg, read as an (N+2)-bit two's complement number, must equal
// digit * a. Combinational, checked 1 ns after each input.
module tb_booth_decoder;

  localparam int unsigned N = 32;

  logic [N-1:0]    a;
  mbe_pkg::booth_t dig;
  logic [N+1:0]    q;
  logic            neg;
  int checks = 0, failures = 0;

  booth_decoder dut (.a(a), .dig(dig), .q(q), .neg(neg));

  task automatic check(input logic [N-1:0] av, input logic [2:0] code);
    longint got, want;
    a   = av;
    dig = code;
    #1;
    got  = longint'(signed'(q)) + longint'(neg);
    want = longint'(signed'(av)) * longint'(mbe_pkg::booth_value(code));
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("a=%0d code=%b got %0d want %0d", signed'(av), code, got, want);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] corners [6];
    corners = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5555_5555};
    for (int c = 0; c < 8; c++) begin
      if (c[1:0] == 2'b11) continue;
      foreach (corners[i]) check(corners[i], 3'(c));
      for (int i = 0; i < 3000; i++) check($urandom(), 3'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
