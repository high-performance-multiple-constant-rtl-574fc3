// tb_rb_ppg: checks the RB partial-product generator (N = 32).
//
// The Booth digits are formed here from a random multiplier b with the
// radix-4 rule, independently of booth_encoder. The N/4 RB rows produced
// for (a, b) must add up, as sum of (X+ - X-) modulo 2^(2N), to the signed
// product a*b: this covers the pairing, the sign-bit inversion with its
// folded constants, the neg bits moved into the next row and the exact
// last row. It also checks that each row k is confined to its own span
// (nothing below bit 4k-4) so that no extra correction row is hidden.
module tb_rb_ppg;

  localparam int unsigned N = 32;
  localparam int unsigned R = N / 4;

  logic [N-1:0]              a, b;
  mbe_pkg::booth_t [N/2-1:0] dig;
  logic [R-1:0][2*N-1:0]     xp, xn;
  int checks = 0, failures = 0;
  int last_neg = 0;

  rb_ppg dut (.a(a), .dig(dig), .xp(xp), .xn(xn));

  task automatic check(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N-1:0] total, want;
    logic [N:0]     bx;
    bx = {bv, 1'b0};
    for (int j = 0; j < N/2; j++) begin
      // triplet {b[2j+1], b[2j], b[2j-1]} -> (neg, two, one)
      dig[j].neg = bx[2*j+2];
      dig[j].one = bx[2*j+1] != bx[2*j];
      dig[j].two = (bx[2*j +: 3] == 3'b100) || (bx[2*j +: 3] == 3'b011);
    end
    a = av;
    #1;
    total = '0;
    for (int k = 0; k < R; k++) begin
      total = total + xp[k] - xn[k];
      if (k >= 1) begin
        checks++;
        if ((xp[k] | xn[k]) & ((64'd1 << (4*k-4)) - 1)) begin
          failures++;
          $display("row %0d has bits below position %0d", k, 4*k-4);
        end
      end
    end
    want = 64'(longint'(signed'(av)) * longint'(signed'(bv)));
    checks++;
    if (total != want) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h rows sum %h want %h", av, bv, total, want);
    end
    if (dig[N/2-2].neg && (dig[N/2-2].one || dig[N/2-2].two)) last_neg++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h8000_0000, 32'h7FFF_FFFF);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h0, 32'hAAAA_AAAA);
    check(32'h7FFF_FFFF, 32'h5555_5555);
    for (int i = 0; i < 30000; i++) check($urandom(), $urandom());
    checks++;
    if (last_neg == 0) begin failures++; $display("last row never negative"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
