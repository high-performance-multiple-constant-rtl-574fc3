// tb_rb_tree: checks the RBA summing tree (ROWS = 8, W = 64).
//
// Random canonical RB rows: the tree output sp - sn must equal the sum of
// all rows' X+ - X- modulo 2^W and be canonical. A second instance with
// ROWS = 2 checks the single-adder case.
module tb_rb_tree;

  localparam int unsigned ROWS = 8;
  localparam int unsigned W    = 64;

  logic [ROWS-1:0][W-1:0] xp, xn;
  logic [W-1:0]           sp, sn, sp2, sn2;
  int checks = 0, failures = 0;

  rb_tree dut(.xp(xp), .xn(xn), .sp(sp), .sn(sn));
  rb_tree #(.ROWS(2),    .W(W)) dut2 (.xp(xp[1:0]), .xn(xn[1:0]), .sp(sp2), .sn(sn2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] want, want2, rp, rn;
      want = '0;
      for (int r = 0; r < ROWS; r++) begin
        rp = {$urandom(), $urandom()};
        rn = {$urandom(), $urandom()};
        xp[r] = rp & ~rn;            // canonical
        xn[r] = rn & ~rp;
        want  = want + xp[r] - xn[r];
        if (r == 1) want2 = want;
      end
      #1;
      checks += 3;
      if (sp - sn != want) begin
        failures++;
        if (failures < 10) $display("sum %h want %h", sp - sn, want);
      end
      if ((sp & sn) != '0) failures++;
      if (sp2 - sn2 != want2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
