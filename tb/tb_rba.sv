// tb_rba: checks the redundant-binary adder cell (W = 64 and W = 8).
//
// Random canonical RB operands (digits drawn from {-1, 0, +1}, with runs
// of one value to provoke transfers): the sum S = sp - sn must equal
// X + Y modulo 2^W and be canonical (no (1,1) digit). The 8-digit
// instance is run exhaustively over all 3^8 x 3^8 digit combinations of a
// random subset to reach every transfer pattern.
module tb_rba;

  localparam int unsigned W = 64;

  logic [W-1:0] xp, xn, yp, yn, sp, sn;
  logic [7:0]   xp8, xn8, yp8, yn8, sp8, sn8;
  int checks = 0, failures = 0;

  rba dut (.xp(xp),  .xn(xn),  .yp(yp),  .yn(yn),  .sp(sp),  .sn(sn));
  rba #(.W(8)) dut8  (.xp(xp8), .xn(xn8), .yp(yp8), .yn(yn8), .sp(sp8), .sn(sn8));

  // Random canonical RB digits: mode 0 uniform, 1 mostly +1, 2 mostly -1.
  function automatic void rand_rb(output logic [W-1:0] p, output logic [W-1:0] n, input int mode);
    for (int i = 0; i < W; i++) begin
      int r;
      r = $urandom_range(0, 9);
      case (mode)
        1:       begin p[i] = r < 8; n[i] = r == 9; end
        2:       begin p[i] = r == 9; n[i] = r < 8; end
        default: begin p[i] = r < 3; n[i] = r >= 3 && r < 6; end
      endcase
    end
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      rand_rb(xp, xn, i % 3);
      rand_rb(yp, yn, (i / 3) % 3);
      #1;
      checks += 2;
      if (sp - sn != (xp - xn) + (yp - yn)) begin
        failures++;
        if (failures < 10) $display("W=64 value mismatch");
      end
      if ((sp & sn) != '0) failures++;
    end
    // Small instance: digit vectors built from base-3 counters.
    for (int i = 0; i < 200000; i++) begin
      int ux, uy;
      ux = $urandom_range(0, 6560);
      uy = $urandom_range(0, 6560);
      for (int d = 0; d < 8; d++) begin
        xp8[d] = (ux % 3) == 1; xn8[d] = (ux % 3) == 2; ux /= 3;
        yp8[d] = (uy % 3) == 1; yn8[d] = (uy % 3) == 2; uy /= 3;
      end
      #1;
      checks++;
      if (8'(sp8 - sn8) != 8'((xp8 - xn8) + (yp8 - yn8)) || (sp8 & sn8) != '0) begin
        failures++;
        if (failures < 10) $display("W=8 mismatch x=%b/%b y=%b/%b s=%b/%b", xp8, xn8, yp8, yn8, sp8, sn8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
