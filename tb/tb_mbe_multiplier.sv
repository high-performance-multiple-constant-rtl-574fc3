// tb_mbe_multiplier: end-to-end test of the N x N RB Booth multiplier at its
// default size (N = 32).
//
// Drives corner operands (0, +-1, the most negative and most positive
// values, alternating patterns) and then random ones, and compares p with
// the product computed by the simulator in 64-bit signed arithmetic. It
// also counts, from the design's internal signals, how often each
// mechanism of the datapath was exercised: every Booth digit value, the
// "negative zero" digit, neg bits carried into the next RB row, the exact
// negative multiples of the last row, (1,1) -> (0,0) cancellations, and a
// long carry in the final Ling adder. A mechanism never seen is a failure.
// The multiplier is combinational; each vector is checked 1 ns after it
// is applied.
module tb_mbe_multiplier;

  localparam int unsigned N       = 32;
  localparam int unsigned R       = N / 4;
  localparam int unsigned NRANDOM = 200000;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  int seen_digit [5];        // index value+2
  int seen_negzero  = 0;
  int seen_negbit   = 0;
  int seen_lastneg  = 0;
  int seen_cancel   = 0;
  int seen_longcarry = 0;

  mbe_multiplier dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [N-1:0] av, input logic [N-1:0] bv);
    longint expected;
    a = av;
    b = bv;
    #1;
    expected = longint'(signed'(av)) * longint'(signed'(bv));
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH a=%0d b=%0d p=%0d expected=%0d",
                 signed'(av), signed'(bv), signed'(p), expected);
    end
    // Mechanism bookkeeping.
    for (int j = 0; j < N/2; j++) begin
      seen_digit[mbe_pkg::booth_value(dut.dig[j]) + 2]++;
      if (dut.dig[j].neg && !dut.dig[j].one && !dut.dig[j].two)
        seen_negzero++;
    end
    for (int k = 1; k < R; k++)
      if (dut.pp_p[k][4*k-4] || dut.pp_n[k][4*k-2]) seen_negbit++;
    if ((dut.dig[N/2-2].neg && (dut.dig[N/2-2].one || dut.dig[N/2-2].two)) ||
        (!dut.dig[N/2-1].neg && (dut.dig[N/2-1].one || dut.dig[N/2-1].two)))
      seen_lastneg++;
    for (int k = 0; k < R; k++)
      if ((dut.pp_p[k] & dut.pp_n[k]) != '0) seen_cancel++;
    // A carry that ripples through at least 32 positions of the converter.
    if (((dut.sum_p ^ ~dut.sum_n) & 64'h0000_FFFF_FFFF_0000) == 64'h0000_FFFF_FFFF_0000)
      seen_longcarry++;
  endtask

  initial begin : watchdog
    #(NRANDOM * 4 + 100000);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [N-1:0] corners [10];
    corners = '{32'h0000_0000, 32'h0000_0001, 32'hFFFF_FFFF, 32'h8000_0000,
                32'h7FFF_FFFF, 32'h5555_5555, 32'hAAAA_AAAA, 32'h8000_0001,
                32'h0000_FFFF, 32'hFFFF_0000};
    foreach (seen_digit[i]) seen_digit[i] = 0;
    foreach (corners[i])
      foreach (corners[j])
        apply(corners[i], corners[j]);
    for (int i = 0; i < NRANDOM; i++)
      apply($urandom(), $urandom());
    // Operands with few significant bits: small products, long sign runs.
    for (int i = 0; i < 2000; i++)
      apply(N'(signed'(8'($urandom()))), N'(signed'(8'($urandom()))));

    $display("mechanisms: digit-2=%0d digit-1=%0d digit0=%0d digit+1=%0d digit+2=%0d",
             seen_digit[0], seen_digit[1], seen_digit[2], seen_digit[3], seen_digit[4]);
    $display("mechanisms: negzero=%0d negbit_moved=%0d lastrow_negative=%0d cancel11=%0d longcarry=%0d",
             seen_negzero, seen_negbit, seen_lastneg, seen_cancel, seen_longcarry);
    foreach (seen_digit[i]) begin
      checks++;
      if (seen_digit[i] == 0) begin failures++; $display("never seen: digit %0d", i - 2); end
    end
    checks += 5;
    if (seen_negzero == 0)   begin failures++; $display("never seen: negative zero digit"); end
    if (seen_negbit == 0)    begin failures++; $display("never seen: neg bit moved to next row"); end
    if (seen_lastneg == 0)   begin failures++; $display("never seen: exact negative last row"); end
    if (seen_cancel == 0)    begin failures++; $display("never seen: (1,1) cancellation"); end
    if (seen_longcarry == 0) begin failures++; $display("never seen: long carry in converter"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
