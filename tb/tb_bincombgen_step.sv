// tb_bincombgen_step: self-checking test of the combinational generation step.
//
// Part 1 drives a (6,3) step with each of the 20 published states of the
// (6,3) sequence (IND, S, A[1..3], B) and checks that the outputs equal the
// next state of that sequence, that the refill/carry flags agree with the
// S < MAX and IND < K tests, and that only the final state raises last_o.
// Part 2 closes the loop in the testbench for a (9,4) step: the testbench
// holds the registers, applies the step repeatedly from the initial state and
// compares every B with the next vector in reverse lexicographic order, worked
// out by a separate rule (move the rightmost 1 that has a 0 to its right one
// place right and pack all ones to its right directly behind it), and checks
// that exactly C(9,4) = 126 vectors come out before last_o.
module tb_bincombgen_step;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- Part 1: the published (6,3) sequence -----------------
  localparam int N1 = 6, K1 = 3;
  // Rows: IND, S, A1, A2, A3, B
  localparam int ROWS = 20;
  localparam int T_IND [ROWS] = '{3,3,3,2,3,3,2,3,2,1,3,3,2,3,2,1,3,2,1,0};
  localparam int T_S   [ROWS] = '{2,3,4,2,3,4,3,4,4,2,3,4,3,4,4,3,4,4,4,5};
  localparam int T_A1  [ROWS] = '{1,1,1,1,1,1,1,1,1,1,2,2,2,2,2,2,3,3,3,4};
  localparam int T_A2  [ROWS] = '{1,1,1,1,2,2,2,3,3,4,2,2,2,3,3,4,3,3,4,4};
  localparam int T_A3  [ROWS] = '{1,2,3,4,2,3,4,3,4,4,2,3,4,3,4,4,3,4,4,4};
  localparam logic [5:0] T_B [ROWS] = '{6'h38,6'h34,6'h32,6'h31,6'h2c,6'h2a,6'h29,
                                        6'h26,6'h25,6'h23,6'h1c,6'h1a,6'h19,6'h16,
                                        6'h15,6'h13,6'h0e,6'h0d,6'h0b,6'h07};

  logic [N1-1:0] b1_i, b1_o;
  logic [2:0]    a1_i [1:K1];
  logic [2:0]    a1_o [1:K1];
  logic [2:0]    s1_i, s1_o;
  logic [1:0]    ind1_i, ind1_o;
  logic          refill1, carry1, last1;

  bincombgen_step #(.N(N1), .K(K1)) u_step1 (
    .b_i(b1_i), .a_i(a1_i), .s_i(s1_i), .ind_i(ind1_i),
    .b_o(b1_o), .a_o(a1_o), .s_o(s1_o), .ind_o(ind1_o),
    .refill_o(refill1), .carry_o(carry1), .last_o(last1)
  );

  // ---------------- Part 2: closed loop at (9,4) --------------------------
  localparam int N2 = 9, K2 = 4, MAX2 = N2 - K2 + 1;
  localparam int AW2 = $clog2(MAX2 + 1), SW2 = $clog2(MAX2 + 2), IW2 = $clog2(K2 + 1);

  logic [N2-1:0]  b2_i, b2_o;
  logic [AW2-1:0] a2_i [1:K2];
  logic [AW2-1:0] a2_o [1:K2];
  logic [SW2-1:0] s2_i, s2_o;
  logic [IW2-1:0] ind2_i, ind2_o;
  logic           refill2, carry2, last2;

  bincombgen_step #(.N(N2), .K(K2)) u_step2 (
    .b_i(b2_i), .a_i(a2_i), .s_i(s2_i), .ind_i(ind2_i),
    .b_o(b2_o), .a_o(a2_o), .s_o(s2_o), .ind_o(ind2_o),
    .refill_o(refill2), .carry_o(carry2), .last_o(last2)
  );

  // Next vector in reverse lexicographic order; position p (1 = leftmost)
  // is bit N2-p.
  function automatic logic [N2-1:0] ref_next(input logic [N2-1:0] x);
    int piv = 0, ones = 0;
    logic [N2-1:0] y;
    for (int p = 1; p < N2; p++)
      if (x[N2-p] && !x[N2-p-1]) piv = p;
    y = x;
    for (int p = piv; p <= N2; p++) begin
      if (p > piv && x[N2-p]) ones++;
      y[N2-p] = 1'b0;
    end
    y[N2-piv-1] = 1'b1;
    for (int p = piv + 2; p < piv + 2 + ones; p++) y[N2-p] = 1'b1;
    return y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int count;
    int refills, carries;

    // Part 1
    for (int r = 0; r < ROWS; r++) begin
      b1_i   = T_B[r];
      a1_i[1] = 3'(T_A1[r]); a1_i[2] = 3'(T_A2[r]); a1_i[3] = 3'(T_A3[r]);
      s1_i   = 3'(T_S[r]);
      ind1_i = 2'(T_IND[r]);
      #1;
      check(last1 == (r == ROWS - 1), $sformatf("row %0d last", r + 1));
      if (r < ROWS - 1) begin
        check(b1_o == T_B[r+1], $sformatf("row %0d B %h exp %h", r + 1, b1_o, T_B[r+1]));
        check(int'(a1_o[1]) == T_A1[r+1] && int'(a1_o[2]) == T_A2[r+1] &&
              int'(a1_o[3]) == T_A3[r+1], $sformatf("row %0d A", r + 1));
        check(int'(s1_o) == T_S[r+1], $sformatf("row %0d S %0d exp %0d", r + 1, s1_o, T_S[r+1]));
        check(int'(ind1_o) == T_IND[r+1], $sformatf("row %0d IND %0d exp %0d", r + 1, ind1_o, T_IND[r+1]));
        check(refill1 == (T_S[r] < 4 && T_IND[r] < 3), $sformatf("row %0d refill", r + 1));
        check(carry1 == (T_S[r] >= 4), $sformatf("row %0d carry", r + 1));
      end
    end

    // Part 2
    b2_i   = ~({N2{1'b1}} >> K2);
    for (int j = 1; j <= K2; j++) a2_i[j] = AW2'(1);
    s2_i   = SW2'(2);
    ind2_i = IW2'(K2);
    count = 1;
    refills = 0;
    carries = 0;
    #1;
    while (!last2 && count < 1000) begin
      check(b2_o == ref_next(b2_i), $sformatf("(9,4) vector %0d: %b exp %b", count + 1, b2_o, ref_next(b2_i)));
      check($countones(b2_o) == K2, "(9,4) weight");
      if (refill2) refills++;
      if (carry2) carries++;
      b2_i = b2_o; a2_i = a2_o; s2_i = s2_o; ind2_i = ind2_o;
      count++;
      #1;
    end
    check(count == 126, $sformatf("(9,4) produced %0d vectors, exp 126", count));
    check(b2_i == N2'(4'hf), "(9,4) final vector");
    check(refills > 0 && carries > 0, "(9,4) both refill and carry steps seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
