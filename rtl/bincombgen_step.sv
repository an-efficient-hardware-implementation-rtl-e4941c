// bincombgen_step: one generation step of the Bincombgen (n,k)-combinations
// algorithm, as purely combinational logic.
//
// The generator keeps four pieces of state: the n-bit output vector B, the
// k-entry table A, and the two small registers S and IND. Positions are
// numbered 1..N from the left, so B position 1 is the most significant bit of
// b_i/b_o (position i lives in bit N-i), and table entry A[j] is a_i[j].
// From the current state this block works out, with v = IND + S and
// MAX = N-K+1:
//   * A[IND..K]    := S
//   * B[v-2]       := 0,  B[v-1] := 1       (move one 1 one place right)
//   * if S < MAX:
//       if IND < K: B[v..K+S-1] := 1, B[K+S..N] := 0, IND := K
//       S := S + 1
//     else
//       S := A[IND-1] + 1, IND := IND - 1
// Every write to B hits a disjoint set of positions, so the whole step is a
// single layer of multiplexers in front of the registers and the generator
// can emit one combination per clock. The step order, the index ranges and
// the S < MAX test follow the modified algorithm the design is based on.
// Two choices are this design's own: when IND = 1 and S = MAX there is no
// A[0], so S becomes MAX+1 (this is the last step; S is no longer used); and
// the register widths are sized to hold the largest value each can take
// (A up to MAX, S up to MAX+1, IND up to K).
//
// Interface: all inputs are the present register contents, all outputs the
// next ones. refill_o flags the S < MAX, IND < K case (the ones to the right
// are packed back next to the moved 1), carry_o flags the S = MAX case (IND
// steps left). last_o is high when IND = 0, i.e. B already holds the final
// combination and no further step is defined. Valid for 1 <= K < N.
module bincombgen_step #(
  parameter int unsigned N  = 6,
  parameter int unsigned K  = 3,
  // Derived widths; not meant to be overridden.
  parameter int unsigned MAX = N - K + 1,
  parameter int unsigned AW  = $clog2(MAX + 1),
  parameter int unsigned SW  = $clog2(MAX + 2),
  parameter int unsigned IW  = $clog2(K + 1)
) (
  input  logic [N-1:0]  b_i,
  input  logic [AW-1:0] a_i [1:K],
  input  logic [SW-1:0] s_i,
  input  logic [IW-1:0] ind_i,
  output logic [N-1:0]  b_o,
  output logic [AW-1:0] a_o [1:K],
  output logic [SW-1:0] s_o,
  output logic [IW-1:0] ind_o,
  output logic          refill_o,
  output logic          carry_o,
  output logic          last_o
);

  if (K < 1 || K >= N) begin : g_bad_params
    $error("bincombgen_step: needs 1 <= K < N");
  end

  int unsigned ind, s, v;

  always_comb begin
    ind      = int'(ind_i);
    s        = int'(s_i);
    v        = ind + s;
    last_o   = (ind == 0);
    refill_o = (s < MAX) && (ind < K);
    carry_o  = (s >= MAX);

    // Table A: entries IND..K take the value S.
    for (int unsigned j = 1; j <= K; j++) begin
      a_o[j] = (j >= ind) ? AW'(s) : a_i[j];
    end

    // Vector B: four disjoint position ranges, everything left of v-2 kept.
    for (int unsigned i = 1; i <= N; i++) begin
      if (i == v - 2)                               b_o[N-i] = 1'b0;
      else if (i == v - 1)                          b_o[N-i] = 1'b1;
      else if (refill_o && i >= v && i < K + s)     b_o[N-i] = 1'b1;
      else if (refill_o && i >= K + s)              b_o[N-i] = 1'b0;
      else                                          b_o[N-i] = b_i[N-i];
    end

    // S and IND.
    if (s < MAX) begin
      s_o   = SW'(s + 1);
      ind_o = (ind < K) ? IW'(K) : ind_i;
    end else begin
      s_o   = (ind > 1) ? SW'(int'(a_i[ind-1]) + 1) : SW'(s + 1);
      ind_o = ind_i - 1'b1;
    end
  end

endmodule
