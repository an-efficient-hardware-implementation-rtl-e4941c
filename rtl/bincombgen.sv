// bincombgen: hardware generator of all (N,K) combinations as N-bit vectors
// with exactly K ones, one vector per clock, in reverse lexicographic order
// (for N=6, K=3: 111000, 110100, 110010, 110001, 101100, ... , 000111).
//
// How it works: the state is the vector register B, a table A of K small
// counters and the registers S and IND. START loads the initial state in one
// clock (A all 1, B = K ones followed by N-K zeros, IND = K, S = 2) and B is
// shown at once on out_data. After that every clock applies one generation
// step (bincombgen_step, pure combinational logic), until IND reaches 0 with
// the last combination (N-K zeros followed by K ones) on the output. The whole sweep takes exactly C(N,K) clock cycles with busy high.
//
// Interface (the block diagram of the generator): clk; rst_n, active low and
// asynchronous, acting on its falling edge; start, sampled on the rising clock
// edge while the generator is idle; out_data, N bits, changing on the rising
// edge of clk; busy, high for exactly the C(N,K) cycles in which out_data holds
// a valid combination.
//
// Timing: start is seen at rising edge t0; from t0 to t0+C(N,K)-1 busy is
// high and out_data walks through the combinations; at edge t0+C(N,K) busy
// falls and out_data returns to all zeros. Raising start again repeats the
// whole sequence. What follows the algorithm: the state registers, the
// one-cycle initialisation, the step rule, the all-zero output and low busy
// after the last vector, restart on a new start, the negative-edge reset.
// This design's own choices: start is ignored while busy is high; the cycle
// after the last combination is always an idle one (a start held high
// restarts one cycle later); reset clears out_data and busy and loads the
// initial state into A, S and IND.
module bincombgen #(
  parameter int unsigned N = 6,
  parameter int unsigned K = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [N-1:0] out_data,
  output logic         busy
);

  localparam int unsigned MAX = N - K + 1;
  localparam int unsigned AW  = $clog2(MAX + 1);
  localparam int unsigned SW  = $clog2(MAX + 2);
  localparam int unsigned IW  = $clog2(K + 1);

  // Initial vector: K ones at the left, N-K zeros at the right.
  localparam logic [N-1:0] B_INIT = ~({N{1'b1}} >> K);

  typedef enum logic {IDLE, RUN} state_e;

  state_e        state;
  logic [N-1:0]  b, b_nxt;
  logic [AW-1:0] a     [1:K];
  logic [AW-1:0] a_nxt [1:K];
  logic [SW-1:0] s, s_nxt;
  logic [IW-1:0] ind, ind_nxt;
  logic          last;

  bincombgen_step #(.N(N), .K(K)) u_step (
    .b_i     (b),
    .a_i     (a),
    .s_i     (s),
    .ind_i   (ind),
    .b_o     (b_nxt),
    .a_o     (a_nxt),
    .s_o     (s_nxt),
    .ind_o   (ind_nxt),
    .refill_o(),
    .carry_o (),
    .last_o  (last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      b     <= '0;
      for (int unsigned j = 1; j <= K; j++) a[j] <= AW'(1);
      s     <= SW'(2);
      ind   <= IW'(K);
    end else begin
      unique case (state)
        IDLE: if (start) begin
          // Initialisation phase: everything in one clock.
          state <= RUN;
          b     <= B_INIT;
          for (int unsigned j = 1; j <= K; j++) a[j] <= AW'(1);
          s     <= SW'(2);
          ind   <= IW'(K);
        end
        RUN: if (last) begin
          // IND = 0: the vector just shown was the final one.
          state <= IDLE;
          b     <= '0;
        end else begin
          // Generation phase: one combination per clock.
          b   <= b_nxt;
          a   <= a_nxt;
          s   <= s_nxt;
          ind <= ind_nxt;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign out_data = b;
  assign busy     = (state == RUN);

  // Every vector shown while busy has exactly K ones; none is shown otherwise.
  // Reset forces busy low and out_data to zero, so both also hold in reset.
  a_weight: assert property (@(posedge clk) busy |-> $countones(out_data) == K);
  a_idle_zero: assert property (@(posedge clk) !busy |-> out_data == '0);

endmodule
