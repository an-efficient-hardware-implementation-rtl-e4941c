// bincombgen_sweep_check: testbench helper that runs one generator of size
// (N,K) through one sweep and checks it.
//
// After rst_n rises it pulses start for one cycle and then, on every cycle
// with busy high, checks that out_data has K ones and equals the
// reverse-lexicographic successor of the previous vector (computed here by an
// independent rule). If LIMIT is 0 it follows the whole sweep and checks that
// busy stays high for exactly C(N,K) cycles, that the first and last vectors
// are 1..10..0 and 0..01..1 and that out_data returns to zero. If LIMIT is
// above 0 it stops checking after LIMIT vectors (for sizes whose sweep is far
// too long to simulate). done rises when it has finished; checks and failures
// hold its counts.
module bincombgen_sweep_check #(
  parameter int N     = 6,
  parameter int K     = 3,
  parameter int LIMIT = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  logic         start;
  logic [N-1:0] out_data;
  logic         busy;

  bincombgen #(.N(N), .K(K)) u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .out_data(out_data), .busy(busy)
  );

  function automatic longint binom(input int n, input int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * longint'(n - k + i) / longint'(i);
    return r;
  endfunction

  function automatic logic [N-1:0] ref_next(input logic [N-1:0] x);
    int piv = 0, ones = 0;
    logic [N-1:0] y;
    for (int p = 1; p < N; p++)
      if (x[N-p] && !x[N-p-1]) piv = p;
    y = x;
    for (int p = piv; p <= N; p++) begin
      if (p > piv && x[N-p]) ones++;
      y[N-p] = 1'b0;
    end
    y[N-piv-1] = 1'b1;
    for (int p = piv + 2; p < piv + 2 + ones; p++) y[N-p] = 1'b1;
    return y;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d,%0d): %s", N, K, what);
    end
  endtask

  initial begin
    logic [N-1:0] prev;
    longint cycles;
    done = 1'b0;
    checks = 0;
    failures = 0;
    start = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy && out_data == ~({N{1'b1}} >> K), "first vector");
    prev = out_data;
    cycles = 1;
    forever begin
      @(negedge clk);
      if (!busy || (LIMIT > 0 && cycles >= longint'(LIMIT))) break;
      check($countones(out_data) == K, $sformatf("weight at vector %0d", cycles + 1));
      check(out_data == ref_next(prev), $sformatf("vector %0d: %b after %b", cycles + 1, out_data, prev));
      prev = out_data;
      cycles++;
    end
    if (LIMIT == 0) begin
      check(cycles == binom(N, K), $sformatf("busy for %0d cycles, exp %0d", cycles, binom(N, K)));
      check(prev == N'({K{1'b1}}), "last vector");
      check(!busy && out_data == '0, "idle and zero after the sweep");
    end else begin
      check(busy && cycles == longint'(LIMIT), "still busy after LIMIT vectors");
    end
    $display("(%0d,%0d): %0d vectors checked", N, K, cycles);
    done = 1'b1;
  end

endmodule
