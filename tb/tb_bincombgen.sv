// tb_bincombgen: end-to-end test of the generator at its default size (6,3).
//
// The generator is instantiated without parameter overrides. The testbench
// runs several complete sweeps and checks, cycle by cycle:
//   * the first vector appears on the clock edge that samples start;
//   * the 20 vectors equal the published (6,3) sequence (38, 34, 32, ... 07 hex)
//     and each one also equals the reverse-lexicographic successor of the one
//     before, worked out by an independent rule in the testbench;
//   * busy is high for exactly C(6,3) = 20 cycles, then falls with out_data
//     all zero;
//   * start held high during a sweep is ignored, start after a sweep repeats
//     the sequence from the top;
//   * pulling rst_n low between clock edges clears busy and out_data at once,
//     without a clock edge, and a later start runs a full sweep.
// It counts how often each mechanism occurred (start, refill step, carry step,
// completion, restart, start ignored while busy, asynchronous reset) and
// fails any that never did.
module tb_bincombgen;

  localparam int N = 6, K = 3;
  localparam int NCOMB = 20;
  localparam logic [N-1:0] SEQ [NCOMB] = '{6'h38,6'h34,6'h32,6'h31,6'h2c,6'h2a,6'h29,
                                          6'h26,6'h25,6'h23,6'h1c,6'h1a,6'h19,6'h16,
                                          6'h15,6'h13,6'h0e,6'h0d,6'h0b,6'h07};

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         start = 1'b0;
  logic [N-1:0] out_data;
  logic         busy;

  bincombgen u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .out_data(out_data), .busy(busy)
  );

  always #5 clk = ~clk;

  // A real falling edge on rst_n, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int n_start = 0, n_refill = 0, n_carry = 0, n_done = 0, n_restart = 0;
  int n_ignored = 0, n_async_reset = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

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

  // Mechanism counters, sampled at the rising edge.
  always @(posedge clk) begin
    if (rst_n && busy && !u_dut.last) begin
      if (u_dut.u_step.refill_o) n_refill++;
      if (u_dut.u_step.carry_o)  n_carry++;
    end
  end

  // One sweep: start is raised before edge 0 and held for hold_cycles edges.
  task automatic sweep(input int hold_cycles);
    logic [N-1:0] prev;
    int cycles;
    @(negedge clk);
    check(!busy && out_data == '0, "idle before start");
    start = 1'b1;
    @(posedge clk);
    #1;
    n_start++;
    check(busy, "busy on the edge that samples start");
    cycles = 0;
    prev = '0;
    while (busy && cycles < 1000) begin
      if (cycles < NCOMB)
        check(out_data == SEQ[cycles], $sformatf("vector %0d = %h, exp %h", cycles + 1, out_data, SEQ[cycles]));
      if (cycles > 0)
        check(out_data == ref_next(prev), $sformatf("vector %0d not the successor", cycles + 1));
      check($countones(out_data) == K, "weight K");
      prev = out_data;
      cycles++;
      @(negedge clk);
      if (cycles == hold_cycles) start = 1'b0;
      else if (cycles < hold_cycles && busy) n_ignored++;
      @(posedge clk);
      #1;
    end
    start = 1'b0;
    check(longint'(cycles) == binom(N, K), $sformatf("busy for %0d cycles, exp %0d", cycles, binom(N, K)));
    check(!busy && out_data == '0, "busy low and out_data zero after the last vector");
    check(prev == 6'h07, "last vector 07");
    n_done++;
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    check(!busy && out_data == '0, "reset state");
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(!busy && out_data == '0, "idle after reset");

    sweep(1);                    // single-cycle start pulse
    repeat (3) @(posedge clk);
    check(!busy && out_data == '0, "stays idle without start");
    sweep(8);                    // start held for 8 cycles: ignored while busy
    n_restart++;
    sweep(1);                    // once more
    n_restart++;

    // Asynchronous reset in the middle of a sweep.
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    check(busy, "busy before reset");
    #2;
    rst_n = 1'b0;
    #1;
    check(!busy && out_data == '0, "reset acts without a clock edge");
    n_async_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(!busy && out_data == '0, "idle after mid-sweep reset");
    sweep(1);                    // full sweep after the reset

    check(n_start > 0,       "mechanism: start");
    check(n_refill > 0,      "mechanism: refill step");
    check(n_carry > 0,       "mechanism: carry step");
    check(n_done > 0,        "mechanism: completion");
    check(n_restart > 0,     "mechanism: restart");
    check(n_ignored > 0,     "mechanism: start ignored while busy");
    check(n_async_reset > 0, "mechanism: asynchronous reset");
    $display("mechanisms: start=%0d refill=%0d carry=%0d done=%0d restart=%0d ignored=%0d async_reset=%0d",
             n_start, n_refill, n_carry, n_done, n_restart, n_ignored, n_async_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
