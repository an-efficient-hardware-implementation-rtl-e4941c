// tb_bincombgen_sizes: runs the generator at every (n, n/2) size of the
// published resource table, all in parallel on one clock.
//
// The nine sizes from (4,2) to (20,10) are followed through their complete
// sweep (up to C(20,10) = 184,756 vectors), checking every vector, the cycle
// count C(n,k) and the return to idle. The three large sizes (40,20), (60,30)
// and (80,40) have sweeps of about 1.4e11, 1.2e17 and 1.1e23 vectors, far
// beyond simulation; for them the first 1,000,000 vectors are checked.
module tb_bincombgen_sizes;

  localparam int NS = 12;
  localparam int SN [NS] = '{4, 6, 8, 10, 12, 14, 16, 18, 20, 40, 60, 80};
  localparam int PREFIX = 1000000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  // A real falling edge on rst_n, so the asynchronous reset acts at once.
  initial #1 rst_n = 1'b0;

  logic [NS-1:0] done;
  int ch [NS];
  int fl [NS];

  for (genvar g = 0; g < NS; g++) begin : g_size
    bincombgen_sweep_check #(
      .N(SN[g]), .K(SN[g] / 2), .LIMIT(SN[g] > 20 ? PREFIX : 0)
    ) u_chk (
      .clk(clk), .rst_n(rst_n), .done(done[g]), .checks(ch[g]), .failures(fl[g])
    );
  end

  int checks, failures;

  initial begin
    #15000000;  // 1.5 million clock cycles
    checks = 0; failures = 1;
    for (int i = 0; i < NS; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
