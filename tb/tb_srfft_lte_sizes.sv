// tb_srfft_lte_sizes: the power-of-two LTE FFT sizes (256, 512, 1024, 2048),
// each built as its own instance of the MDC FFT and checked end to end with
// random frames against a double-precision DFT (see srfft_size_check).
module tb_srfft_lte_sizes;
  localparam int NS = 4;
  localparam int SIZES [NS] = '{256, 512, 1024, 2048};
  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NS];
  int   c [NS], f [NS];
  int   checks, failures;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NS; i++) begin : g_size
    srfft_size_check #(.N(SIZES[i])) u_chk (.clk, .rst_n, .done(done[i]), .checks(c[i]), .failures(f[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NS; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
