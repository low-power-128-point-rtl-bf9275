// tb_delay_line: checks that the delay line returns each sample exactly DEPTH
// enabled cycles later, that cycles with en low freeze it, and that it starts
// from zero after reset. Reference: a queue model of the history.
module tb_delay_line;
  localparam int W = 16, DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  int checks = 0, failures = 0, pushes = 0, holds = 0;
  logic signed [W-1:0] hist_re [$], hist_im [$];

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin hist_re.push_back('0); hist_im.push_back('0); end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      en    = ($urandom % 3) != 0;
      in_re = W'($urandom);
      in_im = W'($urandom);
      checks++;
      if (out_re !== hist_re[0] || out_im !== hist_im[0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %0d,%0d want %0d,%0d", c, out_re, out_im, hist_re[0], hist_im[0]);
      end
      if (en) begin
        void'(hist_re.pop_front()); void'(hist_im.pop_front());
        hist_re.push_back(in_re); hist_im.push_back(in_im);
        pushes++;
      end else holds++;
    end
    checks++;
    if (pushes == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
