// tb_pe_butterfly: drives random complex pairs, including the extreme values,
// and checks the registered sum and difference one enabled cycle later and that
// the output holds while en is low.
module tb_pe_butterfly;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x_re = '0, x_im = '0, y_re = '0, y_im = '0;
  logic signed [W:0] s_re, s_im, d_re, d_im;
  int checks = 0, failures = 0;
  int es_re = 0, es_im = 0, ed_re = 0, ed_im = 0;

  pe_butterfly #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] pick();
    case ($urandom % 5)
      0: return {1'b1, {(W-1){1'b0}}};
      1: return {1'b0, {(W-1){1'b1}}};
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      if (c > 0) begin
        checks++;
        if (s_re != es_re || s_im != es_im || d_re != ed_re || d_im != ed_im) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: s=(%0d,%0d) d=(%0d,%0d) want s=(%0d,%0d) d=(%0d,%0d)",
                                      c, s_re, s_im, d_re, d_im, es_re, es_im, ed_re, ed_im);
        end
      end
      en = ($urandom % 4) != 0;
      x_re = pick(); x_im = pick(); y_re = pick(); y_im = pick();
      if (en) begin
        es_re = int'(x_re) + int'(y_re); es_im = int'(x_im) + int'(y_im);
        ed_re = int'(x_re) - int'(y_re); ed_im = int'(x_im) - int'(y_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
