// tb_commutator: feeds two lanes of random samples through the commutator with
// D = 4 and random enable gaps, drives the switch from the stage-local time
// as the pipeline does, and checks that from time D on every output pair is
// (sample k, sample k+D) of one 2D block: first the upper-lane block, then the
// lower-lane block. Reference: the input history kept here.
module tb_commutator;
  localparam int W = 16, D = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, swap;
  logic signed [W-1:0] a_re = '0, a_im = '0, b_re = '0, b_im = '0;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  logic signed [W-1:0] ha_re [4096], ha_im [4096], hb_re [4096], hb_im [4096];
  int checks = 0, failures = 0, t = 0, n_swap = 0;

  commutator #(.W(W), .D(D)) dut (.*);
  assign swap = ((t % (2 * D)) >= D);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (t < 2000) begin
      @(negedge clk);
      if (en) begin
        if (((t + 1) % D) == 0) n_swap++;
        t++;
      end
      en = ($urandom % 3) != 0;
      a_re = W'($urandom); a_im = W'($urandom); b_re = W'($urandom); b_im = W'($urandom);
      ha_re[t] = a_re; ha_im[t] = a_im; hb_re[t] = b_re; hb_im[t] = b_im;
      #1;
      if (en && t >= D) begin
        int tp, blk, k;
        logic signed [W-1:0] ex_re, ex_im, ey_re, ey_im;
        tp  = t - D;
        blk = tp / (2 * D);
        k   = tp % D;
        if ((tp % (2 * D)) < D) begin
          ex_re = ha_re[blk * 2 * D + k];     ex_im = ha_im[blk * 2 * D + k];
          ey_re = ha_re[blk * 2 * D + k + D]; ey_im = ha_im[blk * 2 * D + k + D];
        end else begin
          ex_re = hb_re[blk * 2 * D + k];     ex_im = hb_im[blk * 2 * D + k];
          ey_re = hb_re[blk * 2 * D + k + D]; ey_im = hb_im[blk * 2 * D + k + D];
        end
        checks++;
        if (x_re != ex_re || x_im != ex_im || y_re != ey_re || y_im != ey_im) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d: got x=%0d y=%0d want x=%0d y=%0d", t, x_re, y_re, ex_re, ey_re);
        end
      end
    end
    checks++;
    if (n_swap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
