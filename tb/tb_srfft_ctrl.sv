// tb_srfft_ctrl: checks the controller for N = 16 against hand-computed stage
// offsets (0, 10, 16, 20; pipeline fill 23 cycles), with random enable gaps:
// the per-stage local times, the sample index, when out_valid first rises, the
// output frame lane and the bit-reversed bin numbers.
module tb_srfft_ctrl;
  localparam int N = 16, SB = 4, LAT = 23;
  localparam int OFF [SB] = '{0, 10, 16, 20};
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [SB-1:0] in_index, out_bin0, out_bin1;
  logic [SB-1:0] t_loc [SB];
  logic out_valid, out_frame_lane, out_frame_start;
  int checks = 0, failures = 0, n = 0, n_start = 0;

  srfft_ctrl #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic int rev4(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (n < 300) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      #1;
      checks++;
      if (in_index != SB'(n)) failures++;
      for (int s = 0; s < SB; s++) begin
        checks++;
        if (t_loc[s] != SB'(n - OFF[s])) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d stage %0d: t_loc %0d", n, s, t_loc[s]);
        end
      end
      checks++;
      if (out_valid != (en && n >= LAT)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d out_valid %0b", n, out_valid);
      end
      if (out_valid) begin
        int to;
        to = (n - LAT) % N;
        checks++;
        if (out_frame_lane != (to >= N / 2) || out_frame_start != (to == 0)
            || out_bin0 != SB'(rev4((2 * to) % N)) || out_bin1 != SB'(rev4((2 * to + 1) % N))) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d tags lane %0b bins %0d %0d", n, out_frame_lane, out_bin0, out_bin1);
        end
        if (out_frame_start) n_start++;
      end
      @(posedge clk);
      if (en) n++;
    end
    checks++;
    if (n_start == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
