// tb_pixel_skip: checks the 720-to-640 down-sampler.
// Feeds three lines of 720 samples (with gaps between samples) and checks that
// exactly 640 are kept per line and that the dropped ones are samples
// 8, 17, ..., 719 of each line.
module tb_pixel_skip;
  logic clk = 0, rst_n = 0, line_start = 0, sample = 0, keep;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pixel_skip #(.PERIOD(9)) dut (.clk, .rst_n, .i_line_start(line_start), .i_sample(sample), .o_keep(keep));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kept;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int line = 0; line < 3; line++) begin
      @(negedge clk) line_start = 1;
      @(negedge clk) line_start = 0;
      kept = 0;
      for (int i = 0; i < 720; i++) begin
        sample = 1;
        #1;
        checks++;
        if (keep !== ((i % 9) != 8)) begin
          failures++;
          $display("line %0d sample %0d keep=%0b", line, i, keep);
        end
        if (keep) kept++;
        @(negedge clk) sample = 0;
        if (i % 3 == 0) @(negedge clk);
      end
      checks++;
      if (kept != 640) begin failures++; $display("kept %0d", kept); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
