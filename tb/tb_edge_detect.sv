// tb_edge_detect: checks the rising- and falling-edge pulse generators against
// a software copy of the previous input level, on a random input.
module tb_edge_detect;
  logic clk = 0, rst_n = 0, sig = 0, p_rise, p_fall, prev;
  int checks = 0, failures = 0, nr = 0, nf = 0;
  always #5 clk = ~clk;

  edge_detect #(.RISING(1'b1)) dut_r (.clk, .rst_n, .i_sig(sig), .o_pulse(p_rise));
  edge_detect #(.RISING(1'b0)) dut_f (.clk, .rst_n, .i_sig(sig), .o_pulse(p_fall));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1; prev = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      prev = sig;
      sig = ($urandom_range(0, 3) == 0) ? !sig : sig;
      #1;
      checks++;
      if (p_rise !== (sig && !prev) || p_fall !== (!sig && prev)) begin
        failures++;
        $display("t=%0t sig=%0b prev=%0b rise=%0b fall=%0b", $time, sig, prev, p_rise, p_fall);
      end
      if (p_rise) nr++;
      if (p_fall) nf++;
    end
    checks++;
    if (nr < 10 || nf < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
