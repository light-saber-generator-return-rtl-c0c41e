// tb_reset_delay: checks the staged start-up timer with short delays:
// each output rises exactly DELAY_k + 1 clocks after i_start, and dropping
// i_start resets all outputs at once.
module tb_reset_delay;
  localparam int D0 = 10, D1 = 25, D2 = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reset_delay #(.DELAY_0(D0), .DELAY_1(D1), .DELAY_2(D2)) dut (.clk, .rst_n, .i_start(start), .o_rst_n(r));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int t;
    @(negedge clk) start = 1;
    for (t = 1; t <= D2 + 5; t++) begin
      @(negedge clk);
      checks++;
      if (r !== {t > D2, t > D1, t > D0}) begin
        failures++;
        $display("clock %0d after start: r=%b", t, r);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++; if (r !== 3'b000) failures++;
    run_once();
    @(negedge clk) start = 0;
    @(negedge clk);
    checks++; if (r !== 3'b000) begin failures++; $display("not cleared"); end
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
