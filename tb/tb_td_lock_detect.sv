// tb_td_lock_detect: feeds fields of various line counts and checks when the
// lock output rises and falls: two good fields (262 or 263 lines) in a row
// lock; a field of the wrong length unlocks.
module tb_td_lock_detect;
  logic clk = 0, rst_n = 0, hs = 0, vs = 0, locked;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  td_lock_detect #(.MIN_LINES(262), .MAX_LINES(263), .LOCK_FIELDS(2)) dut
    (.clk, .rst_n, .i_hs_edge(hs), .i_vs_edge(vs), .o_locked(locked));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One field: a VS pulse, then n HS pulses.
  task automatic field(int n);
    @(negedge clk) vs = 1;
    @(negedge clk) vs = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) hs = 1;
      @(negedge clk) hs = 0;
      @(negedge clk);
    end
  endtask

  task automatic expect_lock(bit e, string what);
    checks++;
    if (locked !== e) begin failures++; $display("%s: locked=%0b expected %0b", what, locked, e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    field(263); expect_lock(0, "before first VS closes a field");
    field(262); expect_lock(0, "one good field");
    field(263); expect_lock(1, "two good fields");
    field(100); expect_lock(1, "third good field");
    field(263); expect_lock(0, "after short field");
    field(263); expect_lock(0, "one good field after loss");
    field(300); expect_lock(1, "relocked");
    field(263); expect_lock(0, "after long field");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
