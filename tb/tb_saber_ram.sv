// tb_saber_ram: writes random table entries on the 50 MHz port and reads them
// back on the 27 MHz port, checking every entry and the one-clock read latency.
module tb_saber_ram;
  import lsg_pkg::*;
  localparam int AW = 6;
  logic wclk = 0, rclk = 0, we = 0;
  logic [AW-1:0] wa = 0, ra = 0;
  saber_span_t wd, rd;
  saber_span_t model [2**AW];
  int checks = 0, failures = 0;
  always #10 wclk = ~wclk;   // 50 MHz
  always #18.5 rclk = ~rclk; // 27 MHz

  saber_ram #(.ADDR_W(AW)) dut (.wclk, .i_we(we), .i_wr_addr(wa), .i_wr_data(wd),
                                .rclk, .i_rd_addr(ra), .o_rd_data(rd));

  initial begin
    repeat (500_000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 2**AW; i++) begin
        @(negedge wclk);
        we = 1; wa = AW'(i);
        wd = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
        model[i] = wd;
      end
      @(negedge wclk) we = 0;
      // a write with we low must not change anything
      wa = 0; wd = '1;
      repeat (3) @(negedge wclk);
      for (int i = 0; i < 2**AW; i++) begin
        @(negedge rclk) ra = AW'(i);
        @(negedge rclk);
        checks++;
        if (rd !== model[i]) begin
          failures++;
          $display("entry %0d got %h exp %h", i, rd, model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
