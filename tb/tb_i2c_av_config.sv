// tb_i2c_av_config: runs the configuration sequencer against an I2C target
// model that refuses the first transfer. Checks that every table entry
// arrives once, in order, with the right slave address, that the refused
// transfer was retried, and that o_done rises at the end. The expected
// entries are read from the same table file the hardware uses.
module tb_i2c_av_config;
  logic clk = 0, rst_n = 0;
  logic scl, sda_oe, done, sda_pull, got, sda;
  logic [7:0] retries;
  logic [23:0] got_data;
  int n_start, n_stop;
  logic [15:0] table_exp [40];
  int checks = 0, failures = 0, nrx = 0;
  always #5 clk = ~clk;

  assign sda = !(sda_oe || sda_pull);   // open-drain wire with pull-up

  // 4 clocks per quarter bit
  i2c_av_config #(.CLK_HZ(16 * 20_000), .I2C_HZ(20_000), .NUM_REGS(40), .SLAVE_ADDR(8'h40))
    dut (.clk, .rst_n, .i_sda(sda), .o_scl(scl), .o_sda_oe(sda_oe), .o_done(done), .o_retries(retries));

  i2c_slave_model #(.ADDR(8'h40), .NACK_FIRST(1)) slv (.scl, .sda, .sda_pull, .got, .got_data, .n_start, .n_stop);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic got_q = 0;
  always @(posedge clk) got_q <= got;
  always @(posedge clk) if (rst_n && got != got_q) begin
    checks++;
    if (nrx >= 40 || got_data !== {8'h40, table_exp[nrx]}) begin
      failures++;
      $display("write %0d: got %h", nrx, got_data);
    end
    nrx++;
  end

  initial begin
    $readmemh("rtl/adv7181_init.hex", table_exp);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (200) @(posedge clk);
    checks++;
    if (nrx != 40) begin failures++; $display("received %0d writes", nrx); end
    checks++;
    if (retries != 1 || n_start != 41 || n_stop != 41) begin
      failures++; $display("retries %0d starts %0d stops %0d", retries, n_start, n_stop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
