// i2c_av_config: configures the video decoder chip over I2C after reset.
//
// The video decoder must be told, through its I2C port, how to format its
// output: sync widths, porch widths, sync polarities and so on. This block
// walks a table of NUM_REGS entries, each a 16-bit {register, value} pair,
// and writes every entry to the chip at slave address SLAVE_ADDR with
// i2c_writer. An entry that is not acknowledged is sent again. When the last
// entry is acknowledged o_done rises and stays high. The configuration is done
// entirely in hardware, with 40 registers, as in the design description; the
// register values (rtl/adv7181_init.hex) are those of the original board
// design, and the retry rule and timing are this design's.
//
// Interface: o_scl drives the I2C clock line, o_sda_oe = 1 pulls the data
// line low, i_sda is the data line level. Timing: each write takes about
// 29 * 4 * QDIV clocks; with the defaults (27 MHz, 20 kHz bit rate) the
// whole table takes about 60 ms.
module i2c_av_config #(
  parameter int unsigned CLK_HZ     = 27_000_000,
  parameter int unsigned I2C_HZ     = 20_000,
  parameter int unsigned NUM_REGS   = 40,
  parameter logic [7:0]  SLAVE_ADDR = 8'h40,
  parameter string       INIT_FILE  = "rtl/adv7181_init.hex"
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_sda,
  output logic o_scl,
  output logic o_sda_oe,
  output logic o_done,
  output logic [7:0] o_retries    // count of not-acknowledged writes
);
  localparam int unsigned QDIV = (CLK_HZ / (4 * I2C_HZ)) > 0 ? CLK_HZ / (4 * I2C_HZ) : 1;
  localparam int unsigned IW   = $clog2(NUM_REGS + 1);

  logic [15:0] table_q [NUM_REGS];
  initial $readmemh(INIT_FILE, table_q);

  typedef enum logic [1:0] {C_SEND, C_WAIT, C_DONE} cstate_e;
  cstate_e       st;
  logic [IW-1:0] idx;
  logic          go, busy, done, nack;

  i2c_writer #(.QDIV(QDIV)) u_wr (
    .clk, .rst_n, .i_go(go), .i_data({SLAVE_ADDR, table_q[idx]}),
    .i_sda, .o_scl, .o_sda_oe, .o_busy(busy), .o_done(done), .o_nack(nack)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= C_SEND; idx <= '0; go <= 1'b0; o_done <= 1'b0; o_retries <= '0;
    end else begin
      go <= 1'b0;
      unique case (st)
        C_SEND: if (!busy && !go) begin
          go <= 1'b1;
          st <= C_WAIT;
        end
        C_WAIT: if (done) begin
          if (nack) begin
            if (o_retries != 8'hFF) o_retries <= o_retries + 1'b1;
            st <= C_SEND;
          end else if (idx == IW'(NUM_REGS - 1)) begin
            st     <= C_DONE;
            o_done <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
            st  <= C_SEND;
          end
        end
        C_DONE: o_done <= 1'b1;
        default: st <= C_SEND;
      endcase
    end
  end
endmodule
