// i2c_writer: I2C master that performs one three-byte register write.
//
// A write to a video decoder register is: START (data pulled low while the
// clock is high, then the clock pulled low), the slave address in write mode,
// an acknowledge bit from the slave, the register address, an acknowledge,
// the register value, an acknowledge, and STOP (data released while the clock
// is high). Each bit takes four quarter periods: data is changed while the
// clock is low, the clock is raised, the acknowledge bit is sampled in the
// middle of the high phase, and the clock is lowered again. The sequence of
// start, address, acknowledge and register address follows the design
// description; the quarter-period bit timing and the STOP are the usual I2C
// practice chosen here.
//
// Interface: pulse i_go with i_data = {slave address, register, value} while
// o_busy is low. o_done pulses when the STOP is complete; o_nack is then 1 if
// any acknowledge bit was high (not acknowledged). o_sda_oe = 1 pulls the data
// line low (open drain); o_scl is the clock line level.
// Timing: one bit is 4*QDIV clocks; a whole write is about 29 bit times.
module i2c_writer #(
  parameter int unsigned QDIV = 338   // clocks per quarter bit (27 MHz / 80 kHz)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_go,
  input  logic [23:0] i_data,
  input  logic        i_sda,     // data line as seen on the wire
  output logic        o_scl,
  output logic        o_sda_oe,
  output logic        o_busy,
  output logic        o_done,
  output logic        o_nack
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_STOP} state_e;
  state_e state;

  localparam int unsigned DW = $clog2(QDIV + 1);
  logic [DW-1:0] div;
  logic          tick;
  logic [1:0]    ph;
  logic [26:0]   sh;        // bytes with a released (1) acknowledge slot after each
  logic [4:0]    nbit;
  logic [3:0]    pos;       // bit position inside the 9-bit byte slot

  assign tick   = (div == DW'(QDIV - 1));
  assign o_busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; div <= '0; ph <= '0; sh <= '0; nbit <= '0; pos <= '0;
      o_scl <= 1'b1; o_sda_oe <= 1'b0; o_done <= 1'b0; o_nack <= 1'b0;
    end else begin
      o_done <= 1'b0;
      div    <= (state == S_IDLE || tick) ? '0 : div + 1'b1;
      unique case (state)
        S_IDLE: begin
          o_scl    <= 1'b1;
          o_sda_oe <= 1'b0;
          ph       <= '0;
          if (i_go) begin
            sh     <= {i_data[23:16], 1'b1, i_data[15:8], 1'b1, i_data[7:0], 1'b1};
            nbit   <= '0;
            pos    <= '0;
            o_nack <= 1'b0;
            state  <= S_START;
          end
        end
        S_START: if (tick) begin
          ph <= ph + 1'b1;
          unique case (ph)
            2'd0: o_sda_oe <= 1'b0;               // both lines high
            2'd1: o_sda_oe <= 1'b1;               // data falls while clock high
            2'd2: o_scl    <= 1'b0;               // clock falls
            2'd3: state    <= S_BIT;
          endcase
        end
        S_BIT: if (tick) begin
          ph <= ph + 1'b1;
          unique case (ph)
            2'd0: o_sda_oe <= !sh[26];            // set data while clock low
            2'd1: o_scl    <= 1'b1;
            2'd2: if (pos == 4'd8 && i_sda) o_nack <= 1'b1;  // sample acknowledge
            2'd3: begin
              o_scl <= 1'b0;
              sh    <= {sh[25:0], 1'b1};
              pos   <= (pos == 4'd8) ? 4'd0 : pos + 1'b1;
              nbit  <= nbit + 1'b1;
              if (nbit == 5'd26) state <= S_STOP;
            end
          endcase
        end
        S_STOP: if (tick) begin
          ph <= ph + 1'b1;
          unique case (ph)
            2'd0: o_sda_oe <= 1'b1;               // data low while clock low
            2'd1: o_scl    <= 1'b1;
            2'd2: o_sda_oe <= 1'b0;               // data rises while clock high
            2'd3: begin
              state  <= S_IDLE;
              o_done <= 1'b1;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
