// i2c_slave_model: behavioural I2C target for testbenches.
//
// Watches an open-drain bus (scl, sda levels), detects START and STOP,
// shifts in bytes on rising clock edges and pulls the data line low during
// the acknowledge slot when the first byte matches ADDR. The first NACK_FIRST
// transfers are deliberately not acknowledged. Every complete three-byte
// transfer that was acknowledged is reported through `got`/`got_data`.
module i2c_slave_model #(
  parameter logic [7:0] ADDR       = 8'h40,
  parameter int         NACK_FIRST = 1
) (
  input  logic        scl,
  input  logic        sda,
  output logic        sda_pull,   // 1 = pull the data line low
  output logic        got,        // toggles at each acknowledged 3-byte write
  output logic [23:0] got_data,
  output int          n_start,
  output int          n_stop
);
  int   nbits = 0, nbytes = 0, transfers = 0;
  logic [7:0] sh = 0;
  logic [23:0] acc = 0;
  bit   in_ack = 0, acking = 0, nacked = 0;
  bit   armed = 0;   // ignore the level changes of power-up
  initial begin sda_pull = 0; got = 0; got_data = 0; n_start = 0; n_stop = 0; #1 armed = 1; end

  // START: sda falls while scl high; STOP: sda rises while scl high
  always @(negedge sda) if (armed && scl) begin
    n_start++; nbits = 0; nbytes = 0; acc = 0; nacked = 0; in_ack = 0;
  end
  always @(posedge sda) if (armed && scl) begin
    n_stop++;
    if (nbytes == 3 && !nacked) begin got_data = acc; got = !got; end
    transfers++;
  end

  always @(posedge scl) begin
    if (!in_ack) begin
      sh = {sh[6:0], sda};
      nbits++;
    end
  end

  always @(negedge scl) begin
    if (in_ack) begin
      // end of the acknowledge slot
      sda_pull = 0;
      in_ack = 0;
    end else if (nbits == 8) begin
      nbits = 0;
      acc = {acc[15:0], sh};
      nbytes++;
      in_ack = 1;
      acking = !(nbytes == 1 && sh != ADDR) && (transfers >= NACK_FIRST);
      if (!acking) nacked = 1;
      sda_pull = acking;
    end
  end
endmodule
