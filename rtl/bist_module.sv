// bist_module: the I2C block with built-in self test. Three random pattern
// generators supply the control byte, the word address and the data byte;
// the I2C block sends them as write frames; the comparator checks every
// bit that appears on SDA against the pattern it came from. Counting the
// bit_correct and bit_error pulses gives the bit error rate of the link.
//
// How it works: the generators (lfsr8, one seed each) step once per frame,
// in the cycle the I2C block reports the end of a STOP (done), and only
// while `enable` is high. The I2C block captures the new patterns when the
// next frame starts, and the comparator reads the same, unchanged patterns
// during that frame. The comparator watches the bus level: the I2C block's
// own SDA output ANDed with sda_in, the level read back from the open-drain
// line (tie sda_in high when no bus is attached). A device that pulls SDA
// low while a 1 is being sent therefore shows up as a bit error.
//
// Interface: CLK, enable, GO, reset (active high, resets the generators),
// reset_n (active low, resets the I2C block and the comparator); outputs
// SD_COUNTER, bit_correct, bit_error, I2C_SCLK and I2C_SDAT as in the BIST
// schematic, plus ack_err and done of the I2C block. Structure (three
// generators, one comparator, one I2C block) follows the design; stepping
// the generators once per frame and the seeds are this implementation's.
module bist_module
  import i2c_pkg::*;
#(
  parameter logic [7:0] SEED_CONTROL = 8'hA5,
  parameter logic [7:0] SEED_ADDRESS = 8'h3C,
  parameter logic [7:0] SEED_DATA    = 8'h5A
) (
  input  logic              CLK,
  input  logic              enable,
  input  logic              GO,
  input  logic              reset,
  input  logic              reset_n,
  input  logic              sda_in,
  output logic [SLOT_W-1:0] SD_COUNTER,
  output logic              bit_correct,
  output logic              bit_error,
  output logic              I2C_SCLK,
  output logic              I2C_SDAT,
  output logic              ack_err,
  output logic              done
);

  logic [7:0] in_control, in_address, in_data;
  logic       step;

  assign step = enable & done;

  lfsr8 #(.SEED(SEED_ADDRESS)) u_lfsr1 (.CLK, .enable(step), .reset, .q(in_address));
  lfsr8 #(.SEED(SEED_CONTROL)) u_lfsr2 (.CLK, .enable(step), .reset, .q(in_control));
  lfsr8 #(.SEED(SEED_DATA))    u_lfsr3 (.CLK, .enable(step), .reset, .q(in_data));

  i2c_master u_i2c (
    .CLK, .reset_n, .GO,
    .in_control, .in_address, .in_data,
    .sda_in,
    .SD_COUNTER, .I2C_SCLK, .I2C_SDAT,
    .ack_err, .done
  );

  bist_comparator u_cmp (
    .CLK, .reset_n,
    .in_control, .in_address, .in_data,
    .SD_COUNTER, .I2C_SCLK,
    .I2C_SDAT(I2C_SDAT & sda_in),
    .bit_correct, .bit_error
  );

endmodule
