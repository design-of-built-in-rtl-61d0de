// bist_comparator: the comparator of the BIST block. It checks every data
// bit that the I2C block puts on SDA against the byte the random pattern
// generators produced for it, and flags each bit as correct or in error.
//
// How it works: a rising edge of SCL (seen by comparing SCL with its value
// one cycle earlier) marks the moment a bit is valid. The slot number
// SD_COUNTER of the I2C block tells whether that bit belongs to the control
// byte, the word address or the data byte, and which bit it is (MSB first).
// START, ACK and STOP slots are not compared. The expected bytes are taken
// live from in_control, in_address and in_data, so they must stay constant
// during a frame (bist_module steps the generators between frames).
//
// Timing: bit_correct or bit_error is a one-cycle pulse in the cycle after
// the SCL rising edge. Ports in_address, in_control, in_data, CLK, I2C_SDAT,
// bit_correct and bit_error follow the BIST schematic; reset_n, I2C_SCLK
// and SD_COUNTER are inputs this implementation adds to know when and which
// bit to compare.
module bist_comparator
  import i2c_pkg::*;
(
  input  logic              CLK,
  input  logic              reset_n,
  input  logic [7:0]        in_control,
  input  logic [7:0]        in_address,
  input  logic [7:0]        in_data,
  input  logic [SLOT_W-1:0] SD_COUNTER,
  input  logic              I2C_SCLK,
  input  logic              I2C_SDAT,
  output logic              bit_correct,
  output logic              bit_error
);

  logic   scl_d;
  logic   expected;
  field_e fld;

  assign fld = slot_field(SD_COUNTER);

  always_comb begin
    case (fld)
      FLD_CTRL: expected = in_control[slot_bit(SD_COUNTER)];
      FLD_ADDR: expected = in_address[slot_bit(SD_COUNTER)];
      FLD_DATA: expected = in_data[slot_bit(SD_COUNTER)];
      default:  expected = 1'b0;
    endcase
  end

  always_ff @(posedge CLK) begin
    if (!reset_n) begin
      scl_d       <= 1'b1;
      bit_correct <= 1'b0;
      bit_error   <= 1'b0;
    end else begin
      scl_d       <= I2C_SCLK;
      bit_correct <= 1'b0;
      bit_error   <= 1'b0;
      if (I2C_SCLK && !scl_d && fld != FLD_NONE) begin
        bit_correct <= (I2C_SDAT == expected);
        bit_error   <= (I2C_SDAT != expected);
      end
    end
  end

endmodule
