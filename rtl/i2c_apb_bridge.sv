// i2c_apb_bridge: lets an I2C master reach an APB slave. The I2C slave
// takes bytes from the two-wire bus and hands them to the APB master, which
// gathers four of them into one 32-bit APB write; in the other direction
// the APB master fetches a 32-bit word when the APB slave flags new data
// (rx_changed) and the I2C master reads it back byte by byte.
//
// Interface: system clock and active-low reset; the I2C pins as an input
// pair (scl, sda: the bus levels) and an open-drain output (sda_oe = 1 pulls
// SDA low); the APB master port with 8-bit address and 32-bit data, plus
// rx_changed. See i2c_slave and apb_master for the timing of each half.
// The split into I2C slave and APB master with internal memory follows the
// bridge diagram of the design.
module i2c_apb_bridge #(
  parameter logic [6:0] SLAVE_ADDR = 7'h50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl,
  input  logic        sda,
  output logic        sda_oe,
  output logic [7:0]  PADDR,
  output logic        PSEL,
  output logic        PENABLE,
  output logic        PWRITE,
  output logic [31:0] PWDATA,
  input  logic [31:0] PRDATA,
  input  logic        rx_changed
);

  logic       addr_valid, data_valid;
  logic [7:0] addr, wdata, rdata;

  i2c_slave #(.SLAVE_ADDR(SLAVE_ADDR)) u_slave (
    .clk, .rst_n, .scl, .sda, .sda_oe,
    .addr_valid, .data_valid, .rd_strobe(), .rw(), .addr, .wdata, .rdata
  );

  apb_master u_apb (
    .clk, .rst_n,
    .addr_valid, .data_valid, .addr, .wdata, .rdata,
    .PADDR, .PSEL, .PENABLE, .PWRITE, .PWDATA, .PRDATA, .rx_changed
  );

endmodule
