// i2c_bist_top: the chip-level view of the design. Three independent parts
// stand side by side, each with its own pins:
//   * bist_module: the I2C write-frame generator fed by three random
//     pattern generators and checked bit by bit by a comparator (pins
//     enable, GO, reset, reset_n, SD_COUNTER, bit_correct, bit_error,
//     I2C_SCLK, I2C_SDAT);
//   * a second, plain I2C block driven from the pins in_control_simple,
//     in_address_simple and in_data_simple (pins *_simple), sharing CLK, GO
//     and reset_n with the BIST part;
//   * the I2C-to-APB bridge (pins i2c_*, apb_*) and the AHB-to-APB bridge
//     (pins H*, P*), both clocked by CLK. Their APB slaves are outside.
// The first two follow the top-level schematic of the I2C with BIST; adding
// the two bridges as separate parts is this implementation's arrangement.
// I2C_SDAT and I2C_SDAT_simple are open-drain drive levels (1 = release);
// I2C_SDAT_in and I2C_SDAT_simple_in are the bus levels read back.
module i2c_bist_top
  import i2c_pkg::*;
(
  input  logic              CLK,
  input  logic              enable,
  input  logic              GO,
  input  logic              reset,
  input  logic              reset_n,
  // BIST part
  input  logic              I2C_SDAT_in,
  output logic [SLOT_W-1:0] SD_COUNTER,
  output logic              bit_correct,
  output logic              bit_error,
  output logic              I2C_SCLK,
  output logic              I2C_SDAT,
  output logic              ack_err,
  // plain I2C part
  input  logic [7:0]        in_control_simple,
  input  logic [7:0]        in_address_simple,
  input  logic [7:0]        in_data_simple,
  input  logic              I2C_SDAT_simple_in,
  output logic [SLOT_W-1:0] SD_COUNTER_simple,
  output logic              I2C_SCLK_simple,
  output logic              I2C_SDAT_simple,
  output logic              ack_err_simple,
  output logic              done_simple,
  // I2C-to-APB bridge
  input  logic              i2c_scl,
  input  logic              i2c_sda,
  output logic              i2c_sda_oe,
  output logic [7:0]        apb_paddr,
  output logic              apb_psel,
  output logic              apb_penable,
  output logic              apb_pwrite,
  output logic [31:0]       apb_pwdata,
  input  logic [31:0]       apb_prdata,
  input  logic              apb_rx_changed,
  // AHB-to-APB bridge
  input  logic [31:0]       HADDR,
  input  logic [31:0]       HWDATA,
  input  logic              HWRITE,
  input  logic              HSEL,
  input  logic              HREADY,
  input  logic [1:0]        HTRANS,
  output logic              HREADYOUT,
  output logic [1:0]        HRESP,
  output logic [31:0]       HRDATA,
  output logic [31:0]       PADDR,
  output logic [31:0]       PWDATA,
  output logic              PWRITE,
  output logic [15:0]       PSEL,
  output logic              PENABLE,
  input  logic [31:0]       PRDATA [16]
);

  bist_module u_bist (
    .CLK, .enable, .GO, .reset, .reset_n,
    .sda_in(I2C_SDAT_in),
    .SD_COUNTER, .bit_correct, .bit_error, .I2C_SCLK, .I2C_SDAT,
    .ack_err, .done()
  );

  i2c_master u_i2c_simple (
    .CLK, .reset_n, .GO,
    .in_control(in_control_simple),
    .in_address(in_address_simple),
    .in_data(in_data_simple),
    .sda_in(I2C_SDAT_simple_in),
    .SD_COUNTER(SD_COUNTER_simple),
    .I2C_SCLK(I2C_SCLK_simple),
    .I2C_SDAT(I2C_SDAT_simple),
    .ack_err(ack_err_simple),
    .done(done_simple)
  );

  i2c_apb_bridge u_i2c_apb (
    .clk(CLK), .rst_n(reset_n),
    .scl(i2c_scl), .sda(i2c_sda), .sda_oe(i2c_sda_oe),
    .PADDR(apb_paddr), .PSEL(apb_psel), .PENABLE(apb_penable),
    .PWRITE(apb_pwrite), .PWDATA(apb_pwdata), .PRDATA(apb_prdata),
    .rx_changed(apb_rx_changed)
  );

  ahb_apb_bridge u_ahb_apb (
    .HCLK(CLK), .HRESETn(reset_n),
    .HADDR, .HWDATA, .HWRITE, .HSEL, .HREADY, .HTRANS,
    .HREADYOUT, .HRESP, .HRDATA,
    .PADDR, .PWDATA, .PWRITE, .PSEL, .PENABLE, .PRDATA
  );

endmodule
