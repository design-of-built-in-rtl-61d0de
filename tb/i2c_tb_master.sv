// i2c_tb_master: testbench model of an I2C master, driving SCL and SDA
// (sda_drv = 0 pulls the line low, 1 releases it) and reading the SDA bus
// level. Its tasks are called from the testbench: start (also a repeated
// START), stop, write_byte (returns the slave's ACK: 1 = ACK) and
// read_byte (sends ACK or NACK after the byte). One SCL period lasts
// 4*Q clock cycles; SDA changes only in the middle of the SCL low time.
module i2c_tb_master #(
  parameter int Q = 5
) (
  input  logic clk,
  input  logic sda,
  output logic scl,
  output logic sda_drv
);
  initial begin scl = 1; sda_drv = 1; end

  task automatic wait_q();
    repeat (Q) @(posedge clk);
  endtask

  task automatic start();
    sda_drv = 1; wait_q();
    scl = 1;     wait_q();
    sda_drv = 0; wait_q();
    scl = 0;     wait_q();
  endtask

  task automatic stop();
    sda_drv = 0; wait_q();
    scl = 1;     wait_q();
    sda_drv = 1; wait_q();
  endtask

  task automatic put_bit(input logic b);
    sda_drv = b; wait_q();
    scl = 1;     wait_q(); wait_q();
    scl = 0;     wait_q();
  endtask

  task automatic get_bit(output logic b);
    sda_drv = 1; wait_q();
    scl = 1;     wait_q();
    b = sda;     wait_q();
    scl = 0;     wait_q();
  endtask

  task automatic write_byte(input logic [7:0] v, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(b);
    ack = ~b;
  endtask

  task automatic read_byte(input logic send_ack, output logic [7:0] v);
    for (int i = 7; i >= 0; i--) get_bit(v[i]);
    put_bit(~send_ack);
  endtask
endmodule
