// i2c_tb_slave: testbench model of an I2C write slave and bus monitor. It
// watches SCL and the SDA bus level with the simulation clock, finds START
// and STOP, collects the bytes of each frame (MSB first) and, when ack_en is
// high, pulls SDA low (sda_pull = 1) during the ACK bit after every byte.
// It also records the bus level in each ACK bit and the number of clock
// cycles from START to STOP of the last frame.
module i2c_tb_slave (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  input  logic ack_en,
  output logic sda_pull
);
  int         starts = 0, stops = 0, frames = 0, acks_low = 0, acks_high = 0;
  logic [7:0] bytes [3];
  logic [7:0] last [3];
  int         nbytes = 0, bitcnt = 0;
  logic [7:0] sh;
  logic       scl_d = 1, sda_d = 1, in_ack = 0;
  longint     cyc = 0, t_start = 0, frame_cycles = 0;

  initial sda_pull = 0;

  always @(posedge clk) begin
    cyc++;
    if (scl && scl_d && sda_d && !sda) begin            // START
      starts++; nbytes = 0; bitcnt = 0; in_ack = 0; sda_pull <= 0; t_start = cyc;
    end else if (scl && scl_d && !sda_d && sda) begin    // STOP
      stops++;
      frame_cycles = cyc - t_start;
      if (nbytes == 3) begin frames++; last = bytes; end
    end else if (scl && !scl_d) begin                     // SCL rise
      if (in_ack) begin
        if (sda) acks_high++; else acks_low++;
      end else begin
        sh = {sh[6:0], sda}; bitcnt++;
      end
    end else if (!scl && scl_d) begin                     // SCL fall
      if (in_ack) begin
        in_ack = 0; sda_pull <= 0; bitcnt = 0;
      end else if (bitcnt == 8) begin
        if (nbytes < 3) bytes[nbytes] = sh;
        nbytes++; in_ack = 1; sda_pull <= ack_en;
      end
    end
    scl_d = scl; sda_d = sda;
  end
endmodule
