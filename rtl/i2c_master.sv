// i2c_master: the I2C block of the design. It sends write frames on a two-wire
// bus: START, 8-bit control byte (7-bit slave address and R/W), ACK, 8-bit
// word address, ACK, 8-bit data byte, ACK, STOP. While GO stays high the
// frames repeat back to back, with one bus-free slot between them.
//
// How it works: the frame is a sequence of bit slots (numbers in i2c_pkg),
// each four CLK cycles long. SD_COUNTER is the slot number. SCL is low in
// phases 0-1 and high in phases 2-3 of a slot; SDA changes in phase 1, so it
// is stable while SCL is high. START pulls SDA low in the middle of a slot
// with SCL high, STOP releases SDA in phase 3 with SCL high. CLK must thus
// run at four times the SCL rate (200 kHz for the 50 kHz SCL the design
// quotes). The three bytes are captured from in_control, in_address and
// in_data when a frame starts and held until its end.
//
// ACK: in the three ACK slots SDA is released (driven 1, the open-drain
// "off" level) and the bus level sda_in is sampled in phase 3. The frame
// goes on whatever the slave answers; a frame with any NACK sets ack_err
// when it ends. `done` pulses for one cycle at the end of the STOP slot.
//
// Interface: CLK, active-low synchronous reset_n, GO, the three bytes;
// outputs SD_COUNTER, I2C_SCLK and I2C_SDAT (registered: they show the
// state of the previous cycle). I2C_SDAT is the level the block drives;
// on a real bus it drives an open-drain pad (0 = pull low, 1 = release).
// Port names follow the design's pin diagram; sda_in, ack_err and done,
// the slot timing and the behaviour on NACK are this implementation's.
module i2c_master
  import i2c_pkg::*;
(
  input  logic              CLK,
  input  logic              reset_n,
  input  logic              GO,
  input  logic [7:0]        in_control,
  input  logic [7:0]        in_address,
  input  logic [7:0]        in_data,
  input  logic              sda_in,      // bus SDA level, read in ACK slots
  output logic [SLOT_W-1:0] SD_COUNTER,
  output logic              I2C_SCLK,
  output logic              I2C_SDAT,
  output logic              ack_err,     // last frame saw a NACK
  output logic              done         // one-cycle pulse: frame finished
);

  logic [SLOT_W-1:0] slot;
  logic [1:0]        phase;
  logic [7:0]        ctrl_q, addr_q, data_q;
  logic              nack;
  logic              bit_val;

  assign SD_COUNTER = slot;

  always_comb begin
    case (slot_field(slot))
      FLD_CTRL: bit_val = ctrl_q[slot_bit(slot)];
      FLD_ADDR: bit_val = addr_q[slot_bit(slot)];
      FLD_DATA: bit_val = data_q[slot_bit(slot)];
      default:  bit_val = 1'b1;
    endcase
  end

  always_ff @(posedge CLK) begin
    if (!reset_n) begin
      slot     <= SLOT_IDLE;
      phase    <= '0;
      I2C_SCLK <= 1'b1;
      I2C_SDAT <= 1'b1;
      nack     <= 1'b0;
      ack_err  <= 1'b0;
      done     <= 1'b0;
      ctrl_q   <= '0;
      addr_q   <= '0;
      data_q   <= '0;
    end else begin
      done <= 1'b0;

      // Line levels for the current slot and phase.
      case (slot)
        SLOT_IDLE, SLOT_FREE: begin
          I2C_SCLK <= 1'b1;
          I2C_SDAT <= 1'b1;
        end
        SLOT_START: begin
          I2C_SCLK <= 1'b1;
          I2C_SDAT <= ~phase[1];
        end
        SLOT_ACK1, SLOT_ACK2, SLOT_ACK3: begin
          I2C_SCLK <= phase[1];
          if (phase == 2'd1) I2C_SDAT <= 1'b1;
          if (phase == 2'd3) nack <= nack | sda_in;
        end
        SLOT_STOP: begin
          I2C_SCLK <= phase[1];
          if (phase == 2'd1) I2C_SDAT <= 1'b0;
          if (phase == 2'd3) I2C_SDAT <= 1'b1;
        end
        default: begin  // control, address and data bits
          I2C_SCLK <= phase[1];
          if (phase == 2'd1) I2C_SDAT <= bit_val;
        end
      endcase

      // Slot sequencing.
      if (slot == SLOT_IDLE) begin
        if (GO) begin
          slot   <= SLOT_START;
          phase  <= '0;
          ctrl_q <= in_control;
          addr_q <= in_address;
          data_q <= in_data;
          nack   <= 1'b0;
        end
      end else if (phase == 2'd3) begin
        phase <= '0;
        if (slot == SLOT_STOP) begin
          done    <= 1'b1;
          ack_err <= nack;
          slot    <= SLOT_FREE;
        end else if (slot == SLOT_FREE) begin
          if (GO) begin
            slot   <= SLOT_START;
            ctrl_q <= in_control;
            addr_q <= in_address;
            data_q <= in_data;
            nack   <= 1'b0;
          end else begin
            slot <= SLOT_IDLE;
          end
        end else begin
          slot <= slot + 1'b1;
        end
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  // Bus rule: with SCL high, SDA may change only for START and STOP.
  a_sda_stable: assert property (@(posedge CLK) disable iff (!reset_n)
    ($past(I2C_SCLK) && I2C_SCLK && I2C_SDAT != $past(I2C_SDAT))
      |-> ($past(slot) == SLOT_START || $past(slot) == SLOT_STOP))
    else $error("i2c_master: SDA changed while SCL high outside START/STOP");

endmodule
