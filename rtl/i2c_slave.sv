// i2c_slave: the I2C slave at the front of the I2C-to-APB bridge. It takes
// frames from an external I2C master and hands bytes to the APB master.
//
// Frame format: START, 7-bit slave address + R/W, ACK, then for a write an
// 8-bit word address, ACK, and data bytes each followed by ACK, until STOP.
// For a read the master first writes the word address, then sends a
// repeated START with R/W = 1 and clocks out bytes, ACKing each one but the
// last. The word address increments after every data byte.
//
// How it works: SCL and SDA are sampled with the system clock through
// two-flop synchronisers; START (SDA falls, SCL high), STOP (SDA rises,
// SCL high) and the SCL edges are found by comparing with the previous
// sample. Bits are shifted in on SCL rising edges; SDA is driven (ACK or
// read data) from an SCL falling edge to the next one. The system clock
// must be at least eight times the SCL rate.
//
// Interface towards the APB master: addr_valid pulses when a word address
// has arrived (addr holds it); data_valid pulses with wdata for every
// written byte, addr being its address; rd_strobe pulses when a byte is
// taken from rdata for a read (rdata must be the byte at addr, combinational
// from the buffer); rw is the R/W bit of the current frame. sda_oe = 1 pulls
// SDA low. The signal set (address valid, data valid, read/write, 8-bit
// data) follows the bridge diagram; slave address, repeated-START reads,
// address increment and the synchroniser are this implementation's.
module i2c_slave #(
  parameter logic [6:0] SLAVE_ADDR = 7'h50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe,
  output logic       addr_valid,
  output logic       data_valid,
  output logic       rd_strobe,
  output logic       rw,
  output logic [7:0] addr,
  output logic [7:0] wdata,
  input  logic [7:0] rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_DEVADDR, S_ACK_DEV, S_WADDR, S_ACK_WADDR, S_WDATA, S_ACK_WDATA,
    S_RDATA
  } state_e;

  state_e     state;
  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [7:0] shreg, txreg;
  logic [3:0] bitcnt;
  logic       rack;   // in S_RDATA: waiting for the master's ACK bit

  assign scl_rise = scl_s[1] & ~scl_s[2];
  assign scl_fall = ~scl_s[1] & scl_s[2];
  assign start_c  = scl_s[1] & scl_s[2] & ~sda_s[1] & sda_s[2];
  assign stop_c   = scl_s[1] & scl_s[2] & sda_s[1] & ~sda_s[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sda_oe     <= 1'b0;
      addr_valid <= 1'b0;
      data_valid <= 1'b0;
      rd_strobe  <= 1'b0;
      rw         <= 1'b0;
      addr       <= '0;
      wdata      <= '0;
      shreg      <= '0;
      txreg      <= '0;
      bitcnt     <= '0;
      rack       <= 1'b0;
    end else begin
      addr_valid <= 1'b0;
      data_valid <= 1'b0;
      rd_strobe  <= 1'b0;
      if (start_c) begin
        state  <= S_DEVADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else if (scl_rise) begin
        if (state == S_RDATA && rack) begin
          if (sda_s[1]) state <= S_IDLE;      // NACK: master wants no more
          else          addr  <= addr + 1'b1; // ACK: next byte follows
        end else if (state inside {S_DEVADDR, S_WADDR, S_WDATA}) begin
          shreg  <= {shreg[6:0], sda_s[1]};
          bitcnt <= bitcnt + 1'b1;
        end
      end else if (scl_fall) begin
        case (state)
          S_DEVADDR:
            if (bitcnt == 4'd8) begin
              if (shreg[7:1] == SLAVE_ADDR) begin
                sda_oe <= 1'b1;
                rw     <= shreg[0];
                state  <= S_ACK_DEV;
              end else begin
                state <= S_IDLE;
              end
            end
          S_ACK_DEV: begin
            bitcnt <= '0;
            if (rw) begin
              sda_oe    <= ~rdata[7];
              txreg     <= {rdata[6:0], 1'b1};
              bitcnt    <= 4'd1;
              rack      <= 1'b0;
              rd_strobe <= 1'b1;
              state     <= S_RDATA;
            end else begin
              sda_oe <= 1'b0;
              state  <= S_WADDR;
            end
          end
          S_WADDR:
            if (bitcnt == 4'd8) begin
              addr       <= shreg;
              addr_valid <= 1'b1;
              sda_oe     <= 1'b1;
              state      <= S_ACK_WADDR;
            end
          S_ACK_WADDR: begin
            sda_oe <= 1'b0;
            bitcnt <= '0;
            state  <= S_WDATA;
          end
          S_WDATA:
            if (bitcnt == 4'd8) begin
              wdata      <= shreg;
              data_valid <= 1'b1;
              sda_oe     <= 1'b1;
              state      <= S_ACK_WDATA;
            end
          S_ACK_WDATA: begin
            sda_oe <= 1'b0;
            bitcnt <= '0;
            addr   <= addr + 1'b1;
            state  <= S_WDATA;
          end
          S_RDATA:
            if (rack || bitcnt != 4'd8) begin
              // after the master's ACK: load the next byte and drive its MSB
              if (rack) begin
                sda_oe    <= ~rdata[7];
                txreg     <= {rdata[6:0], 1'b1};
                rd_strobe <= 1'b1;
                rack      <= 1'b0;
                bitcnt    <= 4'd1;
              end else begin
                sda_oe <= ~txreg[7];
                txreg  <= {txreg[6:0], 1'b1};
                bitcnt <= bitcnt + 1'b1;
              end
            end else begin
              sda_oe <= 1'b0;    // release SDA for the master's ACK bit
              rack   <= 1'b1;
            end
          default: ;
        endcase
      end
    end
  end

  // The slave drives SDA only between a START and the following STOP.
  a_no_drive_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && $past(state) == S_IDLE) |-> !sda_oe)
    else $error("i2c_slave: SDA driven while idle");

endmodule
