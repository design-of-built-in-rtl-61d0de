// apb_master: the APB master of the I2C-to-APB bridge, with its internal
// memory. It packs bytes written over I2C into 32-bit APB writes, and keeps
// a 32-bit word read over APB so that the I2C side can read it byte by byte.
//
// Write path: every byte from the I2C slave (data_valid) is stored in a
// four-byte transmit buffer at location addr[1:0], and that location is
// marked as updated. After each byte the four marks are checked; when all
// four are set, the buffer is sent as one APB write of {byte3, byte2,
// byte1, byte0} to PADDR = {addr[7:2], 2'b00} and the marks are cleared.
// A new word address from the I2C slave (addr_valid) clears the marks.
//
// Read path: a pulse on rx_changed from the APB slave (new data available)
// starts an APB read of the word at {addr[7:2], 2'b00}; the result goes to a
// four-byte receive buffer, from which rdata = byte addr[1:0] is returned
// to the I2C slave. A pending write goes first.
//
// APB timing: one SETUP cycle (PSEL), one ENABLE cycle (PSEL, PENABLE);
// PRDATA is taken at the end of ENABLE. There is no PREADY or PSLVERR.
// The four-location buffer, the update check and the rx_changed flag follow
// the bridge description; byte order, address mapping and the read address
// are this implementation's choices.
module apb_master (
  input  logic        clk,
  input  logic        rst_n,
  // from the I2C slave
  input  logic        addr_valid,
  input  logic        data_valid,
  input  logic [7:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // APB
  output logic [7:0]  PADDR,
  output logic        PSEL,
  output logic        PENABLE,
  output logic        PWRITE,
  output logic [31:0] PWDATA,
  input  logic [31:0] PRDATA,
  input  logic        rx_changed
);

  typedef enum logic [1:0] {A_IDLE, A_SETUP, A_ENABLE} apb_state_e;

  apb_state_e state;
  logic [7:0] tx_mem [4];
  logic [7:0] rx_mem [4];
  logic [3:0] tx_upd;
  logic [5:0] tx_word;
  logic       tx_full, rx_pending;

  assign rdata   = rx_mem[addr[1:0]];
  assign tx_full = &tx_upd;
  assign PENABLE = (state == A_ENABLE);
  assign PSEL    = (state != A_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= A_IDLE;
      tx_upd     <= '0;
      tx_word    <= '0;
      rx_pending <= 1'b0;
      PADDR      <= '0;
      PWRITE     <= 1'b0;
      PWDATA     <= '0;
      for (int i = 0; i < 4; i++) begin
        tx_mem[i] <= '0;
        rx_mem[i] <= '0;
      end
    end else begin
      if (rx_changed) rx_pending <= 1'b1;

      case (state)
        A_IDLE:
          if (tx_full) begin
            PADDR  <= {tx_word, 2'b00};
            PWRITE <= 1'b1;
            PWDATA <= {tx_mem[3], tx_mem[2], tx_mem[1], tx_mem[0]};
            tx_upd <= '0;
            state  <= A_SETUP;
          end else if (rx_pending) begin
            PADDR      <= {addr[7:2], 2'b00};
            PWRITE     <= 1'b0;
            rx_pending <= rx_changed;
            state      <= A_SETUP;
          end
        A_SETUP:  state <= A_ENABLE;
        A_ENABLE: begin
          if (!PWRITE)
            for (int i = 0; i < 4; i++) rx_mem[i] <= PRDATA[8*i +: 8];
          state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase

      // Buffer updates from the I2C side (after the IDLE decision above, so a
      // byte arriving in the cycle the buffer is handed over is kept).
      if (addr_valid) tx_upd <= '0;
      if (data_valid) begin
        tx_mem[addr[1:0]] <= wdata;
        tx_upd[addr[1:0]] <= 1'b1;
        tx_word           <= addr[7:2];
      end
    end
  end

  // APB rules: SETUP is followed by ENABLE with address, direction and data held.
  a_apb_setup: assert property (@(posedge clk) disable iff (!rst_n)
    (PSEL && !PENABLE) |=> (PSEL && PENABLE && $stable(PADDR) && $stable(PWRITE) && $stable(PWDATA)))
    else $error("apb_master: APB SETUP not followed by a matching ENABLE");
  a_apb_enable: assert property (@(posedge clk) disable iff (!rst_n)
    PENABLE |=> !PENABLE)
    else $error("apb_master: ENABLE longer than one cycle");

endmodule
