// ahb_apb_bridge: AHB slave / APB master bridge. It accepts single AHB
// transfers aimed at the peripheral space, decodes which of up to sixteen
// APB peripherals is addressed, and runs the transfer on APB as a SETUP
// cycle (PSELx, PADDR, PWRITE, PWDATA) followed by an ENABLE cycle
// (PENABLE). HREADYOUT is held low until the APB transfer completes.
//
// Timing, one clock for both buses (HCLK drives the APB side too):
//   read : T1 AHB address phase; T2 SETUP (HREADYOUT low); T3 ENABLE,
//          HREADYOUT high and HRDATA = PRDATA of the selected peripheral,
//          sampled by the AHB master at T4. With REG_RDATA = 1 the read
//          data is registered at the end of ENABLE and returned in one
//          extra wait cycle, for fast clocks.
//   write: T1 address phase; T2 AHB data phase (HWDATA captured, HREADYOUT
//          low); T3 SETUP; T4 ENABLE with HREADYOUT high.
// A new transfer may be presented in the cycle where HREADYOUT is high.
// HRESP is always OKAY. Peripheral n is selected by HADDR[SEL_LSB+3:SEL_LSB].
//
// The port set, the SETUP/ENABLE sequence, the sixteen peripheral selects,
// the read-data multiplexer and the two read-data options follow the
// design; the address decode bits, the single clock and the width of HRESP
// (two bits, AHB) are this implementation's choices.
module ahb_apb_bridge #(
  parameter int unsigned NUM_PERIPH = 16,
  parameter int unsigned SEL_LSB    = 12,
  parameter bit          REG_RDATA  = 1'b0
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  // AHB slave
  input  logic [31:0] HADDR,
  input  logic [31:0] HWDATA,
  input  logic        HWRITE,
  input  logic        HSEL,
  input  logic        HREADY,
  input  logic [1:0]  HTRANS,
  output logic        HREADYOUT,
  output logic [1:0]  HRESP,
  output logic [31:0] HRDATA,
  // APB master
  output logic [31:0]           PADDR,
  output logic [31:0]           PWDATA,
  output logic                  PWRITE,
  output logic [NUM_PERIPH-1:0] PSEL,
  output logic                  PENABLE,
  input  logic [31:0]           PRDATA [NUM_PERIPH]
);

  localparam int SEL_W = $clog2(NUM_PERIPH);

  typedef enum logic [2:0] {B_IDLE, B_WDATA, B_SETUP, B_ENABLE, B_RDATA} br_state_e;

  br_state_e         state;
  logic [SEL_W-1:0]  sel_q;
  logic [31:0]       rdata_q;
  logic              accept;

  assign HRESP   = 2'b00;
  assign PENABLE = (state == B_ENABLE);

  always_comb begin
    case (state)
      B_IDLE, B_RDATA: HREADYOUT = 1'b1;
      B_ENABLE:        HREADYOUT = PWRITE || !REG_RDATA;
      default:         HREADYOUT = 1'b0;
    endcase
  end

  assign accept = HSEL && HTRANS[1] && HREADY && HREADYOUT;
  assign HRDATA = REG_RDATA ? rdata_q : PRDATA[sel_q];

  always_comb begin
    PSEL = '0;
    if (state == B_SETUP || state == B_ENABLE) PSEL[sel_q] = 1'b1;
  end

  always_ff @(posedge HCLK) begin
    if (!HRESETn) begin
      state   <= B_IDLE;
      sel_q   <= '0;
      PADDR   <= '0;
      PWRITE  <= 1'b0;
      PWDATA  <= '0;
      rdata_q <= '0;
    end else begin
      case (state)
        B_WDATA: begin
          PWDATA <= HWDATA;
          state  <= B_SETUP;
        end
        B_SETUP: state <= B_ENABLE;
        B_ENABLE: begin
          rdata_q <= PRDATA[sel_q];
          if (!PWRITE && REG_RDATA) state <= B_RDATA;
          else                      state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
      // A transfer accepted while HREADYOUT is high (IDLE, the last cycle of
      // a write or read) overrides the move to IDLE.
      if (accept) begin
        PADDR  <= HADDR;
        PWRITE <= HWRITE;
        sel_q  <= HADDR[SEL_LSB +: SEL_W];
        state  <= HWRITE ? B_WDATA : B_SETUP;
      end
    end
  end

  // APB rules: at most one peripheral selected; SETUP is followed by ENABLE
  // to the same peripheral and address.
  a_psel_onehot: assert property (@(posedge HCLK) disable iff (!HRESETn) $onehot0(PSEL))
    else $error("ahb_apb_bridge: more than one PSELx");
  a_apb_setup: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (PSEL != '0 && !PENABLE) |=> (PENABLE && $stable(PSEL) && $stable(PADDR) && $stable(PWRITE)))
    else $error("ahb_apb_bridge: APB SETUP not followed by a matching ENABLE");

endmodule
