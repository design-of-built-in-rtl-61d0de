// i2c_pkg: constants shared by the I2C frame generator and the BIST comparator.
//
// A write frame is cut into bit slots. Each slot lasts four clock cycles
// (phases 0..3): SCL is low in phases 0-1 and high in phases 2-3, and SDA
// changes in phase 1. The slot number is what the I2C block puts out on
// SD_COUNTER, so the comparator can tell which frame bit is on the line.
// The frame layout (START, control byte, ACK, word address, ACK, data, ACK,
// STOP) follows the frame format of the design; the slot numbering is this
// implementation's own.
package i2c_pkg;

  localparam int SLOT_W = 7;                 // width of SD_COUNTER

  localparam logic [SLOT_W-1:0] SLOT_IDLE  = 7'd0;
  localparam logic [SLOT_W-1:0] SLOT_START = 7'd1;
  localparam logic [SLOT_W-1:0] SLOT_CTRL0 = 7'd2;   // control byte, MSB first: 2..9
  localparam logic [SLOT_W-1:0] SLOT_ACK1  = 7'd10;
  localparam logic [SLOT_W-1:0] SLOT_ADDR0 = 7'd11;  // word address: 11..18
  localparam logic [SLOT_W-1:0] SLOT_ACK2  = 7'd19;
  localparam logic [SLOT_W-1:0] SLOT_DATA0 = 7'd20;  // data byte: 20..27
  localparam logic [SLOT_W-1:0] SLOT_ACK3  = 7'd28;
  localparam logic [SLOT_W-1:0] SLOT_STOP  = 7'd29;
  localparam logic [SLOT_W-1:0] SLOT_FREE  = 7'd30;  // bus-free slot between frames

  // Which of the three bytes a data slot belongs to.
  typedef enum logic [1:0] {
    FLD_NONE = 2'd0,
    FLD_CTRL = 2'd1,
    FLD_ADDR = 2'd2,
    FLD_DATA = 2'd3
  } field_e;

  function automatic field_e slot_field(input logic [SLOT_W-1:0] slot);
    if (slot >= SLOT_CTRL0 && slot < SLOT_ACK1) return FLD_CTRL;
    if (slot >= SLOT_ADDR0 && slot < SLOT_ACK2) return FLD_ADDR;
    if (slot >= SLOT_DATA0 && slot < SLOT_ACK3) return FLD_DATA;
    return FLD_NONE;
  endfunction

  // Bit index (7 = MSB, sent first) of a data slot within its byte.
  function automatic logic [2:0] slot_bit(input logic [SLOT_W-1:0] slot);
    logic [2:0] off;
    case (slot_field(slot))
      FLD_CTRL: off = 3'(slot - SLOT_CTRL0);
      FLD_ADDR: off = 3'(slot - SLOT_ADDR0);
      FLD_DATA: off = 3'(slot - SLOT_DATA0);
      default:  off = '0;
    endcase
    return 3'd7 - off;
  endfunction

endpackage
