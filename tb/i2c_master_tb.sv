// i2c_master_tb: runs the I2C write-frame generator against the model slave
// i2c_tb_slave, which decodes the bus on its own. Checks: the three bytes
// of every frame arrive intact and in order; each frame has exactly one
// START and one STOP; START to STOP takes 113 clock cycles and frames
// repeat every 120 cycles while GO is held (four cycles per bit slot);
// new input bytes are taken at the next frame; ack_err is clear when the
// slave ACKs and set when it does not; with GO low the block returns to
// slot 0 with both lines high.
module i2c_master_tb;
  import i2c_pkg::*;
  logic CLK = 0, reset_n = 0, GO = 0;
  logic [7:0] in_control, in_address, in_data;
  logic [SLOT_W-1:0] SD_COUNTER;
  logic I2C_SCLK, I2C_SDAT, ack_err, done, sda_in, sda_pull, ack_en;
  int checks = 0, failures = 0;
  int max_slot = 0;
  longint cyc = 0, t_done = 0, period = 0;

  assign sda_in = I2C_SDAT & ~sda_pull;

  i2c_master dut (.*);
  i2c_tb_slave mon (.clk(CLK), .scl(I2C_SCLK), .sda(sda_in), .ack_en, .sda_pull);

  always #5 CLK = ~CLK;
  always @(posedge CLK) if (reset_n) begin
    cyc++;
    if (int'(SD_COUNTER) > max_slot) max_slot = int'(SD_COUNTER);
    if (done) begin period = cyc - t_done; t_done = cyc; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  task automatic wait_done();
    @(posedge CLK iff done);
    repeat (3) @(posedge CLK);
  endtask

  task automatic check_frame(logic [7:0] c, logic [7:0] a, logic [7:0] d);
    check(mon.last[0] == c, $sformatf("control %h vs %h", mon.last[0], c));
    check(mon.last[1] == a, $sformatf("address %h vs %h", mon.last[1], a));
    check(mon.last[2] == d, $sformatf("data %h vs %h", mon.last[2], d));
  endtask

  initial begin
    repeat (5000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ack_en = 1;
    in_control = 8'hA0; in_address = 8'h3C; in_data = 8'h96;
    repeat (3) @(posedge CLK);
    reset_n = 1;
    repeat (3) @(posedge CLK);
    mon.starts = 0; mon.stops = 0; mon.frames = 0; mon.acks_low = 0; max_slot = 0;
    check(SD_COUNTER == 0 && I2C_SCLK && I2C_SDAT, "idle before GO");
    GO = 1;
    wait_done();
    check_frame(8'hA0, 8'h3C, 8'h96);
    check(mon.frame_cycles == 113, $sformatf("START-STOP cycles %0d", mon.frame_cycles));
    check(!ack_err, "ack_err with ACKing slave");
    check(mon.acks_low == 3, "three ACK bits seen low");
    in_control = 8'hA1; in_address = 8'h01; in_data = 8'h7F;
    wait_done();
    check_frame(8'hA1, 8'h01, 8'h7F);
    check(period == 120, $sformatf("frame period %0d", period));
    ack_en = 0;
    in_data = 8'h00;
    wait_done();
    check_frame(8'hA1, 8'h01, 8'h00);
    check(ack_err, "ack_err without ACK");
    ack_en = 1;
    wait_done();
    check(!ack_err, "ack_err cleared");
    GO = 0;
    repeat (8) @(posedge CLK);
    check(SD_COUNTER == 0 && I2C_SCLK && I2C_SDAT, "idle after GO low");
    check(mon.starts == 4 && mon.stops == 4 && mon.frames == 4, "one START/STOP per frame");
    check(max_slot == int'(SLOT_FREE), "slot counter range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
