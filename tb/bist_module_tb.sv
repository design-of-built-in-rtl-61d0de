// bist_module_tb: runs the self-test block end to end with the model slave
// i2c_tb_slave ACKing. A reference copy of the three pattern generators is
// kept here (same seeds, taps x^8+x^6+x^5+x^4+1, one step per frame).
// Checks: every frame carries the reference control, address and data
// bytes; the comparator reports 24 correct bits and no error per frame;
// with enable low the same patterns repeat; a bit pulled low on the bus
// by the testbench while a 1 is sent is reported as exactly one bit_error;
// reset brings the generators back to their seeds.
module bist_module_tb;
  import i2c_pkg::*;
  logic CLK = 0, enable = 0, GO = 0, reset = 1, reset_n = 0;
  logic sda_in, sda_pull, inject = 0;
  logic [SLOT_W-1:0] SD_COUNTER;
  logic bit_correct, bit_error, I2C_SCLK, I2C_SDAT, ack_err, done;
  int checks = 0, failures = 0;
  int n_ok = 0, n_err = 0;
  logic [7:0] r_ctrl, r_addr, r_data;

  assign sda_in = I2C_SDAT & ~sda_pull & ~inject;

  bist_module dut (.*);
  i2c_tb_slave mon (.clk(CLK), .scl(I2C_SCLK), .sda(sda_in), .ack_en(1'b1), .sda_pull);

  always #5 CLK = ~CLK;
  always @(posedge CLK) if (reset_n) begin
    if (bit_correct) n_ok++;
    if (bit_error)   n_err++;
  end

  function automatic logic [7:0] step(logic [7:0] v);
    return {v[6:0], ^(v & 8'b1011_1000)};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Wait for the end of a frame and check it against the reference bytes.
  task automatic frame(string what, int exp_err);
    n_ok = 0; n_err = 0;
    @(posedge CLK iff done);
    repeat (3) @(posedge CLK);
    check(mon.last[0] == r_ctrl && mon.last[1] == r_addr && mon.last[2] == r_data,
          $sformatf("%s: bytes %h %h %h, expected %h %h %h", what,
                    mon.last[0], mon.last[1], mon.last[2], r_ctrl, r_addr, r_data));
    check(n_ok + n_err == 24, $sformatf("%s: %0d bits compared", what, n_ok + n_err));
    check(n_err == exp_err, $sformatf("%s: %0d bit errors", what, n_err));
    check(!ack_err, $sformatf("%s: ACKs", what));
  endtask

  initial begin
    repeat (20000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_ctrl = 8'hA5; r_addr = 8'h3C; r_data = 8'h5A;
    repeat (3) @(posedge CLK);
    reset = 0; reset_n = 1;
    GO = 1;
    // enable low: the seeds are sent frame after frame
    frame("seed frame", 0);
    frame("held pattern", 0);
    // enable high: one new pattern per frame
    @(negedge CLK) enable = 1;
    frame("third frame, still seed", 0);
    for (int i = 0; i < 5; i++) begin
      r_ctrl = step(r_ctrl); r_addr = step(r_addr); r_data = step(r_data);
      frame($sformatf("random frame %0d", i), 0);
    end
    // pull SDA low during the first 1 of the data byte
    r_ctrl = step(r_ctrl); r_addr = step(r_addr); r_data = step(r_data);
    fork
      begin
        int b;
        b = 7;
        while (b > 0 && !r_data[b]) b--;
        @(posedge CLK iff SD_COUNTER == SLOT_DATA0 + 7'(7 - b));
        inject = 1;
        @(posedge CLK iff SD_COUNTER == SLOT_DATA0 + 7'(8 - b));
        inject = 0;
      end
    join_none
    n_ok = 0; n_err = 0;
    @(posedge CLK iff done);
    GO = 0;
    repeat (3) @(posedge CLK);
    check(r_data != 0 && n_err == 1, $sformatf("injected fault seen as %0d errors", n_err));
    check(n_ok == 23, "other bits correct with fault");
    // generator reset while the bus is idle
    repeat (8) @(posedge CLK);
    check(SD_COUNTER == SLOT_IDLE, "idle with GO low");
    @(negedge CLK) reset = 1;
    @(negedge CLK) reset = 0;
    GO = 1;
    r_ctrl = 8'hA5; r_addr = 8'h3C; r_data = 8'h5A;
    frame("after generator reset", 0);
    GO = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
