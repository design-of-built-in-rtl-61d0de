// i2c_bist_top_tb: end-to-end test of the whole chip at its default
// parameters. All parts run at once on one clock:
//   * BIST part: GO and enable high, a model slave ACKs; the bytes on the
//     bus must follow a reference copy of the three pattern generators, the
//     comparator must count 24 correct bits per frame, an SDA bit forced
//     low by the testbench must give one bit_error, and a frame left
//     unacknowledged must set ack_err;
//   * plain I2C part: sends bytes taken from its pins to a second model
//     slave, changed once while running;
//   * I2C-to-APB bridge: a model master writes eight bytes (two APB
//     writes), the APB model flags new data, and the word is read back
//     over I2C;
//   * AHB-to-APB bridge: a few reads and writes to several peripherals.
// Each of these events is counted and must happen at least once.
module i2c_bist_top_tb;
  import i2c_pkg::*;
  logic CLK = 0, enable = 0, GO = 0, reset = 1, reset_n = 0;
  int checks = 0, failures = 0;

  // BIST part
  logic I2C_SDAT_in, bist_pull, inject = 0, bist_ack_en = 1;
  logic [SLOT_W-1:0] SD_COUNTER;
  logic bit_correct, bit_error, I2C_SCLK, I2C_SDAT, ack_err;
  // plain I2C part
  logic [7:0] in_control_simple = 8'hA0, in_address_simple = 8'h12, in_data_simple = 8'h34;
  logic I2C_SDAT_simple_in, simple_pull;
  logic [SLOT_W-1:0] SD_COUNTER_simple;
  logic I2C_SCLK_simple, I2C_SDAT_simple, ack_err_simple, done_simple;
  // I2C-to-APB bridge
  logic i2c_scl, i2c_sda, i2c_sda_drv, i2c_sda_oe;
  logic [7:0] apb_paddr;
  logic apb_psel, apb_penable, apb_pwrite, apb_rx_changed = 0;
  logic [31:0] apb_pwdata, apb_prdata;
  // AHB-to-APB bridge
  logic [31:0] HADDR = 0, HWDATA = 0, HRDATA, PADDR, PWDATA;
  logic HWRITE = 0, HSEL = 0, HREADYOUT, PWRITE, PENABLE;
  logic [1:0] HTRANS = 0, HRESP;
  logic HREADY;
  logic [15:0] PSEL;
  logic [31:0] PRDATA [16];
  logic [31:0] pmem [16];

  assign I2C_SDAT_in        = I2C_SDAT & ~bist_pull & ~inject;
  assign I2C_SDAT_simple_in = I2C_SDAT_simple & ~simple_pull;
  assign i2c_sda            = i2c_sda_drv & ~i2c_sda_oe;
  assign HREADY             = HREADYOUT;
  for (genvar n = 0; n < 16; n++) begin : per
    assign PRDATA[n] = pmem[n] ^ PADDR;
  end

  i2c_bist_top dut (.*);
  i2c_tb_slave  bist_mon   (.clk(CLK), .scl(I2C_SCLK), .sda(I2C_SDAT_in), .ack_en(bist_ack_en), .sda_pull(bist_pull));
  i2c_tb_slave  simple_mon (.clk(CLK), .scl(I2C_SCLK_simple), .sda(I2C_SDAT_simple_in), .ack_en(1'b1), .sda_pull(simple_pull));
  i2c_tb_master #(.Q(5)) m (.clk(CLK), .sda(i2c_sda), .scl(i2c_scl), .sda_drv(i2c_sda_drv));
  apb_tb_slave  s (.clk(CLK), .PADDR(apb_paddr), .PSEL(apb_psel), .PENABLE(apb_penable),
                   .PWRITE(apb_pwrite), .PWDATA(apb_pwdata), .PRDATA(apb_prdata));

  always #5 CLK = ~CLK;

  // event counters
  int n_bist_frames = 0, n_correct = 0, n_error = 0, n_nack = 0, n_simple = 0;
  int n_i2c_apb_wr = 0, n_i2c_apb_rd = 0, n_ahb_rd = 0, n_ahb_wr = 0, n_pattern_changes = 0;
  logic [7:0] r_ctrl = 8'hA5, r_addr = 8'h3C, r_data = 8'h5A;
  int frame_err = 0, frame_ok = 0;
  logic [7:0] flip_mask = 0;   // control-byte bit forced low in this frame

  function automatic logic [7:0] step(logic [7:0] v);
    return {v[6:0], ^(v & 8'b1011_1000)};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge CLK) if (reset_n) begin
    if (bit_correct) frame_ok++;
    if (bit_error)   frame_err++;
  end

  // BIST frame checker: runs on every frame end of the BIST I2C block
  always @(posedge CLK) if (reset_n && dut.u_bist.done) begin
    fork begin
      repeat (2) @(posedge CLK);
      n_bist_frames++;
      check(frame_ok + frame_err == 24, $sformatf("BIST frame %0d: %0d bits compared", n_bist_frames, frame_ok + frame_err));
      check(frame_err == int'(flip_mask != 0), $sformatf("BIST frame %0d: %0d bit errors", n_bist_frames, frame_err));
      check(bist_mon.last[0] == (r_ctrl & ~flip_mask) && bist_mon.last[1] == r_addr && bist_mon.last[2] == r_data,
            $sformatf("BIST frame %0d bytes %h %h %h", n_bist_frames,
                      bist_mon.last[0], bist_mon.last[1], bist_mon.last[2]));
      n_correct += frame_ok;
      n_error   += frame_err;
      if (ack_err) n_nack++;
      frame_ok = 0; frame_err = 0; flip_mask = 0;
      if (enable) begin
        r_ctrl = step(r_ctrl); r_addr = step(r_addr); r_data = step(r_data);
        n_pattern_changes++;
      end
    end join_none
  end

  initial begin
    repeat (60000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BIST and plain I2C parts
  initial begin
    for (int n = 0; n < 16; n++) pmem[n] = 32'($urandom);
    repeat (3) @(posedge CLK);
    reset = 0; reset_n = 1;
    @(negedge CLK);
    frame_ok = 0; frame_err = 0;
    @(negedge CLK) GO = 1; enable = 1;
    // plain part: first frame with the initial pin values
    @(posedge CLK iff done_simple);
    repeat (3) @(posedge CLK);
    n_simple++;
    check(simple_mon.last[0] == 8'hA0 && simple_mon.last[1] == 8'h12 && simple_mon.last[2] == 8'h34,
          "plain I2C frame 1");
    in_control_simple = 8'hA0; in_address_simple = 8'h56; in_data_simple = 8'h78;
    @(posedge CLK iff done_simple);
    repeat (3) @(posedge CLK);
    n_simple++;
    check(simple_mon.last[1] == 8'h56 && simple_mon.last[2] == 8'h78, "plain I2C frame 2");
    check(!ack_err_simple, "plain I2C ACKs");
    // BIST: one frame with a forced bit, one without ACK
    @(posedge CLK iff SD_COUNTER == SLOT_START);
    begin
      int b;
      b = 7;
      while (b > 0 && !r_ctrl[b]) b--;
      flip_mask = 8'(1 << b);
      @(posedge CLK iff SD_COUNTER == SLOT_CTRL0 + 7'(7 - b));
      inject = 1;
      @(posedge CLK iff SD_COUNTER == SLOT_CTRL0 + 7'(8 - b));
      inject = 0;
    end
    @(posedge CLK iff dut.u_bist.done);
    @(negedge CLK) bist_ack_en = 0;
    @(posedge CLK iff dut.u_bist.done);
    @(negedge CLK) bist_ack_en = 1;
    repeat (300) @(posedge CLK);
  end

  // I2C-to-APB bridge and AHB-to-APB bridge
  initial begin
    logic ack;
    logic [7:0] v;
    logic [7:0] b [8];
    for (int i = 0; i < 64; i++) s.mem[i] = 32'($urandom);
    for (int i = 0; i < 8; i++) b[i] = 8'($urandom);
    wait (reset_n);
    repeat (10) @(posedge CLK);
    s.writes = 0; s.reads = 0; s.proto_err = 0;
    m.start();
    m.write_byte({7'h50, 1'b0}, ack); check(ack, "bridge address ACK");
    m.write_byte(8'h40, ack);
    for (int i = 0; i < 8; i++) m.write_byte(b[i], ack);
    m.stop();
    repeat (20) @(posedge CLK);
    n_i2c_apb_wr = s.writes;
    check(s.writes == 2, "two APB writes from eight I2C bytes");
    check(s.mem[16] == {b[3], b[2], b[1], b[0]} && s.mem[17] == {b[7], b[6], b[5], b[4]},
          "APB words from I2C bytes");
    m.start();
    m.write_byte({7'h50, 1'b0}, ack);
    m.write_byte(8'h0C, ack);
    m.stop();
    @(negedge CLK) apb_rx_changed = 1;
    @(negedge CLK) apb_rx_changed = 0;
    repeat (10) @(posedge CLK);
    n_i2c_apb_rd = s.reads;
    m.start();
    m.write_byte({7'h50, 1'b0}, ack);
    m.write_byte(8'h0C, ack);
    m.start();
    m.write_byte({7'h50, 1'b1}, ack);
    for (int i = 0; i < 4; i++) begin
      m.read_byte(i < 3, v);
      check(v == s.mem[3][8*i +: 8], $sformatf("I2C read byte %0d via APB", i));
    end
    m.stop();
    check(s.proto_err == 0, "bridge APB protocol");

    // AHB: write then read back through the peripheral model, 4 slots
    for (int k = 0; k < 4; k++) begin
      logic [31:0] addr, data;
      addr = 32'h4000_0000 | (32'(k * 5) << 12) | 32'h10;
      data = $urandom;
      // write: address phase, data phase, wait for HREADYOUT
      @(posedge CLK); #1 HSEL = 1; HTRANS = 2'b10; HWRITE = 1; HADDR = addr;
      @(posedge CLK); #1 HSEL = 0; HTRANS = 2'b00; HWDATA = data;
      while (!(PENABLE && PWRITE)) @(posedge CLK) #1;
      pmem[k * 5] = PWDATA;          // the peripheral stores the word
      check(PSEL == 16'(1 << (k * 5)) && PADDR == addr, $sformatf("AHB write %0d select/address", k));
      #1;
      n_ahb_wr++;
      // read
      @(posedge CLK); #1 HSEL = 1; HTRANS = 2'b10; HWRITE = 0; HADDR = addr;
      @(posedge CLK); #1 HSEL = 0; HTRANS = 2'b00;
      while (!HREADYOUT) @(posedge CLK) #1;
      check(HRDATA == (data ^ addr), $sformatf("AHB read %0d data", k));
      n_ahb_rd++;
    end

    wait (n_bist_frames >= 10 && n_simple >= 2);
    check(n_bist_frames >= 10,     "BIST frames");
    check(n_correct > 0,           "bit_correct seen");
    check(n_error == 1,            "bit_error seen once");
    check(n_nack == 1,             "NACK frame seen once");
    check(n_pattern_changes > 0,   "pattern generators stepped");
    check(n_simple >= 2,           "plain I2C frames");
    check(n_i2c_apb_wr > 0,        "I2C to APB write");
    check(n_i2c_apb_rd > 0,        "APB to I2C read");
    check(n_ahb_wr > 0,            "AHB to APB write");
    check(n_ahb_rd > 0,            "AHB to APB read");
    $display("events: bist_frames=%0d correct=%0d error=%0d nack=%0d steps=%0d simple=%0d apb_wr=%0d apb_rd=%0d ahb_wr=%0d ahb_rd=%0d",
             n_bist_frames, n_correct, n_error, n_nack, n_pattern_changes, n_simple,
             n_i2c_apb_wr, n_i2c_apb_rd, n_ahb_wr, n_ahb_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
