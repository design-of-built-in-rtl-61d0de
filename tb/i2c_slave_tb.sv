// i2c_slave_tb: the I2C slave against the model master i2c_tb_master.
// Checks: the slave ACKs its own address and ignores (NACKs) another one;
// the word address is reported once with addr_valid; every written byte is
// reported with data_valid, the right value and an address that increments
// from the word address; no byte is reported in a frame for another
// address; a read after a repeated START returns, byte by byte, the
// content of a model byte memory at incrementing addresses, until the
// master NACKs.
module i2c_slave_tb;
  logic clk = 0, rst_n = 0;
  logic scl, sda_drv, sda_oe, sda;
  logic addr_valid, data_valid, rd_strobe, rw;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] mem [256];
  int checks = 0, failures = 0;
  int n_addr = 0, n_data = 0;
  logic [7:0] got_addr [16];
  logic [7:0] got_data [16];

  assign sda   = sda_drv & ~sda_oe;
  assign rdata = mem[addr];

  i2c_slave #(.SLAVE_ADDR(7'h50)) dut (.*);
  i2c_tb_master #(.Q(5)) m (.clk, .sda, .scl, .sda_drv);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (addr_valid) n_addr++;
    if (data_valid) begin got_addr[n_data % 16] = addr; got_data[n_data % 16] = wdata; n_data++; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ack;
    logic [7:0] v, wa;
    logic [7:0] bytes [4];
    for (int i = 0; i < 256; i++) mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    n_addr = 0; n_data = 0;
    // write: address, word address, four bytes
    wa = 8'h24;
    for (int i = 0; i < 4; i++) bytes[i] = 8'($urandom);
    m.start();
    m.write_byte({7'h50, 1'b0}, ack); check(ack, "ACK of own address");
    m.write_byte(wa, ack);             check(ack, "ACK of word address");
    for (int i = 0; i < 4; i++) begin
      m.write_byte(bytes[i], ack);     check(ack, $sformatf("ACK of data byte %0d", i));
    end
    m.stop();
    repeat (20) @(posedge clk);
    check(n_addr == 1, $sformatf("addr_valid count %0d", n_addr));
    check(n_data == 4, $sformatf("data_valid count %0d", n_data));
    for (int i = 0; i < 4; i++) begin
      check(got_data[i] == bytes[i], $sformatf("byte %0d value %h vs %h", i, got_data[i], bytes[i]));
      check(got_addr[i] == wa + 8'(i), $sformatf("byte %0d address %h", i, got_addr[i]));
    end
    // another device's address: NACK and nothing reported
    m.start();
    m.write_byte({7'h51, 1'b0}, ack); check(!ack, "NACK of foreign address");
    m.write_byte(8'h11, ack);          check(!ack, "no ACK after foreign address");
    m.stop();
    repeat (20) @(posedge clk);
    check(n_addr == 1 && n_data == 4, "nothing reported for foreign address");
    // read: set the word address, repeated START, read three bytes
    wa = 8'h80;
    m.start();
    m.write_byte({7'h50, 1'b0}, ack); check(ack, "ACK of address (read setup)");
    m.write_byte(wa, ack);             check(ack, "ACK of read word address");
    m.start();
    m.write_byte({7'h50, 1'b1}, ack); check(ack, "ACK of address with R");
    check(rw, "rw set for read");
    for (int i = 0; i < 3; i++) begin
      m.read_byte(i < 2, v);
      check(v == mem[wa + 8'(i)], $sformatf("read byte %0d: %h vs %h", i, v, mem[wa + 8'(i)]));
    end
    m.stop();
    repeat (20) @(posedge clk);
    check(n_addr == 2 && n_data == 4, "read frame reports only its word address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
