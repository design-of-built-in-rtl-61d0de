// i2c_apb_bridge_tb: an I2C master model talks through the bridge to an
// APB slave model. Checks: eight bytes written over I2C from word address
// 0x14 arrive as two APB writes of packed 32-bit words at 0x14 and 0x18,
// with nothing written before a word is complete; after the APB slave
// flags new data (rx_changed) the bridge reads that word over APB, and an
// I2C read from the same word address returns its four bytes; APB
// handshakes follow SETUP/ENABLE throughout.
module i2c_apb_bridge_tb;
  logic clk = 0, rst_n = 0;
  logic scl, sda, sda_drv, sda_oe, rx_changed = 0;
  logic [7:0] PADDR;
  logic PSEL, PENABLE, PWRITE;
  logic [31:0] PWDATA, PRDATA;
  int checks = 0, failures = 0;

  assign sda = sda_drv & ~sda_oe;

  i2c_apb_bridge dut (.*);
  i2c_tb_master #(.Q(5)) m (.clk, .sda, .scl, .sda_drv);
  apb_tb_slave s (.clk, .PADDR, .PSEL, .PENABLE, .PWRITE, .PWDATA, .PRDATA);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ack;
    logic [7:0] v;
    logic [7:0] b [8];
    for (int i = 0; i < 64; i++) s.mem[i] = 32'($urandom);
    for (int i = 0; i < 8; i++) b[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    s.writes = 0; s.reads = 0; s.proto_err = 0;
    m.start();
    m.write_byte({7'h50, 1'b0}, ack); check(ack, "address ACK");
    m.write_byte(8'h14, ack);          check(ack, "word address ACK");
    for (int i = 0; i < 8; i++) begin
      m.write_byte(b[i], ack); check(ack, $sformatf("data ACK %0d", i));
      check(s.writes == (i + 1) / 4, $sformatf("APB writes after byte %0d: %0d", i, s.writes));
    end
    m.stop();
    repeat (20) @(posedge clk);
    check(s.writes == 2, "two APB writes");
    check(s.mem[5] == {b[3], b[2], b[1], b[0]}, $sformatf("word 0x14 = %h", s.mem[5]));
    check(s.mem[6] == {b[7], b[6], b[5], b[4]}, $sformatf("word 0x18 = %h", s.mem[6]));
    // read path: point at 0x08, the APB slave flags new data, read it back
    m.start();
    m.write_byte({7'h50, 1'b0}, ack);
    m.write_byte(8'h08, ack);
    m.stop();
    @(negedge clk) rx_changed = 1;
    @(negedge clk) rx_changed = 0;
    repeat (10) @(posedge clk);
    check(s.reads == 1 && s.last_addr == 8'h08, "APB read of word 0x08");
    m.start();
    m.write_byte({7'h50, 1'b0}, ack);
    m.write_byte(8'h08, ack);
    m.start();
    m.write_byte({7'h50, 1'b1}, ack); check(ack, "read address ACK");
    for (int i = 0; i < 4; i++) begin
      m.read_byte(i < 3, v);
      check(v == s.mem[2][8*i +: 8], $sformatf("read byte %0d %h", i, v));
    end
    m.stop();
    repeat (20) @(posedge clk);
    check(s.writes == 2, "no APB write from address-only frames");
    check(s.proto_err == 0, "APB protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
