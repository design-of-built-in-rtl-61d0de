// apb_master_tb: drives the I2C-side strobes of the APB master directly and
// uses the model slave apb_tb_slave. Checks: four bytes at consecutive
// addresses produce exactly one APB write of the packed word, to the word
// address, starting in the second cycle after the fourth byte; three bytes
// produce none; a new word address discards a partial word; an rx_changed
// pulse produces one APB read of the current word, after which rdata gives
// its bytes; the APB SETUP/ENABLE sequence is always respected.
module apb_master_tb;
  logic clk = 0, rst_n = 0;
  logic addr_valid = 0, data_valid = 0, rx_changed = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] PADDR;
  logic PSEL, PENABLE, PWRITE;
  logic [31:0] PWDATA, PRDATA;
  int checks = 0, failures = 0;
  longint cyc = 0, t_psel = -1, t_dv = 0;

  apb_master dut (.*);
  apb_tb_slave s (.clk, .PADDR, .PSEL, .PENABLE, .PWRITE, .PWDATA, .PRDATA);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (PSEL && !PENABLE && t_psel < 0) t_psel = cyc;
    if (data_valid) t_dv = cyc;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_addr(logic [7:0] a);
    @(negedge clk); addr = a; addr_valid = 1;
    @(negedge clk); addr_valid = 0;
  endtask

  // one byte at the current address, then the address increments
  task automatic put(logic [7:0] d);
    @(negedge clk); wdata = d; data_valid = 1;
    @(negedge clk); data_valid = 0; addr = addr + 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) s.mem[i] = 32'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    s.writes = 0; s.reads = 0; s.proto_err = 0;
    // full word
    set_addr(8'h10);
    put(8'h11); put(8'h22); put(8'h33);
    check(s.writes == 0, "no write after three bytes");
    @(negedge clk); wdata = 8'h44; data_valid = 1; t_psel = -1;
    @(negedge clk); data_valid = 0; addr = addr + 1;
    repeat (6) @(negedge clk);
    check(s.writes == 1, $sformatf("one write, got %0d", s.writes));
    check(s.mem[4] == 32'h44332211, $sformatf("written word %h", s.mem[4]));
    check(s.last_addr == 8'h10, "write address");
    check(t_psel - t_dv == 2, $sformatf("SETUP %0d cycles after the fourth byte", t_psel - t_dv));
    // partial word discarded by a new word address
    set_addr(8'h20);
    put(8'hA1); put(8'hA2);
    set_addr(8'h30);
    put(8'hB1); put(8'hB2); put(8'hB3);
    check(s.writes == 1, "no write from partial words");
    put(8'hB4);
    check(s.writes == 2 && s.mem[12] == 32'hB4B3B2B1, $sformatf("second word %h", s.mem[12]));
    // read path
    set_addr(8'h08);
    @(negedge clk); rx_changed = 1;
    @(negedge clk); rx_changed = 0;
    repeat (5) @(negedge clk);
    check(s.reads == 1, $sformatf("one read, got %0d", s.reads));
    check(s.last_addr == 8'h08, "read address");
    for (int i = 0; i < 4; i++) begin
      addr = 8'h08 + 8'(i); #1;
      check(rdata == s.mem[2][8*i +: 8], $sformatf("rdata byte %0d", i));
    end
    check(s.proto_err == 0, "APB protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
