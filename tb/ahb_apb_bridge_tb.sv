// ahb_apb_bridge_tb: runs the AHB-to-APB bridge in both read-data options
// (direct, REG_RDATA = 0, and registered, REG_RDATA = 1), side by side.
// An AHB master written here issues random single and back-to-back reads
// and writes to all sixteen peripheral slots, with idle cycles and
// deselected transfers in between. Sixteen model peripherals return data
// that encodes their number and PADDR, and record the writes they get.
// Checks: read data and written words, the peripheral selected, one wait
// state per read (two when registered) and two per write, the SETUP/ENABLE
// order, at most one PSELx at a time, HRESP always OKAY, and that ignored
// transfers reach no peripheral.
module ahb_apb_bridge_tb;
  int checks = 0, failures = 0;
  int finished = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] periph_data(int n, logic [31:0] a);
    return {4'(n), a[27:0]} ^ 32'h5A5A_0000;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : cfg
    localparam int N = 40;
    logic [31:0] HADDR = 0, HWDATA = 0, HRDATA, PADDR, PWDATA;
    logic HWRITE = 0, HSEL = 0, HREADYOUT, PWRITE, PENABLE;
    logic [1:0] HTRANS = 0, HRESP;
    logic [15:0] PSEL;
    logic [31:0] PRDATA [16];
    logic [31:0] wr_word [16];
    int          wr_cnt [16];
    logic [31:0] x_addr [N], x_wdata [N], x_rdata [N];
    logic        x_write [N];
    int          x_wait [N];
    logic        setup_seen = 0;

    for (genvar n = 0; n < 16; n++) begin : per
      assign PRDATA[n] = periph_data(n, PADDR);
    end

    ahb_apb_bridge #(.REG_RDATA(g == 1)) dut (
      .HCLK(clk), .HRESETn(rst_n),
      .HADDR, .HWDATA, .HWRITE, .HSEL, .HREADY(HREADYOUT), .HTRANS,
      .HREADYOUT, .HRESP, .HRDATA,
      .PADDR, .PWDATA, .PWRITE, .PSEL, .PENABLE, .PRDATA
    );

    // APB-side monitor
    always @(posedge clk) if (rst_n) begin
      if (!$onehot0(PSEL)) check(0, "more than one PSELx");
      if (PENABLE && PSEL == 0) check(0, "PENABLE without PSEL");
      if (PENABLE && !setup_seen) check(0, "ENABLE without SETUP");
      if (HRESP != 2'b00) check(0, "HRESP not OKAY");
      if (PENABLE && PWRITE)
        for (int n = 0; n < 16; n++)
          if (PSEL[n]) begin wr_word[n] = PWDATA ^ PADDR; wr_cnt[n]++; end
      setup_seen = (PSEL != 0) && !PENABLE;
    end

    initial begin
      int cur, a;
      int expect_wr [16];
      logic [31:0] expect_word [16];
      for (int n = 0; n < 16; n++) begin wr_cnt[n] = 0; expect_wr[n] = 0; end
      for (int i = 0; i < N; i++) begin
        x_addr[i]  = {16'h4000, 4'($urandom), 10'($urandom), 2'b00};
        x_write[i] = $urandom_range(0, 1) != 0;
        x_wdata[i] = $urandom;
        x_wait[i]  = 0;
      end
      wait (rst_n);
      cur = -1; a = 0;
      // cycle-by-cycle AHB master: HREADYOUT and HRDATA are sampled at the
      // falling edge, the bus is driven just after the rising edge
      while (a < N || cur >= 0) begin
        logic rdy;
        logic [31:0] rd;
        @(negedge clk);
        rdy = HREADYOUT;
        rd  = HRDATA;
        @(posedge clk);
        #1;
        if (rdy) begin
          if (cur >= 0) x_rdata[cur] = rd;       // data phase ended
          cur = -1;
          if (HSEL && HTRANS == 2'b10) begin cur = a; a++; end   // accepted
          HSEL = 0; HTRANS = 2'b00;
          if (a < N) begin
            case ($urandom_range(0, 5))
              0: begin HSEL = 0; HTRANS = 2'b10; HADDR = 32'hFFFF_FFFC; end // not us
              1: begin HSEL = 1; HTRANS = 2'b00; HADDR = x_addr[a]; end    // IDLE
              default: begin HSEL = 1; HTRANS = 2'b10; end
            endcase
            if (HSEL && HTRANS == 2'b10) begin HADDR = x_addr[a]; HWRITE = x_write[a]; end
          end
          if (cur >= 0) HWDATA = x_write[cur] ? x_wdata[cur] : 32'($urandom);
        end else if (cur >= 0) begin
          x_wait[cur]++;
        end
      end
      repeat (4) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int n;
        n = int'(x_addr[i][15:12]);
        if (x_write[i]) begin
          check(x_wait[i] == 2, $sformatf("cfg%0d write %0d: %0d wait states", g, i, x_wait[i]));
          expect_wr[n]++;
          expect_word[n] = x_wdata[i] ^ x_addr[i];
        end else begin
          check(x_wait[i] == 1 + g, $sformatf("cfg%0d read %0d: %0d wait states", g, i, x_wait[i]));
          check(x_rdata[i] == periph_data(n, x_addr[i]),
                $sformatf("cfg%0d read %0d data %h", g, i, x_rdata[i]));
        end
      end
      for (int n = 0; n < 16; n++) begin
        check(wr_cnt[n] == expect_wr[n], $sformatf("cfg%0d peripheral %0d writes %0d/%0d", g, n, wr_cnt[n], expect_wr[n]));
        if (expect_wr[n] > 0)
          check(wr_word[n] == expect_word[n], $sformatf("cfg%0d peripheral %0d last write", g, n));
      end
      finished++;
    end
  end
endmodule
